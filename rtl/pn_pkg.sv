// pn_pkg: types and constants shared by the ParaNut RTL.
//
// Holds the system address map, the default cache geometry (four banks,
// 512 sets, four ways, the default configuration of the processor), the
// RISC-V opcode and CSR numbers the cores decode, and the state type of the
// execution unit.  The cache geometry follows the default configuration of
// the ParaNut; the address map and the CSR number of the CPU enable register
// are this implementation's own choice.
package pn_pkg;

  localparam int unsigned XLEN = 32;

  // ---------------------------------------------------------------- cache
  localparam int unsigned CACHE_BANKS_LD = 2;  // CFG_MEMU_CACHE_BANKS_LD
  localparam int unsigned CACHE_SETS_LD  = 9;  // CFG_MEMU_CACHE_SETS_LD
  localparam int unsigned CACHE_WAYS_LD  = 2;  // CFG_MEMU_CACHE_WAYS_LD

  // ---------------------------------------------------------- address map
  // Main memory is the only cacheable region; the peripherals live above it.
  localparam logic [31:0] MEM_BASE    = 32'h1000_0000;
  localparam logic [31:0] MEM_MASK    = 32'hF000_0000;   // 256 MiB window
  localparam logic [31:0] MTIMER_BASE = 32'h5000_0000;
  localparam logic [31:0] UART_BASE   = 32'h5001_0000;
  localparam logic [31:0] GPIO_BASE   = 32'h5002_0000;
  localparam logic [31:0] PERIPH_MASK = 32'hFFFF_0000;   // 64 KiB each
  localparam logic [31:0] RESET_ADDR  = 32'h1000_0000;

  // ------------------------------------------------------------- RISC-V
  localparam logic [6:0] OP_LUI    = 7'b0110111;
  localparam logic [6:0] OP_AUIPC  = 7'b0010111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_LOAD   = 7'b0000011;
  localparam logic [6:0] OP_STORE  = 7'b0100011;
  localparam logic [6:0] OP_IMM    = 7'b0010011;
  localparam logic [6:0] OP_REG    = 7'b0110011;
  localparam logic [6:0] OP_FENCE  = 7'b0001111;
  localparam logic [6:0] OP_SYSTEM = 7'b1110011;

  localparam logic [11:0] CSR_MSTATUS  = 12'h300;
  localparam logic [11:0] CSR_MISA     = 12'h301;
  localparam logic [11:0] CSR_MIE      = 12'h304;
  localparam logic [11:0] CSR_MTVEC    = 12'h305;
  localparam logic [11:0] CSR_MSCRATCH = 12'h340;
  localparam logic [11:0] CSR_MEPC     = 12'h341;
  localparam logic [11:0] CSR_MCAUSE   = 12'h342;
  localparam logic [11:0] CSR_MTVAL    = 12'h343;
  localparam logic [11:0] CSR_MIP      = 12'h344;
  localparam logic [11:0] CSR_MCYCLE   = 12'hB00;
  localparam logic [11:0] CSR_MINSTRET = 12'hB02;
  localparam logic [11:0] CSR_MCYCLEH  = 12'hB80;
  localparam logic [11:0] CSR_MHARTID  = 12'hF14;
  localparam logic [11:0] CSR_PNCE     = 12'h7C0;  // ParaNut CPU enable

  // exception causes
  localparam logic [31:0] CAUSE_INSN_MISALIGNED  = 32'd0;
  localparam logic [31:0] CAUSE_INSN_ACCESS      = 32'd1;
  localparam logic [31:0] CAUSE_ILLEGAL_INSN     = 32'd2;
  localparam logic [31:0] CAUSE_BREAKPOINT       = 32'd3;
  localparam logic [31:0] CAUSE_LOAD_MISALIGNED  = 32'd4;
  localparam logic [31:0] CAUSE_LOAD_ACCESS      = 32'd5;
  localparam logic [31:0] CAUSE_STORE_MISALIGNED = 32'd6;
  localparam logic [31:0] CAUSE_STORE_ACCESS     = 32'd7;
  localparam logic [31:0] CAUSE_ECALL_M          = 32'd11;
  localparam logic [31:0] CAUSE_IRQ_MTIMER       = 32'h8000_0007;
  localparam logic [31:0] CAUSE_IRQ_MEXT         = 32'h8000_000B;

  // ------------------------------------------------------- execution unit
  // State names follow the EXU state diagram of the ParaNut.
  typedef enum logic [3:0] {
    ExuHalt,
    ExuExecuteInsn,
    ExuJump,
    ExuBranch,
    ExuCSR,
    ExuMem,
    ExuMemWB,
    ExuDiv,
    ExuMulDivWB,
    ExuLSUFlush,
    ExuExOrIrq,
    ExuExJumpTvec,
    ExuXRETFinish
  } exu_state_t;

endpackage
