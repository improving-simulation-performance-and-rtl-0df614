// csr: control and status registers of one ParaNut core.
//
// Machine-mode registers: mstatus (MIE, MPIE), misa, mie, mtvec, mscratch,
// mepc, mcause, mtval, mip (MTIP from the timer, MEIP from the interconnect,
// read only), mcycle/mcycleh, minstret and mhartid.  The CePU (capability
// level 3) also holds `pnce`, the ParaNut CPU enable register: bit i enables
// core i (bit 0, the CePU itself, always reads 1); its value drives the
// enable inputs of the CoPUs.
//
// Access: the EXU presents `addr`, `op` (funct3[1:0] of the CSR instruction:
// 1 write, 2 set bits, 3 clear bits) and `wdata`; `rdata` and `illegal` are
// combinational; the write happens at the clock edge when `access` and
// `write` are high (the EXU clears `write` for set/clear with a zero source).
// Traps: `trap` saves epc, cause and tval and clears MIE (old value to MPIE);
// `mret` restores MIE from MPIE.  `irq_pending` and `irq_cause` tell the EXU
// that an enabled interrupt waits (timer before external).
//
// Cores below capability level 3 have no interrupt or exception hardware:
// their irq_pending is always low and they hold no pnce register.  Only the
// presence of CSRs per capability level and the names pnce and mhartid come
// from the ParaNut; the CSR number of pnce (0x7C0) is this design's choice.
module csr
  import pn_pkg::*;
#(
  parameter int unsigned HART_ID   = 0,
  parameter int unsigned CAP_LEVEL = 3,
  parameter int unsigned CORES     = 4,
  parameter bit          M_EXT     = 1'b1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             access,
  input  logic             write,
  input  logic [11:0]      addr,
  input  logic [1:0]       op,
  input  logic [31:0]      wdata,
  output logic [31:0]      rdata,
  output logic             illegal,
  input  logic             trap,
  input  logic [31:0]      trap_cause,
  input  logic [31:0]      trap_epc,
  input  logic [31:0]      trap_tval,
  input  logic             mret,
  input  logic             instret,
  input  logic             mtip,
  input  logic             meip,
  output logic [31:0]      mtvec,
  output logic [31:0]      mepc,
  output logic             irq_pending,
  output logic [31:0]      irq_cause,
  output logic [CORES-1:0] pnce
);

  logic        mie_bit, mpie_bit;
  logic        mtie, meie;
  logic [31:0] mscratch, mcause, mtval;
  logic [63:0] mcycle;
  logic [31:0] minstret;
  logic [31:0] misa;
  assign misa = 32'h4000_0100 | (M_EXT ? 32'h0000_1000 : 32'h0);  // RV32I(M)

  always_comb begin
    illegal = 1'b0;
    unique case (addr)
      CSR_MSTATUS:  rdata = {19'd0, 2'b11, 3'd0, mpie_bit, 3'd0, mie_bit, 3'd0};
      CSR_MISA:     rdata = misa;
      CSR_MIE:      rdata = {20'd0, meie, 3'd0, mtie, 7'd0};
      CSR_MTVEC:    rdata = mtvec;
      CSR_MSCRATCH: rdata = mscratch;
      CSR_MEPC:     rdata = mepc;
      CSR_MCAUSE:   rdata = mcause;
      CSR_MTVAL:    rdata = mtval;
      CSR_MIP:      rdata = {20'd0, meip, 3'd0, mtip, 7'd0};
      CSR_MCYCLE:   rdata = mcycle[31:0];
      CSR_MCYCLEH:  rdata = mcycle[63:32];
      CSR_MINSTRET: rdata = minstret;
      CSR_MHARTID:  rdata = HART_ID;
      CSR_PNCE: begin
        rdata   = 32'(pnce);
        illegal = (CAP_LEVEL < 3);
      end
      default: begin
        rdata   = '0;
        illegal = 1'b1;
      end
    endcase
    // read-only registers (number 0xCxx/0xFxx) cannot be written
    if (write && addr[11:10] == 2'b11) illegal = 1'b1;
  end

  logic [31:0] nv;   // new value of the addressed register
  always_comb begin
    unique case (op)
      2'd1:    nv = wdata;
      2'd2:    nv = rdata | wdata;
      default: nv = rdata & ~wdata;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      mie_bit  <= 1'b0;
      mpie_bit <= 1'b0;
      mtie     <= 1'b0;
      meie     <= 1'b0;
      mtvec    <= RESET_ADDR;
      mscratch <= '0;
      mepc     <= '0;
      mcause   <= '0;
      mtval    <= '0;
      mcycle   <= '0;
      minstret <= '0;
      pnce     <= CORES'(1);
    end else begin
      mcycle <= mcycle + 64'd1;
      if (instret) minstret <= minstret + 1;
      if (access && write && !illegal) begin
        unique case (addr)
          CSR_MSTATUS: begin
            mie_bit  <= nv[3];
            mpie_bit <= nv[7];
          end
          CSR_MIE: begin
            mtie <= nv[7];
            meie <= nv[11];
          end
          CSR_MTVEC:    mtvec    <= {nv[31:2], 2'b00};
          CSR_MSCRATCH: mscratch <= nv;
          CSR_MEPC:     mepc     <= {nv[31:2], 2'b00};
          CSR_MCAUSE:   mcause   <= nv;
          CSR_MTVAL:    mtval    <= nv;
          CSR_MCYCLE:   mcycle[31:0]  <= nv;
          CSR_MCYCLEH:  mcycle[63:32] <= nv;
          CSR_MINSTRET: minstret <= nv;
          CSR_PNCE:     pnce     <= CORES'(nv) | CORES'(1);
          default: ;
        endcase
      end
      if (trap) begin
        mepc     <= trap_epc;
        mcause   <= trap_cause;
        mtval    <= trap_tval;
        mpie_bit <= mie_bit;
        mie_bit  <= 1'b0;
      end else if (mret) begin
        mie_bit  <= mpie_bit;
        mpie_bit <= 1'b1;
      end
    end
  end

  always_comb begin
    irq_pending = (CAP_LEVEL >= 3) && mie_bit && ((mtie && mtip) || (meie && meip));
    irq_cause   = (mtie && mtip) ? CAUSE_IRQ_MTIMER : CAUSE_IRQ_MEXT;
  end

endmodule
