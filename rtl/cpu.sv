// cpu: one ParaNut core (CePU or CoPU).
//
// Joins the execution unit (EXU) with its instruction fetch unit (IFU),
// load/store unit (LSU), control and status registers (CSR) and, when M_EXT
// is set, the multiply/divide unit.  Towards the memory unit the core has an
// IFU read port, an LSU read port and an LSU write port.
//
// CAP_LEVEL 3 makes the CePU: it starts at the reset address, takes
// interrupts and exceptions and holds the `pnce` register whose bits enable
// the CoPUs.  CAP_LEVEL 2 makes a CoPU with its own IFU but no interrupt or
// exception hardware: it waits in ExuHalt until `enable` is set, and an
// exception halts it.  HART_ID is the value of mhartid.
// Capability level 1 (a CoPU without IFU, sharing the CePU's instruction
// stream) is not provided by this design.
module cpu
  import pn_pkg::*;
#(
  parameter int unsigned HART_ID   = 0,
  parameter int unsigned CAP_LEVEL = 3,
  parameter int unsigned CORES     = 4,
  parameter bit          M_EXT     = 1'b1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  input  logic             mtip,
  input  logic             meip,
  output logic [CORES-1:0] pnce,
  output exu_state_t       state,
  output logic [31:0]      pc,
  output logic             halted,
  output logic             ex_halted,
  // IFU read port
  output logic             ifu_rd,
  output logic [31:0]      ifu_rd_adr,
  input  logic             ifu_rd_ack,
  input  logic             ifu_rd_err,
  input  logic [31:0]      ifu_rd_data,
  // LSU read port
  output logic             lsu_rd,
  output logic [31:0]      lsu_rd_adr,
  input  logic             lsu_rd_ack,
  input  logic             lsu_rd_err,
  input  logic [31:0]      lsu_rd_data,
  // LSU write port
  output logic             lsu_wr,
  output logic [31:0]      lsu_wr_adr,
  output logic [31:0]      lsu_wr_data,
  output logic [3:0]       lsu_wr_bsel,
  input  logic             lsu_wr_ack,
  input  logic             lsu_wr_err
);

  logic        ifu_fetch, ifu_valid;
  logic [31:0] ifu_pc, ifu_insn, ifu_insn_pc;
  logic        lsu_req, lsu_we, lsu_done, lsu_misaligned, lsu_err, ifu_insn_err;
  logic [2:0]  lsu_funct3;
  logic [31:0] lsu_adr, lsu_wdata, lsu_rdata;
  logic        csr_access, csr_write, csr_illegal, trap, mret, instret;
  logic        irq_pending;
  logic [11:0] csr_addr;
  logic [1:0]  csr_op;
  logic [31:0] csr_wdata, csr_rdata, trap_cause, trap_epc, trap_tval;
  logic [31:0] mtvec, mepc, irq_cause;
  logic        md_start, md_valid, md_busy;
  logic [2:0]  md_funct3;
  logic [31:0] md_a, md_b, md_result;

  exu #(.CAP_LEVEL(CAP_LEVEL), .M_EXT(M_EXT)) u_exu (
    .clk, .rst, .enable, .state, .pc, .halted, .ex_halted,
    .ifu_fetch, .ifu_pc, .ifu_valid, .ifu_insn, .ifu_insn_pc, .ifu_insn_err,
    .lsu_req, .lsu_we, .lsu_funct3, .lsu_adr, .lsu_wdata, .lsu_done, .lsu_rdata,
    .lsu_misaligned, .lsu_err,
    .csr_access, .csr_write, .csr_addr, .csr_op, .csr_wdata, .csr_rdata,
    .csr_illegal, .trap, .trap_cause, .trap_epc, .trap_tval, .mret, .instret,
    .mtvec, .mepc, .irq_pending, .irq_cause,
    .md_start, .md_funct3, .md_a, .md_b, .md_valid, .md_result);

  ifu u_ifu (
    .clk, .rst, .fetch(ifu_fetch), .pc(ifu_pc), .valid(ifu_valid),
    .insn(ifu_insn), .insn_pc(ifu_insn_pc), .insn_err(ifu_insn_err),
    .rp_rd(ifu_rd), .rp_adr(ifu_rd_adr), .rp_ack(ifu_rd_ack), .rp_data(ifu_rd_data),
    .rp_err(ifu_rd_err));

  lsu u_lsu (
    .clk, .rst, .req(lsu_req), .we(lsu_we), .funct3(lsu_funct3), .adr(lsu_adr),
    .wdata(lsu_wdata), .done(lsu_done), .rdata(lsu_rdata),
    .misaligned(lsu_misaligned), .err(lsu_err),
    .rp_rd(lsu_rd), .rp_adr(lsu_rd_adr), .rp_ack(lsu_rd_ack), .rp_data(lsu_rd_data),
    .rp_err(lsu_rd_err),
    .wp_wr(lsu_wr), .wp_adr(lsu_wr_adr), .wp_data(lsu_wr_data),
    .wp_bsel(lsu_wr_bsel), .wp_ack(lsu_wr_ack), .wp_err(lsu_wr_err));

  csr #(.HART_ID(HART_ID), .CAP_LEVEL(CAP_LEVEL), .CORES(CORES), .M_EXT(M_EXT)) u_csr (
    .clk, .rst, .access(csr_access), .write(csr_write), .addr(csr_addr),
    .op(csr_op), .wdata(csr_wdata), .rdata(csr_rdata), .illegal(csr_illegal),
    .trap, .trap_cause, .trap_epc, .trap_tval, .mret, .instret, .mtip, .meip,
    .mtvec, .mepc, .irq_pending, .irq_cause, .pnce);

  if (M_EXT) begin : g_mext
    mextension u_mext (
      .clk, .rst, .start(md_start), .funct3(md_funct3), .a(md_a), .b(md_b),
      .busy(md_busy), .valid(md_valid), .result(md_result));
  end else begin : g_no_mext
    assign md_busy   = 1'b0;
    assign md_valid  = 1'b0;
    assign md_result = '0;
  end

endmodule
