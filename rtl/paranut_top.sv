// paranut_top: a ParaNut system, CPU cores, memory unit and peripherals.
//
// CORES cores share one memory unit.  Core 0 is the CePU (capability level 3);
// cores 1..CORES-1 are CoPUs of capability level 2, each enabled by its bit
// in the CePU's pnce register.  Every core connects to the memory unit with
// an IFU read port, an LSU read port and an LSU write port.  The memory unit
// caches main memory and is the only master of the Wishbone system bus.  The
// interconnect routes bus transfers to main memory and to the peripherals:
//
//   0x1000_0000 .. 0x1FFF_FFFF  main memory (outside this module, `mem_*`)
//   0x5000_0000                 machine timer (mtime, mtimecmp)
//   0x5001_0000                 UART
//   0x5002_0000                 GPIO
//
// The timer interrupt goes straight to the CePU (mip.MTIP); the UART receive
// interrupt and the `ext_irq` input are collected by the interconnect into
// mip.MEIP.  An access to an unmapped address ends with the bus error
// signal (`bus_err`, also a port), which the memory unit hands back to the
// requesting core as an access fault.  Execution starts at 0x1000_0000 in
// the CePU.  Main memory
// itself (on an FPGA a DDR controller, in simulation a model) is not part
// of the design; its Wishbone slave port is brought out.
// `cache_en` switches the memory unit between cached and direct access.
module paranut_top
  import pn_pkg::*;
#(
  parameter int unsigned CORES    = 4,
  parameter bit          M_EXT    = 1'b1,
  parameter int unsigned BANKS_LD = CACHE_BANKS_LD,
  parameter int unsigned SETS_LD  = CACHE_SETS_LD,
  parameter int unsigned WAYS_LD  = CACHE_WAYS_LD,
  parameter int unsigned GPIO_IN  = 8,
  parameter int unsigned GPIO_OUT = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                cache_en,
  // main memory (Wishbone slave outside)
  output logic                mem_cyc,
  output logic                mem_stb,
  output logic                mem_we,
  output logic [31:0]         mem_adr,
  output logic [31:0]         mem_dat_o,
  output logic [3:0]          mem_sel,
  input  logic                mem_ack,
  input  logic [31:0]         mem_dat_i,
  // peripherals
  input  logic [GPIO_IN-1:0]  gpio_in,
  output logic [GPIO_OUT-1:0] gpio_out,
  output logic                uart_tx,
  input  logic                uart_rx,
  input  logic                ext_irq,
  // status
  output logic [CORES-1:0]    halted,
  output logic [31:0]         cepu_pc,
  output logic [CORES-1:0]    ex_halted,
  output logic                bus_err
);

  // ------------------------------------------------------------------ cores
  logic        ifu_rd [CORES], lsu_rd [CORES], lsu_wr [CORES];
  logic [31:0] ifu_rd_adr [CORES], lsu_rd_adr [CORES], lsu_wr_adr [CORES];
  logic        ifu_rd_ack [CORES], lsu_rd_ack [CORES], lsu_wr_ack [CORES];
  logic        ifu_rd_err [CORES], lsu_rd_err [CORES], lsu_wr_err [CORES];
  logic [31:0] ifu_rd_data [CORES], lsu_rd_data [CORES], lsu_wr_data [CORES];
  logic [3:0]  lsu_wr_bsel [CORES];
  logic [CORES-1:0] pnce [CORES];
  logic [31:0] pc [CORES];
  exu_state_t  state [CORES];
  logic        mtip, meip;

  for (genvar c = 0; c < CORES; c++) begin : g_core
    cpu #(.HART_ID(c), .CAP_LEVEL(c == 0 ? 3 : 2), .CORES(CORES), .M_EXT(M_EXT)) u_cpu (
      .clk, .rst,
      .enable   (c == 0 ? 1'b1 : pnce[0][c]),
      .mtip     (c == 0 ? mtip : 1'b0),
      .meip     (c == 0 ? meip : 1'b0),
      .pnce     (pnce[c]),
      .state    (state[c]),
      .pc       (pc[c]),
      .halted   (halted[c]),
      .ex_halted(ex_halted[c]),
      .ifu_rd(ifu_rd[c]), .ifu_rd_adr(ifu_rd_adr[c]), .ifu_rd_ack(ifu_rd_ack[c]),
      .ifu_rd_data(ifu_rd_data[c]), .ifu_rd_err(ifu_rd_err[c]),
      .lsu_rd(lsu_rd[c]), .lsu_rd_adr(lsu_rd_adr[c]), .lsu_rd_ack(lsu_rd_ack[c]),
      .lsu_rd_data(lsu_rd_data[c]), .lsu_rd_err(lsu_rd_err[c]),
      .lsu_wr(lsu_wr[c]), .lsu_wr_adr(lsu_wr_adr[c]), .lsu_wr_data(lsu_wr_data[c]),
      .lsu_wr_bsel(lsu_wr_bsel[c]), .lsu_wr_ack(lsu_wr_ack[c]), .lsu_wr_err(lsu_wr_err[c]));
  end
  assign cepu_pc = pc[0];

  // ------------------------------------------------------------ memory unit
  logic        wb_cyc, wb_stb, wb_we, wb_ack;
  logic [31:0] wb_adr, wb_dat_o, wb_dat_i;
  logic [3:0]  wb_sel;

  memu #(.CORES(CORES), .BANKS_LD(BANKS_LD), .SETS_LD(SETS_LD), .WAYS_LD(WAYS_LD)) u_memu (
    .clk, .rst, .cache_en,
    .lsu_rd, .lsu_rd_adr, .lsu_rd_ack, .lsu_rd_data, .lsu_rd_err,
    .ifu_rd, .ifu_rd_adr, .ifu_rd_ack, .ifu_rd_data, .ifu_rd_err,
    .lsu_wr, .lsu_wr_adr, .lsu_wr_data, .lsu_wr_bsel, .lsu_wr_ack, .lsu_wr_err,
    .wb_cyc, .wb_stb, .wb_we, .wb_adr, .wb_dat_o, .wb_sel, .wb_ack, .wb_err(bus_err),
    .wb_dat_i);

  // ----------------------------------------------------------- interconnect
  localparam int unsigned NSLV = 4;
  logic [NSLV-1:0] s_cyc, s_stb, s_ack;
  logic            s_we;
  logic [31:0]     s_adr [NSLV];
  logic [31:0]     s_dat_i [NSLV];
  logic [31:0]     s_dat_o;
  logic [3:0]      s_sel;
  logic            uart_irq;
  logic [1:0]      irq_id;   // which line won; not used further here

  pn_interconnect #(
    .NSLV(NSLV),
    .BASE({GPIO_BASE, UART_BASE, MTIMER_BASE, MEM_BASE}),
    .MASK({PERIPH_MASK, PERIPH_MASK, PERIPH_MASK, MEM_MASK}),
    .TRANSLATE(4'b1110),
    .NIRQ(2)
  ) u_ic (
    .clk, .rst,
    .m_cyc(wb_cyc), .m_stb(wb_stb), .m_we(wb_we), .m_adr(wb_adr),
    .m_dat_i(wb_dat_o), .m_sel(wb_sel), .m_ack(wb_ack), .m_dat_o(wb_dat_i),
    .bus_err,
    .s_cyc, .s_stb, .s_we, .s_adr, .s_dat_o, .s_sel, .s_ack, .s_dat_i,
    .irq_in({ext_irq, uart_irq}), .irq(meip), .irq_id);

  // main memory, outside
  assign mem_cyc    = s_cyc[0];
  assign mem_stb    = s_stb[0];
  assign mem_we     = s_we;
  assign mem_adr    = s_adr[0];
  assign mem_dat_o  = s_dat_o;
  assign mem_sel    = s_sel;
  assign s_ack[0]   = mem_ack;
  assign s_dat_i[0] = mem_dat_i;

  mtimer u_mtimer (
    .clk, .rst, .wb_cyc(s_cyc[1]), .wb_stb(s_stb[1]), .wb_we(s_we), .wb_adr(s_adr[1]),
    .wb_dat_i(s_dat_o), .wb_sel(s_sel), .wb_ack(s_ack[1]), .wb_dat_o(s_dat_i[1]),
    .irq(mtip));

  uart u_uart (
    .clk, .rst, .wb_cyc(s_cyc[2]), .wb_stb(s_stb[2]), .wb_we(s_we), .wb_adr(s_adr[2]),
    .wb_dat_i(s_dat_o), .wb_sel(s_sel), .wb_ack(s_ack[2]), .wb_dat_o(s_dat_i[2]),
    .tx(uart_tx), .rx(uart_rx), .irq(uart_irq));

  gpio #(.IN_W(GPIO_IN), .OUT_W(GPIO_OUT)) u_gpio (
    .clk, .rst, .wb_cyc(s_cyc[3]), .wb_stb(s_stb[3]), .wb_we(s_we), .wb_adr(s_adr[3]),
    .wb_dat_i(s_dat_o), .wb_sel(s_sel), .wb_ack(s_ack[3]), .wb_dat_o(s_dat_i[3]),
    .gpio_in, .gpio_out);

endmodule
