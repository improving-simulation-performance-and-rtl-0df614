// pn_interconnect: Wishbone router and interrupt collector of a ParaNut system.
//
// One Wishbone master (the memory unit) reaches NSLV slaves.  Slave i owns the
// addresses with (adr & MASK[i]) == BASE[i].  The decoder forwards CYC/STB
// only to the addressed slave and returns that slave's ACK and data.  Slaves
// whose TRANSLATE bit is set see the address with its region offset removed
// (adr & ~MASK[i]), so a peripheral can decode its registers from zero; main
// memory keeps the full address.  An access that hits no slave is ended in
// the next cycle with the Wishbone error signal `bus_err` (instead of ACK)
// and zero data, so a wrong address cannot hang the bus; the memory unit
// turns it into an access-fault exception of the core that asked.
//
// Interrupts: NIRQ peripheral lines are collected into one request for the
// CePU.  When several are active the lowest line number wins and is reported
// in `irq_id`.
//
// Address decoding, offset removal and interrupt prioritisation are the
// tasks the ParaNut gives its interconnect; the priority rule (lowest line
// first) and the error answer are this design's own choices.
module pn_interconnect #(
  parameter int unsigned NSLV = 4,
  parameter logic [NSLV*32-1:0] BASE      = {32'h5002_0000, 32'h5001_0000,
                                             32'h5000_0000, 32'h1000_0000},
  parameter logic [NSLV*32-1:0] MASK      = {32'hFFFF_0000, 32'hFFFF_0000,
                                             32'hFFFF_0000, 32'hF000_0000},
  parameter logic [NSLV-1:0]    TRANSLATE = 4'b1110,
  parameter int unsigned NIRQ = 2
) (
  input  logic        clk,
  input  logic        rst,
  // from the master
  input  logic        m_cyc,
  input  logic        m_stb,
  input  logic        m_we,
  input  logic [31:0] m_adr,
  input  logic [31:0] m_dat_i,
  input  logic [3:0]  m_sel,
  output logic        m_ack,
  output logic [31:0] m_dat_o,
  output logic        bus_err,
  // to the slaves
  output logic [NSLV-1:0] s_cyc,
  output logic [NSLV-1:0] s_stb,
  output logic            s_we,
  output logic [31:0]     s_adr [NSLV],
  output logic [31:0]     s_dat_o,
  output logic [3:0]      s_sel,
  input  logic [NSLV-1:0] s_ack,
  input  logic [31:0]     s_dat_i [NSLV],
  // interrupts
  input  logic [NIRQ-1:0] irq_in,
  output logic            irq,
  output logic [$clog2(NIRQ+1)-1:0] irq_id
);

  logic [NSLV-1:0] hit;
  logic            err_ack;

  always_comb begin
    for (int i = 0; i < NSLV; i++) begin
      hit[i]   = (m_adr & MASK[32*i +: 32]) == BASE[32*i +: 32];
      s_adr[i] = TRANSLATE[i] ? (m_adr & ~MASK[32*i +: 32]) : m_adr;
      s_cyc[i] = m_cyc && hit[i];
      s_stb[i] = m_stb && hit[i];
    end
    s_we    = m_we;
    s_dat_o = m_dat_i;
    s_sel   = m_sel;
    m_ack   = 1'b0;
    m_dat_o = '0;
    for (int i = 0; i < NSLV; i++)
      if (hit[i]) begin
        m_ack   = s_ack[i];
        m_dat_o = s_dat_i[i];
      end
  end

  // unmapped access: answer in the next cycle
  always_ff @(posedge clk) begin
    if (rst) err_ack <= 1'b0;
    else     err_ack <= m_cyc && m_stb && (hit == '0) && !err_ack;
  end
  assign bus_err = err_ack;

  always_comb begin
    irq    = |irq_in;
    irq_id = '0;
    for (int i = NIRQ - 1; i >= 0; i--)
      if (irq_in[i]) irq_id = ($clog2(NIRQ+1))'(i);
  end

  // the regions of the slaves must not overlap
  assert property (@(posedge clk) disable iff (rst) m_stb |-> $onehot0(hit));

endmodule
