// tb_pn_interconnect: checks address decoding, offset removal, data return,
// the error answer for unmapped addresses, and interrupt priority.  Four
// slaves are modelled in the testbench; each answers with a value built from
// its number and the address it received.
module tb_pn_interconnect;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, m_cyc, m_stb, m_we, m_ack, bus_err, s_we, irq;
  logic [31:0] m_adr, m_dat_i, m_dat_o, s_dat_o;
  logic [3:0] m_sel, s_sel, s_cyc, s_stb, s_ack;
  logic [31:0] s_adr [4];
  logic [31:0] s_dat_i [4];
  logic [2:0] irq_in;
  logic [1:0] irq_id;
  int checks = 0, failures = 0;

  pn_interconnect #(.NIRQ(3)) dut (.clk, .rst, .m_cyc, .m_stb, .m_we, .m_adr, .m_dat_i, .m_sel,
    .m_ack, .m_dat_o, .bus_err, .s_cyc, .s_stb, .s_we, .s_adr, .s_dat_o, .s_sel, .s_ack,
    .s_dat_i, .irq_in, .irq, .irq_id);

  // slave models: ack one cycle after stb, data = {slave number, received address}
  for (genvar i = 0; i < 4; i++) begin : g_slv
    always_ff @(posedge clk) begin
      s_ack[i]   <= s_stb[i] && !s_ack[i];
      s_dat_i[i] <= {4'(i), s_adr[i][27:0]};
    end
  end

  task automatic access(logic [31:0] a, int exp_slave, logic [31:0] exp_adr);
    int n;
    @(negedge clk); m_cyc = 1; m_stb = 1; m_adr = a; m_we = 0;
    #1;
    checks++;
    if (exp_slave >= 0 && s_stb !== 4'(1 << exp_slave)) begin failures++; $display("stb %b for %h", s_stb, a); end
    if (exp_slave < 0 && s_stb !== 0) begin failures++; $display("stb for unmapped"); end
    n = 0;
    do begin @(posedge clk); #1; n++; end while (!m_ack && !bus_err && n < 10);
    checks++;
    if (exp_slave >= 0) begin
      if (m_dat_o !== {4'(exp_slave), exp_adr[27:0]}) begin failures++; $display("data %h for %h", m_dat_o, a); end
    end else if (!bus_err || m_ack) begin failures++; $display("no error answer"); end
    @(negedge clk); m_cyc = 0; m_stb = 0;
    @(negedge clk);
  endtask

  initial begin
    rst = 1; m_cyc = 0; m_stb = 0; m_we = 0; m_adr = 0; m_dat_i = 0; m_sel = 0; irq_in = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    access(32'h1000_0040, 0, 32'h1000_0040);       // memory keeps the full address
    access(32'h1ABC_0004, 0, 32'h1ABC_0004);
    access(32'h5000_0008, 1, 32'h0000_0008);       // timer, offset removed
    access(32'h5001_000C, 2, 32'h0000_000C);
    access(32'h5002_0004, 3, 32'h0000_0004);
    access(32'h7000_0000, -1, 0);                  // unmapped
    for (int n = 0; n < 8; n++) begin
      irq_in = 3'(n);
      #1;
      checks += 2;
      if (irq !== (n != 0)) failures++;
      if (n != 0 && irq_id !== (n[0] ? 2'd0 : n[1] ? 2'd1 : 2'd2)) begin failures++; $display("irq_id %0d for %b", irq_id, irq_in); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
