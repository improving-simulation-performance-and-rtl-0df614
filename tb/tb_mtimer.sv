// tb_mtimer: checks that mtime counts one per cycle, that both registers can
// be written and read in 32-bit halves with byte selects, and that the
// interrupt rises exactly when mtime reaches mtimecmp and falls when
// mtimecmp is moved beyond it.
module tb_mtimer;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, cyc, stb, we, ack, irq;
  logic [31:0] adr, dat_i, dat_o;
  logic [3:0] sel;
  int checks = 0, failures = 0;

  mtimer dut (.clk, .rst, .wb_cyc(cyc), .wb_stb(stb), .wb_we(we), .wb_adr(adr),
              .wb_dat_i(dat_i), .wb_sel(sel), .wb_ack(ack), .wb_dat_o(dat_o), .irq);

  task automatic wr(logic [3:0] a, logic [31:0] d, logic [3:0] s = 4'hF);
    @(negedge clk); cyc = 1; stb = 1; we = 1; adr = {28'd0, a}; dat_i = d; sel = s;
    do @(posedge clk); while (!ack);
    @(negedge clk); cyc = 0; stb = 0; we = 0;
  endtask
  task automatic rd(logic [3:0] a, output logic [31:0] d);
    @(negedge clk); cyc = 1; stb = 1; we = 0; adr = {28'd0, a};
    do @(posedge clk); while (!ack);
    #1 d = dat_o;
    @(negedge clk); cyc = 0; stb = 0;
  endtask

  initial begin
    logic [31:0] t0, t1, d;
    rst = 1; cyc = 0; stb = 0; we = 0; adr = 0; dat_i = 0; sel = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    checks++;
    if (irq) begin failures++; $display("irq after reset"); end
    rd(4'h0, t0);
    repeat (10) @(negedge clk);
    rd(4'h0, t1);
    checks++;
    if (t1 - t0 != 13) begin failures++; $display("mtime advanced %0d", t1 - t0); end
    wr(4'h4, 32'h0000_0001);
    rd(4'h4, d);
    checks++;
    if (d !== 32'h1) failures++;
    wr(4'h4, 32'h0);
    wr(4'hC, 32'h0);
    wr(4'h8, 32'hAABB_CCDD);
    wr(4'h8, 32'h0000_1100, 4'b0010);     // byte select: only byte 1
    rd(4'h8, d);
    checks++;
    if (d !== 32'hAABB_11DD) begin failures++; $display("mtimecmp %h", d); end
    // interrupt at a known time
    wr(4'h0, 32'd0);
    wr(4'h8, 32'd100);
    begin
      int n;
      n = 0;
      while (!irq) begin @(posedge clk); #1; n++; end
      rd(4'h0, d);
      checks++;
      if (d < 100 || d > 106) begin failures++; $display("irq at mtime %0d", d); end
    end
    wr(4'h8, 32'hFFFF_FFF0);
    #1;
    checks++;
    if (irq) begin failures++; $display("irq stays"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
