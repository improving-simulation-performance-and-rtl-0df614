// tb_gpio: checks the GPIO registers: outputs written through Wishbone appear
// on the pins and read back, inputs are read after the two-flop synchroniser,
// and byte selects are honoured.
module tb_gpio;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, cyc, stb, we, ack;
  logic [31:0] adr, dat_i, dat_o;
  logic [3:0] sel;
  logic [15:0] gpio_in, gpio_out;
  int checks = 0, failures = 0;

  gpio #(.IN_W(16), .OUT_W(16)) dut (.clk, .rst, .wb_cyc(cyc), .wb_stb(stb), .wb_we(we),
    .wb_adr(adr), .wb_dat_i(dat_i), .wb_sel(sel), .wb_ack(ack), .wb_dat_o(dat_o),
    .gpio_in, .gpio_out);

  task automatic xfer(logic w, logic [3:0] a, logic [31:0] d, logic [3:0] s, output logic [31:0] q);
    @(negedge clk); cyc = 1; stb = 1; we = w; adr = {28'd0, a}; dat_i = d; sel = s;
    do @(posedge clk); while (!ack);
    #1 q = dat_o;
    @(negedge clk); cyc = 0; stb = 0; we = 0;
  endtask

  initial begin
    logic [31:0] q;
    logic [15:0] ref_out;
    rst = 1; cyc = 0; stb = 0; we = 0; adr = 0; dat_i = 0; sel = 0; gpio_in = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    ref_out = 0;
    checks++;
    if (gpio_out !== 0) failures++;
    for (int n = 0; n < 40; n++) begin
      logic [31:0] d;
      logic [3:0] s;
      d = $urandom; s = 4'($urandom);
      xfer(1, 4'h4, d, s, q);
      if (s[0]) ref_out[7:0] = d[7:0];
      if (s[1]) ref_out[15:8] = d[15:8];
      checks++;
      if (gpio_out !== ref_out) begin failures++; $display("out %h vs %h", gpio_out, ref_out); end
      xfer(0, 4'h4, 0, 0, q);
      checks++;
      if (q[15:0] !== ref_out) failures++;
      gpio_in = 16'($urandom);
      repeat (3) @(negedge clk);
      xfer(0, 4'h0, 0, 0, q);
      checks++;
      if (q[15:0] !== gpio_in) begin failures++; $display("in %h vs %h", q, gpio_in); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
