// tb_uart: checks the UART with its transmitter looped back to its receiver:
// each byte written to TX comes back in RX with the "received" flag and the
// interrupt set, a frame lasts 10 bit times of DIV cycles, the busy flag is
// set while sending, and reading RX clears the flag.  The line is also
// decoded independently by the testbench.
module tb_uart;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, cyc, stb, we, ack, tx, irq;
  logic [31:0] adr, dat_i, dat_o;
  logic [3:0] sel;
  int checks = 0, failures = 0;
  localparam int DIV = 8;

  uart #(.DIV_RESET(16'(DIV))) dut (.clk, .rst, .wb_cyc(cyc), .wb_stb(stb), .wb_we(we),
    .wb_adr(adr), .wb_dat_i(dat_i), .wb_sel(sel), .wb_ack(ack), .wb_dat_o(dat_o),
    .tx, .rx(tx), .irq);

  task automatic xfer(logic w, logic [3:0] a, logic [31:0] d, output logic [31:0] q);
    @(negedge clk); cyc = 1; stb = 1; we = w; adr = {28'd0, a}; dat_i = d; sel = 4'hF;
    do @(posedge clk); while (!ack);
    #1 q = dat_o;
    @(negedge clk); cyc = 0; stb = 0; we = 0;
  endtask

  // independent line decoder
  logic [7:0] line_byte;
  int frame_cycles;
  initial begin
    forever begin
      @(negedge tx);
      repeat (DIV + DIV / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin
        line_byte[i] = tx;
        repeat (DIV) @(posedge clk);
      end
    end
  end

  initial begin
    logic [31:0] q;
    rst = 1; cyc = 0; stb = 0; we = 0; adr = 0; dat_i = 0; sel = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 12; n++) begin
      logic [7:0] b;
      int cyc_n;
      b = 8'($urandom);
      xfer(1, 4'h0, {24'd0, b}, q);
      xfer(0, 4'h8, 0, q);
      checks++;
      if (!q[0]) begin failures++; $display("not busy"); end
      cyc_n = 0;
      while (!irq && cyc_n < 20 * DIV) begin @(posedge clk); #1; cyc_n++; end
      checks += 2;
      // frame = 10 bits; the stop bit is recognised in its middle
      if (cyc_n < 8 * DIV || cyc_n > 10 * DIV) begin failures++; $display("frame %0d cycles", cyc_n); end
      if (line_byte !== b) begin failures++; $display("line %h vs %h", line_byte, b); end
      xfer(0, 4'h4, 0, q);
      checks++;
      if (q[7:0] !== b) begin failures++; $display("rx %h vs %h", q[7:0], b); end
      xfer(0, 4'h8, 0, q);
      checks++;
      if (q[1] || irq) begin failures++; $display("flag not cleared"); end
      repeat (2 * DIV) @(negedge clk);
    end
    xfer(1, 4'hC, 32'd5, q);
    xfer(0, 4'hC, 0, q);
    checks++;
    if (q !== 32'd5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
