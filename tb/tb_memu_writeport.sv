// tb_memu_writeport: checks the write port handshake: a held `wr` becomes one
// buffered request carrying address, data and byte selects, and `ack` pulses
// for one cycle after the memory unit reports the write done, with the
// error flag passed along.
module tb_memu_writeport;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, wr, ack, req, srv_ack, err, srv_err, e;
  logic [31:0] adr, wdata, req_adr, req_data;
  logic [3:0]  bsel, req_bsel;
  int checks = 0, failures = 0;

  memu_writeport dut (.clk, .rst, .wr, .adr, .wdata, .bsel, .ack, .req, .req_adr,
                      .req_data, .req_bsel, .srv_ack, .err, .srv_err);

  initial begin
    rst = 1; wr = 0; adr = 0; wdata = 0; bsel = 0; srv_ack = 0; srv_err = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 50; n++) begin
      logic [31:0] a, d;
      logic [3:0] b;
      a = $urandom; d = $urandom; b = 4'($urandom);
      @(negedge clk); wr = 1; adr = a; wdata = d; bsel = b;
      @(posedge clk); #1;
      checks += 4;
      if (!req) begin failures++; $display("no req"); end
      if (req_adr !== a) failures++;
      if (req_data !== d) failures++;
      if (req_bsel !== b) failures++;
      repeat ($urandom % 4) @(negedge clk);
      @(negedge clk); e = 1'($urandom); srv_ack = 1; srv_err = e;
      checks++;
      if (ack) failures++;        // not before the write is done
      @(negedge clk); srv_ack = 0; srv_err = 0;
      checks += 3;
      if (err !== e) begin failures++; $display("err"); end
      if (!ack) begin failures++; $display("no ack"); end
      if (req) failures++;
      wr = 0;
      @(negedge clk);
      checks++;
      if (ack || req) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
