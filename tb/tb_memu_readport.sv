// tb_memu_readport: checks the read port handshake: a held `rd` becomes one
// buffered request with the right address, the word served by the memory
// unit comes back with a one-cycle `ack` in the next cycle (with the
// error flag passed along), and no second
// request is made while the requester drops `rd` after `ack`.
module tb_memu_readport;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, rd, ack, req, srv_ack, err, srv_err, e;
  logic [31:0] adr, data, req_adr, srv_data;
  int checks = 0, failures = 0;

  memu_readport dut (.clk, .rst, .rd, .adr, .ack, .data, .req, .req_adr, .srv_ack, .srv_data, .err, .srv_err);

  int n_req_rise;
  logic req_q;
  always @(posedge clk) begin
    req_q <= req;
    if (req && !req_q) n_req_rise++;
  end

  initial begin
    rst = 1; rd = 0; adr = 0; srv_ack = 0; srv_err = 0; srv_data = 0; n_req_rise = 0; req_q = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 50; n++) begin
      logic [31:0] a, d;
      int wait_cyc, lat;
      a = $urandom; d = $urandom; wait_cyc = $urandom % 5;
      @(negedge clk); rd = 1; adr = a;
      @(posedge clk); #1;
      checks += 2;
      if (!req) begin failures++; $display("no req"); end
      if (req_adr !== a) begin failures++; $display("adr"); end
      repeat (wait_cyc) @(negedge clk);
      @(negedge clk); e = 1'($urandom); srv_ack = 1; srv_err = e; srv_data = d;
      @(negedge clk); srv_ack = 0; srv_err = 0; srv_data = 0;
      checks += 4;
      if (err !== e) begin failures++; $display("err"); end
      if (!ack) begin failures++; $display("no ack"); end
      if (data !== d) begin failures++; $display("data"); end
      if (req) begin failures++; $display("req stays"); end
      rd = 0;
      @(negedge clk);
      checks++;
      if (ack || req) begin failures++; $display("extra"); end
    end
    checks++;
    if (n_req_rise != 50) begin failures++; $display("requests %0d", n_req_rise); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
