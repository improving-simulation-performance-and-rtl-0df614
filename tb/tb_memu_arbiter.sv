// tb_memu_arbiter: checks the grant rule of the memory unit arbiter against a
// reference model: within a core LSU read before IFU read before write;
// between cores round-robin, starting after the core served last; nothing is
// granted while the memory unit is busy.
module tb_memu_arbiter;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, free, take, gnt;
  logic [3:0] req_lsu_rd, req_ifu_rd, req_wr;
  logic [1:0] gnt_core, gnt_kind;
  int checks = 0, failures = 0;

  memu_arbiter #(.CORES(4)) dut (.clk, .rst, .req_lsu_rd, .req_ifu_rd, .req_wr,
                                 .free, .take, .gnt, .gnt_core, .gnt_kind);

  int start;
  initial begin
    rst = 1; free = 0; take = 0; req_lsu_rd = 0; req_ifu_rd = 0; req_wr = 0;
    start = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    for (int n = 0; n < 500; n++) begin
      logic eg;
      int ec, ek;
      @(negedge clk);
      req_lsu_rd = 4'($urandom); req_ifu_rd = 4'($urandom); req_wr = 4'($urandom);
      if (n % 3 == 0) begin req_lsu_rd = 0; end
      free = ($urandom % 4 != 0); take = free;
      eg = 0; ec = 0; ek = 0;
      for (int i = 0; i < 4 && !eg; i++) begin
        int c;
        c = (start + i) % 4;
        if (free && (req_lsu_rd[c] || req_ifu_rd[c] || req_wr[c])) begin
          eg = 1; ec = c;
          ek = req_lsu_rd[c] ? 0 : req_ifu_rd[c] ? 1 : 2;
        end
      end
      #1;
      checks++;
      if (gnt !== eg || (eg && (gnt_core !== 2'(ec) || gnt_kind !== 2'(ek)))) begin
        failures++;
        $display("n=%0d gnt %b/%0d/%0d expected %b/%0d/%0d", n, gnt, gnt_core, gnt_kind, eg, ec, ek);
      end
      if (eg) start = (ec + 1) % 4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
