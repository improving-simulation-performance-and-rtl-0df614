// tb_ifu: drives the instruction fetch unit with random fetch requests,
// including fetches that arrive while a read is still running, against a
// read-port model with random latency that returns a word derived from its
// address.  After each fetch it waits for `valid` and checks that the buffer
// holds the word of the last requested PC.  Also checks that refetching the
// buffered PC costs no memory read and that a fetch takes latency + 1 cycles, and that a read
// ending in a bus error marks the buffered word with `insn_err`.
module tb_ifu;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst, fetch, valid, rp_rd, rp_ack, insn_err, rp_err;
  logic [31:0] pc, insn, insn_pc, rp_adr, rp_data;
  int checks = 0, failures = 0, reads = 0;
  int lat_cfg = 3;

  ifu dut (.clk, .rst, .fetch, .pc, .valid, .insn, .insn_pc, .insn_err, .rp_rd, .rp_adr, .rp_ack,
           .rp_data, .rp_err);

  function automatic logic [31:0] word(logic [31:0] a);
    return a ^ 32'hA5A5_0000;
  endfunction

  // read-port model: answers after lat_cfg cycles (or a random time)
  int cnt = 0;
  always_ff @(posedge clk) begin
    rp_ack <= 1'b0;
    if (rst) cnt <= 0;
    else if (rp_rd && !rp_ack) begin
      if (cnt >= lat_cfg) begin
        rp_ack  <= 1'b1;
        rp_data <= word(rp_adr);
        rp_err  <= rp_adr[31:28] == 4'h7;
        cnt     <= 0;
        reads   <= reads + 1;
      end else cnt <= cnt + 1;
    end
  end

  initial begin
    rst = 1; fetch = 0; pc = 0;
    repeat (2) @(posedge clk);
    @(negedge clk); rst = 0;
    // timed single fetch
    begin
      int n;
      @(negedge clk); fetch = 1; pc = 32'h1000_0000;
      @(negedge clk); fetch = 0; n = 1;
      while (!valid) begin @(negedge clk); n++; end
      checks += 2;
      // request registered 1 cycle after fetch, memory answers after
      // lat_cfg + 1 cycles, buffer is written 1 cycle later
      if (n != lat_cfg + 3) begin failures++; $display("fetch took %0d", n); end
      if (insn !== word(32'h1000_0000)) failures++;
    end
    // refetch of the buffered word: no read
    begin
      int r0;
      r0 = reads;
      @(negedge clk); fetch = 1;
      @(negedge clk); fetch = 0;
      repeat (10) @(negedge clk);
      checks += 2;
      if (reads != r0) begin failures++; $display("refetch read memory"); end
      if (!valid || insn_pc !== 32'h1000_0000) failures++;
    end
    // random fetch streams with overtaking fetches
    for (int n = 0; n < 300; n++) begin
      logic [31:0] last;
      int k;
      lat_cfg = $urandom_range(0, 6);
      k = $urandom_range(1, 3);
      for (int j = 0; j < k; j++) begin
        @(negedge clk); fetch = 1; pc = 32'h1000_0000 + 4 * $urandom_range(0, 255); last = pc;
        @(negedge clk); fetch = 0;
        repeat ($urandom_range(0, 4)) @(negedge clk);
      end
      while (!(valid && insn_pc == last)) @(negedge clk);
      checks++;
      checks++;
      if (insn_err) begin failures++; $display("insn_err set"); end
      if (insn !== word(last)) begin failures++; $display("insn %h for pc %h", insn, last); end
    end
    // fetch from an address whose read fails
    @(negedge clk); fetch = 1; pc = 32'h7000_0000;
    @(negedge clk); fetch = 0;
    while (!(valid && insn_pc == 32'h7000_0000)) @(negedge clk);
    checks++;
    if (!insn_err) begin failures++; $display("no insn_err"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
