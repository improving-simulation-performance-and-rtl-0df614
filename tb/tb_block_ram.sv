// tb_block_ram: checks the simple dual-port RAM against a reference array:
// random writes and reads, one-cycle read latency, and read-first behaviour
// when a read and a write hit the same address in the same cycle.
module tb_block_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        we;
  logic [5:0]  waddr, raddr;
  logic [15:0] wdata, rdata;
  int checks = 0, failures = 0;

  block_ram #(.WIDTH(16), .DEPTH(64)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  logic [15:0] ref_mem [64];

  initial begin
    we = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill
    for (int i = 0; i < 64; i++) begin
      @(negedge clk); we = 1; waddr = 6'(i); wdata = 16'($urandom); ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    // random reads: data one cycle after the address
    for (int n = 0; n < 200; n++) begin
      logic [5:0] a;
      a = 6'($urandom);
      @(negedge clk); raddr = a;
      if ($urandom % 2) begin we = 1; waddr = 6'($urandom); wdata = 16'($urandom); end
      else we = 0;
      @(posedge clk); #1;
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++; $display("read %0d: %h vs %h", a, rdata, ref_mem[a]);
      end
      if (we) ref_mem[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
