// tb_memu_bankram: checks a cache bank at its default depth (2048 words):
// byte-enabled writes on both ports, reads on both ports one cycle later,
// against a reference array.
module tb_memu_bankram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        a_en, b_en;
  logic [3:0]  a_we, b_we;
  logic [10:0] a_addr, b_addr;
  logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;

  memu_bankram dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
                    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  logic [31:0] ref_mem [2048];

  initial begin
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 4'hF; a_addr = 11'(i); a_wdata = $urandom; ref_mem[i] = a_wdata;
    end
    for (int n = 0; n < 400; n++) begin
      logic [10:0] ra, rb;
      @(negedge clk);
      ra = 11'($urandom); rb = 11'($urandom);
      if (rb == ra) rb = rb + 1;
      a_en = 1; a_addr = ra; a_we = 4'($urandom); a_wdata = $urandom;
      b_en = 1; b_addr = rb; b_we = 0;
      @(posedge clk); #1;
      checks += 2;
      if (a_rdata !== ref_mem[ra]) begin failures++; $display("A %0d", ra); end
      if (b_rdata !== ref_mem[rb]) begin failures++; $display("B %0d", rb); end
      for (int k = 0; k < 4; k++) if (a_we[k]) ref_mem[ra][8*k +: 8] = a_wdata[8*k +: 8];
    end
    // port B writes, port A reads back
    for (int n = 0; n < 100; n++) begin
      logic [10:0] rb;
      @(negedge clk);
      rb = 11'($urandom);
      a_en = 0; b_en = 1; b_addr = rb; b_we = 4'b0101; b_wdata = $urandom;
      for (int k = 0; k < 4; k++) if (b_we[k]) ref_mem[rb][8*k +: 8] = b_wdata[8*k +: 8];
      @(negedge clk);
      b_en = 0; a_en = 1; a_we = 0; a_addr = rb;
      @(posedge clk); #1;
      checks++;
      if (a_rdata !== ref_mem[rb]) begin failures++; $display("B->A %0d", rb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
