// tb_memu_tagram: checks the tag/LRU memory at its default size (512 sets,
// 4 ways, 19-bit tags): the sweep after reset leaves every way invalid and
// takes one cycle per set, single-way writes show up in whole-set reads next
// cycle without disturbing the other ways, and LRU words are stored per set.
module tb_memu_tagram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic        rst, ready;
  logic [8:0]  rd_set, wr_set;
  logic [3:0]  rd_valid, rd_dirty;
  logic [75:0] rd_tag;
  logic [5:0]  rd_lru, wr_lru;
  logic        wr_tag_en, wr_valid, wr_dirty, wr_lru_en;
  logic [1:0]  wr_way;
  logic [18:0] wr_tag;
  int checks = 0, failures = 0;

  memu_tagram dut (.clk, .rst, .ready, .rd_set, .rd_valid, .rd_dirty, .rd_tag, .rd_lru,
                   .wr_tag_en, .wr_set, .wr_way, .wr_valid, .wr_dirty, .wr_tag,
                   .wr_lru_en, .wr_lru);

  logic [20:0] ref_ent [512][4];
  logic [5:0]  ref_lru [512];

  task automatic check_set(logic [8:0] s);
    @(negedge clk); rd_set = s; wr_tag_en = 0; wr_lru_en = 0;
    @(posedge clk); #1;
    for (int w = 0; w < 4; w++) begin
      checks++;
      if ({rd_valid[w], rd_dirty[w], rd_tag[19*w +: 19]} !== ref_ent[s][w]) begin
        failures++; $display("set %0d way %0d", s, w);
      end
    end
    checks++;
    if (rd_lru !== ref_lru[s]) begin failures++; $display("lru set %0d", s); end
  endtask

  initial begin
    int cyc;
    rst = 1; rd_set = 0; wr_set = 0; wr_tag_en = 0; wr_lru_en = 0; wr_way = 0;
    wr_valid = 0; wr_dirty = 0; wr_tag = 0; wr_lru = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    cyc = 0;
    while (!ready) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != 512) begin failures++; $display("sweep took %0d cycles", cyc); end
    for (int s = 0; s < 512; s++) begin
      ref_lru[s] = 0;
      for (int w = 0; w < 4; w++) ref_ent[s][w] = 0;
    end
    for (int n = 0; n < 20; n++) check_set(9'($urandom));
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      wr_set = 9'($urandom % 16); wr_way = 2'($urandom);
      wr_valid = 1'($urandom); wr_dirty = 1'($urandom); wr_tag = 19'($urandom);
      wr_tag_en = 1; wr_lru_en = ($urandom % 3 == 0); wr_lru = 6'($urandom);
      ref_ent[wr_set][wr_way] = {wr_valid, wr_dirty, wr_tag};
      if (wr_lru_en) ref_lru[wr_set] = wr_lru;
      if (n % 4 == 0) check_set(9'($urandom % 16));
    end
    for (int s = 0; s < 16; s++) check_set(9'(s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
