// tb_memu: checks the memory unit with two cores and a small cache (4 banks,
// 8 sets, 4 ways) in front of the behavioural main memory.
//
// Per core one process issues random LSU loads and stores (byte selects
// included) to words that only this core uses, spread over far more lines
// than the cache holds, so misses, dirty write-backs and refills happen all
// the time; a second process per core fetches through the IFU port from a
// read-only region.  Every load is compared with a reference copy.  Some
// accesses go to an address outside main memory and must bypass the cache.
// A directed phase measures the read-hit latency: 5 cycles from `rd` to
// `ack` (buffer, grant, tag read, compare, bank read).  The fetch processes pause
// between fetches, as a core does, so the lower-priority write port is served.
// At the end the cache
// is written back by forcing evictions and main memory must match the
// reference.  Last, a load and a store to an address the bus rejects
// (0x7xxx_xxxx, answered with ERR by the testbench) must come back with the
// port's error flag; no other access may have it.
module tb_memu;
  import pn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int C = 2;
  logic rst, cache_en;
  logic        lsu_rd [C], ifu_rd [C], lsu_wr [C];
  logic [31:0] lsu_rd_adr [C], ifu_rd_adr [C], lsu_wr_adr [C], lsu_wr_data [C];
  logic        lsu_rd_ack [C], ifu_rd_ack [C], lsu_wr_ack [C];
  logic        lsu_rd_err [C], ifu_rd_err [C], lsu_wr_err [C];
  logic [31:0] lsu_rd_data [C], ifu_rd_data [C];
  logic [3:0]  lsu_wr_bsel [C];
  logic cyc, stb, we, ack, berr, bad;
  logic [31:0] adr, dat_o, dat_i;
  logic [3:0] sel;
  int checks = 0, failures = 0;

  memu #(.CORES(C), .BANKS_LD(2), .SETS_LD(3), .WAYS_LD(2)) dut (
    .clk, .rst, .cache_en,
    .lsu_rd, .lsu_rd_adr, .lsu_rd_ack, .lsu_rd_err, .lsu_rd_data,
    .ifu_rd, .ifu_rd_adr, .ifu_rd_ack, .ifu_rd_err, .ifu_rd_data,
    .lsu_wr, .lsu_wr_adr, .lsu_wr_data, .lsu_wr_bsel, .lsu_wr_ack, .lsu_wr_err,
    .wb_cyc(cyc), .wb_stb(stb), .wb_we(we), .wb_adr(adr), .wb_dat_o(dat_o),
    .wb_sel(sel), .wb_ack(ack), .wb_err(berr), .wb_dat_i(dat_i));
  assign bad  = adr[31:28] == 4'h7;
  assign berr = stb && bad;
  wb_mem_model #(.WORDS(4096), .LAT(3)) u_mem (.clk, .rst, .cyc, .stb(stb && !bad), .we, .adr,
    .dat_i(dat_o), .sel, .ack, .dat_o(dat_i));

  logic [31:0] ref_mem [4096];
  localparam int RO_BASE = 1024;     // read-only region for instruction fetches
  localparam int UC_IDX  = 3000;     // word reached through a non-memory address

  function automatic logic [31:0] mem_adr(int idx);
    return MEM_BASE + 32'(idx * 4);
  endfunction

  int n_err = 0;
  always @(posedge clk)
    for (int c = 0; c < C; c++)
      if ((lsu_rd_ack[c] && lsu_rd_err[c]) || (ifu_rd_ack[c] && ifu_rd_err[c]) ||
          (lsu_wr_ack[c] && lsu_wr_err[c])) n_err++;

  task automatic lsu_load(int c, logic [31:0] a, output logic [31:0] d);
    @(negedge clk); lsu_rd[c] = 1; lsu_rd_adr[c] = a;
    do @(posedge clk); while (!lsu_rd_ack[c]);
    #1 d = lsu_rd_data[c];
    @(negedge clk); lsu_rd[c] = 0;
  endtask

  task automatic lsu_store(int c, logic [31:0] a, logic [31:0] d, logic [3:0] b);
    @(negedge clk); lsu_wr[c] = 1; lsu_wr_adr[c] = a; lsu_wr_data[c] = d; lsu_wr_bsel[c] = b;
    do @(posedge clk); while (!lsu_wr_ack[c]);
    @(negedge clk); lsu_wr[c] = 0;
  endtask

  task automatic core_lsu(int c, int n);
    for (int i = 0; i < n; i++) begin
      int idx;
      logic [31:0] d;
      idx = 2 * ($urandom % 256) + c;            // 256 words per core: 64 lines
      if ($urandom % 10 == 0) idx = UC_IDX + c;  // direct access
      if ($urandom % 2) begin
        logic [31:0] v;
        logic [3:0] b;
        v = $urandom; b = 4'($urandom);
        lsu_store(c, idx >= UC_IDX ? 32'h2000_0000 + 32'(idx * 4) : mem_adr(idx), v, b);
        for (int k = 0; k < 4; k++) if (b[k]) ref_mem[idx][8*k +: 8] = v[8*k +: 8];
      end else begin
        lsu_load(c, idx >= UC_IDX ? 32'h2000_0000 + 32'(idx * 4) : mem_adr(idx), d);
        checks++;
        if (d !== ref_mem[idx]) begin
          failures++; $display("core %0d load %0d: %h vs %h", c, idx, d, ref_mem[idx]);
        end
      end
    end
  endtask

  bit ifu_stop;
  task automatic core_ifu(int c);
    while (!ifu_stop) begin
      int idx;
      idx = RO_BASE + ($urandom % 128);
      @(negedge clk); ifu_rd[c] = 1; ifu_rd_adr[c] = mem_adr(idx);
      do @(posedge clk); while (!ifu_rd_ack[c]);
      #1;
      checks++;
      if (ifu_rd_data[c] !== ref_mem[idx]) begin failures++; $display("ifu %0d", idx); end
      @(negedge clk); ifu_rd[c] = 0;
      // a core fetches again only after it has used the word
      repeat (2 + $urandom % 6) @(negedge clk);
    end
  endtask

  initial begin
    rst = 1; cache_en = 1; ifu_stop = 0;
    for (int c = 0; c < C; c++) begin
      lsu_rd[c] = 0; ifu_rd[c] = 0; lsu_wr[c] = 0; lsu_rd_adr[c] = 0; ifu_rd_adr[c] = 0;
      lsu_wr_adr[c] = 0; lsu_wr_data[c] = 0; lsu_wr_bsel[c] = 0;
    end
    for (int i = 0; i < 4096; i++) begin ref_mem[i] = $urandom; u_mem.mem[i] = ref_mem[i]; end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    wait (dut.tag_ready);
    repeat (2) @(posedge clk);
    // directed: read-hit latency
    begin
      logic [31:0] d;
      int lat;
      lsu_load(0, mem_adr(0), d);          // miss, fills the line
      @(negedge clk); lsu_rd[0] = 1; lsu_rd_adr[0] = mem_adr(2);
      lat = 0;
      do begin @(posedge clk); lat++; end while (!lsu_rd_ack[0]);
      #1;
      checks += 2;
      // sampled at the 6th edge: ack rose 5 cycles after rd
      if (lat != 6) begin failures++; $display("hit latency %0d", lat); end
      if (lsu_rd_data[0] !== ref_mem[2]) failures++;
      @(negedge clk); lsu_rd[0] = 0;
    end
    fork
      begin
        fork
          core_lsu(0, 1500);
          core_lsu(1, 1500);
        join
        ifu_stop = 1;
      end
      core_ifu(0);
      core_ifu(1);
    join
    // evict everything: 32 untouched lines, four per set
    for (int i = 0; i < 32; i++) begin
      logic [31:0] d;
      lsu_load(0, mem_adr(2048 + 4 * i), d);
    end
    for (int i = 0; i < 512; i++) begin
      checks++;
      if (u_mem.mem[i] !== ref_mem[i]) begin failures++; $display("memory word %0d", i); end
    end
    checks++;
    if (n_err != 0) begin failures++; $display("unexpected error flags"); end
    begin
      logic [31:0] d;
      lsu_load(1, 32'h7000_0010, d);
      checks++;
      if (n_err != 1) begin failures++; $display("no load error"); end
      lsu_store(0, 32'h7000_0020, 32'h1234_5678, 4'hF);
      checks++;
      if (n_err != 2) begin failures++; $display("error flags %0d, expected 2", n_err); end
    end
    checks += 3;
    if (dut.n_writeback == 0) begin failures++; $display("no write-back"); end
    if (dut.n_direct == 0) begin failures++; $display("no direct access"); end
    if (dut.n_hit == 0 || dut.n_miss == 0) failures++;
    $display("hits %0d misses %0d write-backs %0d direct %0d", dut.n_hit, dut.n_miss,
             dut.n_writeback, dut.n_direct);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
