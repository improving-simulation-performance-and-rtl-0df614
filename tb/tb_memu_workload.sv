// tb_memu_workload: the memory-unit access patterns of the classic ParaNut
// memory benchmark, run on the memory unit at its default size (4 cores,
// 4 banks x 512 sets x 4 ways) in front of a main memory with 2 wait cycles.
//
// Single port (core 0 LSU):
//   write 2048 sequential words (cold cache), write them again, read them.
// Four ports in parallel (the LSUs of all four cores at once):
//   write adjacent words (core c takes every fourth word), read them back,
//   write to different sets and banks, all cores read the same words,
//   all cores read random words.
// For each pattern the testbench prints the clocks per operation and checks
// the data of every read against a reference memory.  It also checks what
// follows from this design's timing: 2048 words fill exactly 512 lines, so
// the cold run misses 512 times and the second run and the reads hit every
// time; a read hit is acknowledged 5 cycles after the request; with the
// requests served one at a time, four parallel ports take at least four times
// the single-port time per round.
module tb_memu_workload;
  import pn_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int C = 4;
  localparam int N = 2048;
  logic rst, cache_en;
  logic        lsu_rd [C], ifu_rd [C], lsu_wr [C];
  logic [31:0] lsu_rd_adr [C], ifu_rd_adr [C], lsu_wr_adr [C], lsu_wr_data [C];
  logic        lsu_rd_ack [C], ifu_rd_ack [C], lsu_wr_ack [C];
  logic        lsu_rd_err [C], ifu_rd_err [C], lsu_wr_err [C];
  logic [31:0] lsu_rd_data [C], ifu_rd_data [C];
  logic [3:0]  lsu_wr_bsel [C];
  logic cyc, stb, we, ack;
  logic [31:0] adr, dat_o, dat_i;
  logic [3:0] sel;
  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  memu dut (
    .clk, .rst, .cache_en,
    .lsu_rd, .lsu_rd_adr, .lsu_rd_ack, .lsu_rd_err, .lsu_rd_data,
    .ifu_rd, .ifu_rd_adr, .ifu_rd_ack, .ifu_rd_err, .ifu_rd_data,
    .lsu_wr, .lsu_wr_adr, .lsu_wr_data, .lsu_wr_bsel, .lsu_wr_ack, .lsu_wr_err,
    .wb_cyc(cyc), .wb_stb(stb), .wb_we(we), .wb_adr(adr), .wb_dat_o(dat_o),
    .wb_sel(sel), .wb_ack(ack), .wb_err(1'b0), .wb_dat_i(dat_i));
  wb_mem_model #(.WORDS(16384), .LAT(2)) u_mem (.clk, .rst, .cyc, .stb, .we, .adr,
    .dat_i(dat_o), .sel, .ack, .dat_o(dat_i));

  logic [31:0] ref_mem [16384];
  int lat_max;

  function automatic logic [31:0] wadr(int idx); return MEM_BASE + 32'(idx * 4); endfunction

  task automatic load(int c, int idx);
    longint t0;
    @(negedge clk); lsu_rd[c] = 1; lsu_rd_adr[c] = wadr(idx); t0 = cycle;
    do @(posedge clk); while (!lsu_rd_ack[c]);
    #1;
    if (int'(cycle - t0) > lat_max) lat_max = int'(cycle - t0);
    checks++;
    if (lsu_rd_data[c] !== ref_mem[idx]) begin
      failures++; $display("core %0d word %0d: %h vs %h", c, idx, lsu_rd_data[c], ref_mem[idx]);
    end
    @(negedge clk); lsu_rd[c] = 0;
  endtask
  task automatic store(int c, int idx, logic [31:0] d);
    @(negedge clk); lsu_wr[c] = 1; lsu_wr_adr[c] = wadr(idx); lsu_wr_data[c] = d; lsu_wr_bsel[c] = 4'hF;
    ref_mem[idx] = d;
    do @(posedge clk); while (!lsu_wr_ack[c]);
    @(negedge clk); lsu_wr[c] = 0;
  endtask

  // runs one pattern on `ports` cores; returns clocks per operation x 100
  typedef enum int {P_WR_SEQ, P_RD_SEQ, P_WR_ADJ, P_RD_ADJ, P_WR_SPREAD, P_RD_SAME, P_RD_RAND} pat_t;
  task automatic run(pat_t p, int ports, string name, output int cpo100);
    longint t0;
    int ops;
    t0 = cycle;
    ops = (p == P_RD_SAME || p == P_RD_RAND) ? N * ports : N;
    for (int c = 0; c < ports; c++) begin
      automatic int cc = c;
      fork
        for (int i = 0; i < N / ports || ((p == P_RD_SAME || p == P_RD_RAND) && i < N); i++) begin
          unique case (p)
            P_WR_SEQ:    store(cc, i, $urandom);
            P_RD_SEQ:    load(cc, i);
            P_WR_ADJ:    store(cc, ports * i + cc, $urandom);
            P_RD_ADJ:    load(cc, ports * i + cc);
            // core c in bank c, sets spread by 97
            P_WR_SPREAD: store(cc, 4 * ((97 * i + 128 * cc) % 512) + cc, $urandom);
            P_RD_SAME:   load(cc, i);
            default:     load(cc, $urandom_range(0, N - 1));
          endcase
        end
      join_none
    end
    wait fork;
    cpo100 = int'((cycle - t0) * 100 / ops);
    $display("%-44s %0d ops, %0d.%0d%0d clocks per operation", name, ops, cpo100 / 100, (cpo100 % 100) / 10, cpo100 % 10);
  endtask

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int cpo_cold, cpo_warm, cpo_rd, cpo, miss0, hit0;
    rst = 1; cache_en = 1;
    for (int c = 0; c < C; c++) begin
      lsu_rd[c] = 0; ifu_rd[c] = 0; lsu_wr[c] = 0;
      lsu_rd_adr[c] = 0; ifu_rd_adr[c] = 0; lsu_wr_adr[c] = 0; lsu_wr_data[c] = 0; lsu_wr_bsel[c] = 0;
    end
    for (int i = 0; i < 16384; i++) begin u_mem.mem[i] = 0; ref_mem[i] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk); rst = 0;
    wait (dut.tag_ready);

    miss0 = int'(dut.n_miss);
    run(P_WR_SEQ, 1, "sequential write 2048 words, first run", cpo_cold);
    check(int'(dut.n_miss) - miss0 == N / 4, "cold run misses once per 4-word line");
    miss0 = int'(dut.n_miss); hit0 = int'(dut.n_hit);
    run(P_WR_SEQ, 1, "sequential write 2048 words, second run", cpo_warm);
    lat_max = 0;
    run(P_RD_SEQ, 1, "sequential read 2048 words", cpo_rd);
    check(int'(dut.n_miss) == miss0, "second run and reads all hit");
    check(int'(dut.n_hit) - hit0 >= 2 * N, "hits counted");
    // lat_max counts rising edges from the one that samples `rd` to the one
    // that shows `ack`: 6 edges = ack 5 cycles after the request
    check(lat_max == 6, $sformatf("read hit acknowledged 5 cycles after the request (%0d edges)", lat_max));
    check(cpo_warm < cpo_cold, "warm writes faster than cold writes");

    // With four ports busy the controller never idles, so the rate is its
    // own: a write hit every 3 cycles, a read hit every 4 (one request at a
    // time).  The first pattern still writes into lines already cached.
    run(P_WR_ADJ, 4, "4 ports: write adjacent words", cpo);
    check(cpo == 300, "4-port writes: one write hit per 3 cycles");
    run(P_RD_ADJ, 4, "4 ports: read adjacent words", cpo);
    check(cpo == 400, "4-port reads: one read hit per 4 cycles");
    run(P_WR_SPREAD, 4, "4 ports: write different sets and banks", cpo);
    check(cpo == 300, "4-port spread writes: one write hit per 3 cycles");
    run(P_RD_SAME, 4, "4 ports: all read the same words", cpo);
    check(cpo == 400, "4-port same-word reads: one per 4 cycles");
    run(P_RD_RAND, 4, "4 ports: read random words", cpo);
    check(cpo == 400, "4-port random reads: one per 4 cycles");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
