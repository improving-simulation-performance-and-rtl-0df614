// memu: the ParaNut memory unit, a shared write-back cache in front of the
// Wishbone system bus.
//
// Every core has an LSU read port, an IFU read port and an LSU write port.
// The arbiter picks one pending request at a time (LSU read before IFU read
// before LSU write within a core, round-robin between cores) and the cache
// controller below serves it:
//
//   * cached access (cache enabled and address inside main memory): the tag
//     RAM is read for the set; on a hit the word is read from, or written into,
//     the bank RAM of the word's bank and the LRU state of the set is updated.
//     On a miss a victim way is chosen (an invalid way if there is one, else
//     the least recently used); a dirty victim is first written back word by
//     word, then the line is fetched word by word from the bus into the bank
//     RAMs, the tag is written, and the lookup is repeated, which now hits.
//   * direct access (cache disabled or a peripheral address): one Wishbone
//     transfer through the bus interface.  If the bus ends it with an
//     error, the port's `err` flag is set together with its `ack`, and the
//     core raises an access fault.  (Line transfers go to main memory,
//     which always answers, so they carry no error.)
//
// A cache line holds one 32-bit word per bank.  Address fields:
// [1:0] byte, [2 +: BANKS_LD] bank, next SETS_LD bits set, the rest tag.
// With the defaults (4 banks, 512 sets, 4 ways) the cache holds 32 KiB.
//
// Timing: a read hit is acknowledged 4 cycles after the grant (latch, tag
// read, compare, bank read); the port buffers add one cycle on either side.
// A write hit takes 3.  The tag RAM is cleared after reset; requests wait
// until that is done (2^SETS_LD cycles).
//
// The ParaNut prioritises ports within a core and builds its cache from tag,
// bank and block RAMs as here.  Serving one request at a time, word-by-word
// line transfers and the round-robin between cores are this design's own
// simplifications.  The MMU (TLB and page table walker) and the bus
// controller that would share the bus with the walker are not included.
module memu
  import pn_pkg::*;
#(
  parameter int unsigned CORES    = 4,
  parameter int unsigned BANKS_LD = CACHE_BANKS_LD,
  parameter int unsigned SETS_LD  = CACHE_SETS_LD,
  parameter int unsigned WAYS_LD  = CACHE_WAYS_LD
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cache_en,
  // LSU read ports
  input  logic        lsu_rd     [CORES],
  input  logic [31:0] lsu_rd_adr [CORES],
  output logic        lsu_rd_ack [CORES],
  output logic [31:0] lsu_rd_data[CORES],
  output logic        lsu_rd_err [CORES],  // with ack: bus error (direct access)
  // IFU read ports
  input  logic        ifu_rd     [CORES],
  input  logic [31:0] ifu_rd_adr [CORES],
  output logic        ifu_rd_ack [CORES],
  output logic [31:0] ifu_rd_data[CORES],
  output logic        ifu_rd_err [CORES],
  // LSU write ports
  input  logic        lsu_wr      [CORES],
  input  logic [31:0] lsu_wr_adr  [CORES],
  input  logic [31:0] lsu_wr_data [CORES],
  input  logic [3:0]  lsu_wr_bsel [CORES],
  output logic        lsu_wr_ack  [CORES],
  output logic        lsu_wr_err  [CORES],
  // Wishbone master
  output logic        wb_cyc,
  output logic        wb_stb,
  output logic        wb_we,
  output logic [31:0] wb_adr,
  output logic [31:0] wb_dat_o,
  output logic [3:0]  wb_sel,
  input  logic        wb_ack,
  input  logic        wb_err,
  input  logic [31:0] wb_dat_i
);

  localparam int unsigned BANKS = 1 << BANKS_LD;
  localparam int unsigned WAYS  = 1 << WAYS_LD;
  localparam int unsigned TAG_W = 32 - 2 - BANKS_LD - SETS_LD;
  localparam int unsigned LRU_W = WAYS * (WAYS - 1) / 2;
  localparam int unsigned IDX_W = SETS_LD + WAYS_LD;
  localparam int unsigned CW    = (CORES > 1) ? $clog2(CORES) : 1;

  // ------------------------------------------------------------ LRU helpers
  function automatic int unsigned pair_idx(int unsigned i, int unsigned j);
    return i * WAYS - (i * (i + 1)) / 2 + (j - i - 1);
  endfunction

  function automatic logic [WAYS_LD-1:0] lru_victim(logic [LRU_W-1:0] lru);
    logic [WAYS_LD-1:0] v;
    v = '0;
    for (int unsigned w = 0; w < WAYS; w++) begin
      logic oldest;
      oldest = 1'b1;
      for (int unsigned u = 0; u < WAYS; u++) begin
        if (u < w && !lru[pair_idx(u, w)]) oldest = 1'b0;
        if (u > w &&  lru[pair_idx(w, u)]) oldest = 1'b0;
      end
      if (oldest) v = WAYS_LD'(w);
    end
    return v;
  endfunction

  function automatic logic [LRU_W-1:0] lru_touch(logic [LRU_W-1:0] lru,
                                                 logic [WAYS_LD-1:0] w);
    logic [LRU_W-1:0] n;
    n = lru;
    for (int unsigned u = 0; u < WAYS; u++) begin
      if (u < 32'(w)) n[pair_idx(u, 32'(w))] = 1'b0;
      if (u > 32'(w)) n[pair_idx(32'(w), u)] = 1'b1;
    end
    return n;
  endfunction

  // ------------------------------------------------------------- the ports
  logic        rq_lsu [CORES], rq_ifu [CORES], rq_wr [CORES];
  logic [31:0] rq_lsu_adr [CORES], rq_ifu_adr [CORES], rq_wr_adr [CORES];
  logic [31:0] rq_wr_data [CORES];
  logic [3:0]  rq_wr_bsel [CORES];
  logic [CORES-1:0] rq_lsu_v, rq_ifu_v, rq_wr_v;
  logic        srv_ack;          // serve the current request this cycle
  logic [31:0] srv_data;
  logic        srv_err;          // the served direct access ended in a bus error
  logic [CW-1:0] cur_core;
  logic [1:0]  cur_kind;

  for (genvar c = 0; c < CORES; c++) begin : g_port
    memu_readport u_rp_lsu (
      .clk, .rst, .rd(lsu_rd[c]), .adr(lsu_rd_adr[c]), .ack(lsu_rd_ack[c]),
      .data(lsu_rd_data[c]), .req(rq_lsu[c]), .req_adr(rq_lsu_adr[c]),
      .srv_ack(srv_ack && cur_core == CW'(c) && cur_kind == 2'd0),
      .srv_data(srv_data), .srv_err(srv_err), .err(lsu_rd_err[c]));
    memu_readport u_rp_ifu (
      .clk, .rst, .rd(ifu_rd[c]), .adr(ifu_rd_adr[c]), .ack(ifu_rd_ack[c]),
      .data(ifu_rd_data[c]), .req(rq_ifu[c]), .req_adr(rq_ifu_adr[c]),
      .srv_ack(srv_ack && cur_core == CW'(c) && cur_kind == 2'd1),
      .srv_data(srv_data), .srv_err(srv_err), .err(ifu_rd_err[c]));
    memu_writeport u_wp (
      .clk, .rst, .wr(lsu_wr[c]), .adr(lsu_wr_adr[c]), .wdata(lsu_wr_data[c]),
      .bsel(lsu_wr_bsel[c]), .ack(lsu_wr_ack[c]), .req(rq_wr[c]),
      .req_adr(rq_wr_adr[c]), .req_data(rq_wr_data[c]), .req_bsel(rq_wr_bsel[c]),
      .srv_ack(srv_ack && cur_core == CW'(c) && cur_kind == 2'd2),
      .srv_err(srv_err), .err(lsu_wr_err[c]));
    // a port that has just been served drops its request one cycle later;
    // mask it so the arbiter does not grant it twice
    assign rq_lsu_v[c] = rq_lsu[c] && !(srv_ack && cur_core == CW'(c) && cur_kind == 2'd0);
    assign rq_ifu_v[c] = rq_ifu[c] && !(srv_ack && cur_core == CW'(c) && cur_kind == 2'd1);
    assign rq_wr_v[c]  = rq_wr[c]  && !(srv_ack && cur_core == CW'(c) && cur_kind == 2'd2);
  end

  // -------------------------------------------------------------- arbiter
  typedef enum logic [3:0] {
    S_INIT, S_IDLE, S_TAG, S_CMP, S_HIT_RD, S_WB_RD, S_WB_BUS, S_FILL,
    S_TAG_WR, S_DIRECT
  } state_t;
  state_t state;

  logic          gnt;
  logic [CW-1:0] gnt_core;
  logic [1:0]    gnt_kind;
  logic          tag_ready;

  memu_arbiter #(.CORES(CORES)) u_arb (
    .clk, .rst, .req_lsu_rd(rq_lsu_v), .req_ifu_rd(rq_ifu_v), .req_wr(rq_wr_v),
    .free(state == S_IDLE), .take(state == S_IDLE), .gnt, .gnt_core, .gnt_kind);

  // ------------------------------------------------------------- request
  logic [31:0] cur_adr, cur_data;
  logic [3:0]  cur_bsel;
  logic [BANKS_LD-1:0] cur_bank;
  logic [SETS_LD-1:0]  cur_set;
  logic [TAG_W-1:0]    cur_tag;
  assign cur_bank = cur_adr[2 +: BANKS_LD];
  assign cur_set  = cur_adr[2 + BANKS_LD +: SETS_LD];
  assign cur_tag  = cur_adr[31 -: TAG_W];

  // ------------------------------------------------------------ tag RAM
  logic [WAYS-1:0]       t_valid, t_dirty;
  logic [WAYS*TAG_W-1:0] t_tag;
  logic [LRU_W-1:0]      t_lru;
  logic                  tw_en, tw_valid, tw_dirty, lw_en;
  logic [WAYS_LD-1:0]    tw_way;
  logic [TAG_W-1:0]      tw_tag;
  logic [LRU_W-1:0]      lw_lru;

  memu_tagram #(.SETS_LD(SETS_LD), .WAYS_LD(WAYS_LD), .TAG_W(TAG_W)) u_tag (
    .clk, .rst, .ready(tag_ready), .rd_set(cur_set),
    .rd_valid(t_valid), .rd_dirty(t_dirty), .rd_tag(t_tag), .rd_lru(t_lru),
    .wr_tag_en(tw_en), .wr_set(cur_set), .wr_way(tw_way), .wr_valid(tw_valid),
    .wr_dirty(tw_dirty), .wr_tag(tw_tag), .wr_lru_en(lw_en), .wr_lru(lw_lru));

  // ----------------------------------------------------------- bank RAMs
  logic        bus_req, bus_we, bus_done, bus_fail;
  logic [31:0] bus_adr, bus_wdata, bus_rdata;
  logic [3:0]  bus_sel;
  logic             ba_en [BANKS], bb_en [BANKS];
  logic [3:0]       ba_we [BANKS], bb_we [BANKS];
  logic [IDX_W-1:0] ba_addr, bb_addr;
  logic [31:0]      ba_rdata [BANKS];
  logic [31:0]      bb_rdata [BANKS];

  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    memu_bankram #(.DEPTH(1 << IDX_W)) u_bank (
      .clk,
      .a_en(ba_en[b]), .a_we(ba_we[b]), .a_addr(ba_addr), .a_wdata(cur_data),
      .a_rdata(ba_rdata[b]),
      .b_en(bb_en[b]), .b_we(bb_we[b]), .b_addr(bb_addr), .b_wdata(bus_rdata),
      .b_rdata(bb_rdata[b]));
  end

  // ------------------------------------------------------ bus interface

  memu_busif u_busif (
    .clk, .rst, .req(bus_req), .we(bus_we), .adr(bus_adr), .wdata(bus_wdata),
    .sel(bus_sel), .done(bus_done), .rdata(bus_rdata), .err(bus_fail),
    .wb_cyc, .wb_stb, .wb_we, .wb_adr, .wb_dat_o, .wb_sel, .wb_ack, .wb_err, .wb_dat_i);

  // ---------------------------------------------------------- controller
  logic [WAYS_LD-1:0]  hit_way, way;       // way: the way being served
  logic                hit;
  logic [BANKS_LD-1:0] word;               // word counter of line transfers
  logic [TAG_W-1:0]    victim_tag;

  always_comb begin
    hit     = 1'b0;
    hit_way = '0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (t_valid[w] && t_tag[w*TAG_W +: TAG_W] == cur_tag) begin
        hit     = 1'b1;
        hit_way = WAYS_LD'(w);
      end
  end

  function automatic logic [WAYS_LD-1:0] pick_victim(logic [WAYS-1:0] valid,
                                                     logic [LRU_W-1:0] lru);
    logic [WAYS_LD-1:0] v;
    logic               found;
    v     = lru_victim(lru);
    found = 1'b0;
    for (int unsigned w = 0; w < WAYS; w++)
      if (!valid[w] && !found) begin
        v     = WAYS_LD'(w);
        found = 1'b1;
      end
    return v;
  endfunction

  logic cacheable;
  assign cacheable = cache_en && ((cur_adr & MEM_MASK) == MEM_BASE);

  // combinational controls
  always_comb begin
    srv_ack  = 1'b0;
    srv_data = bus_rdata;
    srv_err  = 1'b0;
    tw_en    = 1'b0;
    tw_way   = way;
    tw_valid = 1'b1;
    tw_dirty = 1'b0;
    tw_tag   = cur_tag;
    lw_en    = 1'b0;
    lw_lru   = lru_touch(t_lru, hit_way);
    ba_addr  = {cur_set, way};
    bb_addr  = {cur_set, way};
    for (int b = 0; b < BANKS; b++) begin
      ba_en[b] = 1'b0;
      ba_we[b] = 4'h0;
      bb_en[b] = 1'b0;
      bb_we[b] = 4'h0;
    end
    bus_req   = 1'b0;
    bus_we    = 1'b0;
    bus_adr   = cur_adr;
    bus_wdata = cur_data;
    bus_sel   = cur_bsel;

    unique case (state)
      S_CMP: begin
        ba_addr = {cur_set, hit_way};
        if (hit) begin
          lw_en = 1'b1;
          ba_en[cur_bank] = 1'b1;
          if (cur_kind == 2'd2) begin
            ba_we[cur_bank] = cur_bsel;
            tw_en    = 1'b1;
            tw_way   = hit_way;
            tw_dirty = 1'b1;
            srv_ack  = 1'b1;
          end
        end
      end
      S_HIT_RD: begin
        srv_ack  = 1'b1;
        srv_data = ba_rdata[cur_bank];
      end
      S_WB_RD: ba_en[word] = 1'b1;
      S_WB_BUS: begin
        bus_req   = 1'b1;
        bus_we    = 1'b1;
        bus_adr   = {victim_tag, cur_set, word, 2'b00};
        bus_wdata = ba_rdata[word];
        bus_sel   = 4'hF;
      end
      S_FILL: begin
        bus_req = 1'b1;
        bus_adr = {cur_tag, cur_set, word, 2'b00};
        bus_sel = 4'hF;
        if (bus_done) begin
          bb_en[word] = 1'b1;
          bb_we[word] = 4'hF;
        end
      end
      S_TAG_WR: tw_en = 1'b1;
      S_DIRECT: begin
        bus_req = 1'b1;
        bus_we  = (cur_kind == 2'd2);
        if (bus_done) begin
          srv_ack = 1'b1;
          srv_err = bus_fail;
        end
      end
      default: ;
    endcase
  end

  // statistics, visible to testbenches
  logic [31:0] n_hit, n_miss, n_writeback, n_direct;

  always_ff @(posedge clk) begin
    if (rst) begin
      state       <= S_INIT;
      n_hit       <= '0;
      n_miss      <= '0;
      n_writeback <= '0;
      n_direct    <= '0;
      cur_core    <= '0;
      cur_kind    <= '0;
    end else begin
      unique case (state)
        S_INIT: if (tag_ready) state <= S_IDLE;
        S_IDLE:
          if (gnt) begin
            cur_core <= gnt_core;
            cur_kind <= gnt_kind;
            unique case (gnt_kind)
              2'd0: cur_adr <= rq_lsu_adr[gnt_core];
              2'd1: cur_adr <= rq_ifu_adr[gnt_core];
              default: cur_adr <= rq_wr_adr[gnt_core];
            endcase
            cur_data <= rq_wr_data[gnt_core];
            cur_bsel <= (gnt_kind == 2'd2) ? rq_wr_bsel[gnt_core] : 4'hF;
            state    <= S_TAG;
          end
        S_TAG:
          if (cacheable) state <= S_CMP;
          else begin
            state    <= S_DIRECT;
            n_direct <= n_direct + 1;
          end
        S_CMP:
          if (hit) begin
            n_hit <= n_hit + 1;
            state <= (cur_kind == 2'd2) ? S_IDLE : S_HIT_RD;
          end else begin
            n_miss     <= n_miss + 1;
            way        <= pick_victim(t_valid, t_lru);
            victim_tag <= t_tag[pick_victim(t_valid, t_lru)*TAG_W +: TAG_W];
            word       <= '0;
            if (t_valid[pick_victim(t_valid, t_lru)] && t_dirty[pick_victim(t_valid, t_lru)]) begin
              state       <= S_WB_RD;
              n_writeback <= n_writeback + 1;
            end else
              state <= S_FILL;
          end
        S_HIT_RD: state <= S_IDLE;
        S_WB_RD:  state <= S_WB_BUS;
        S_WB_BUS:
          if (bus_done) begin
            word  <= word + 1'b1;
            state <= (word == BANKS_LD'(BANKS - 1)) ? S_FILL : S_WB_RD;
          end
        S_FILL:
          if (bus_done) begin
            word <= word + 1'b1;
            if (word == BANKS_LD'(BANKS - 1)) state <= S_TAG_WR;
          end
        S_TAG_WR: state <= S_TAG;
        S_DIRECT: if (bus_done) state <= S_IDLE;
        default:  state <= S_IDLE;
      endcase
    end
  end

endmodule
