// memu_tagram: tag and replacement memory of the ParaNut cache.
//
// For every set it keeps one tag entry per way and the LRU state of the set.
// The tag memory is written one way at a time (one entry of TAG_W bits, SETS x
// WAYS deep) and read one whole set at a time (WAYS entries side by side, SETS
// deep); it is built from one block_ram per way so that both shapes hold.  The
// LRU memory keeps WAYS*(WAYS-1)/2 bits per set, one bit per pair of ways
// (6 bits for 4 ways): bit (i,j), i<j, is 1 when way i was used more recently
// than way j.  Reads return one cycle after the set index is applied.
//
// After reset the module sweeps all sets once, writing invalid tags and a
// neutral LRU word; `ready` rises when the sweep is over.
//
// Entry layout: {valid, dirty, tag}.  Choosing the victim and updating the
// LRU word is the memory unit's job; this module only stores the bits.
module memu_tagram #(
  parameter int unsigned SETS_LD = 9,
  parameter int unsigned WAYS_LD = 2,
  parameter int unsigned TAG_W   = 19   // address bits above set and bank index
) (
  input  logic                              clk,
  input  logic                              rst,
  output logic                              ready,
  // read a whole set
  input  logic [SETS_LD-1:0]                rd_set,
  output logic [(1<<WAYS_LD)-1:0]           rd_valid,
  output logic [(1<<WAYS_LD)-1:0]           rd_dirty,
  output logic [(1<<WAYS_LD)*TAG_W-1:0]     rd_tag,
  output logic [(1<<WAYS_LD)*((1<<WAYS_LD)-1)/2-1:0] rd_lru,
  // write one way's entry
  input  logic                              wr_tag_en,
  input  logic [SETS_LD-1:0]                wr_set,
  input  logic [WAYS_LD-1:0]                wr_way,
  input  logic                              wr_valid,
  input  logic                              wr_dirty,
  input  logic [TAG_W-1:0]                  wr_tag,
  // write the LRU word of a set
  input  logic                              wr_lru_en,
  input  logic [(1<<WAYS_LD)*((1<<WAYS_LD)-1)/2-1:0] wr_lru
);

  localparam int unsigned WAYS  = 1 << WAYS_LD;
  localparam int unsigned SETS  = 1 << SETS_LD;
  localparam int unsigned ENT_W = TAG_W + 2;
  localparam int unsigned LRU_W = WAYS * (WAYS - 1) / 2;

  // reset sweep
  logic               sweeping;
  logic [SETS_LD-1:0] sweep_set;

  always_ff @(posedge clk) begin
    if (rst) begin
      sweeping  <= 1'b1;
      sweep_set <= '0;
    end else if (sweeping) begin
      sweep_set <= sweep_set + 1'b1;
      if (sweep_set == SETS_LD'(SETS - 1)) sweeping <= 1'b0;
    end
  end
  assign ready = !sweeping;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic [ENT_W-1:0] rd_ent;
    logic             we;
    assign we = sweeping || (wr_tag_en && wr_way == WAYS_LD'(w));
    block_ram #(.WIDTH(ENT_W), .DEPTH(SETS)) u_ram (
      .clk   (clk),
      .we    (we),
      .waddr (sweeping ? sweep_set : wr_set),
      .wdata (sweeping ? '0 : {wr_valid, wr_dirty, wr_tag}),
      .raddr (rd_set),
      .rdata (rd_ent)
    );
    assign rd_valid[w]               = rd_ent[ENT_W-1];
    assign rd_dirty[w]               = rd_ent[ENT_W-2];
    assign rd_tag[w*TAG_W +: TAG_W]  = rd_ent[TAG_W-1:0];
  end

  block_ram #(.WIDTH(LRU_W), .DEPTH(SETS)) u_lru (
    .clk   (clk),
    .we    (sweeping || wr_lru_en),
    .waddr (sweeping ? sweep_set : wr_set),
    .wdata (sweeping ? '0 : wr_lru),
    .raddr (rd_set),
    .rdata (rd_lru)
  );

endmodule
