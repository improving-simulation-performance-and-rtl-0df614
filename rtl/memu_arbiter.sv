// memu_arbiter: chooses which port the ParaNut memory unit serves next.
//
// Each core owns up to three ports: an LSU read port, an IFU read port and an
// LSU write port.  Within a core they are served in that order of priority
// (LSU read, IFU read, LSU write), as in the ParaNut.  Between cores the
// arbiter rotates: after a core has been served, the search for the next
// grant starts at the following core, so no core can starve the others (this
// round-robin rule is this design's own choice).  When the memory unit is
// free (`free`) and a port requests, the arbiter returns the winner
// combinationally (`gnt`, `gnt_core`, `gnt_kind`); `take` tells it that the
// grant was accepted, which advances the rotation.
module memu_arbiter #(
  parameter int unsigned CORES = 4
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic [CORES-1:0]         req_lsu_rd,
  input  logic [CORES-1:0]         req_ifu_rd,
  input  logic [CORES-1:0]         req_wr,
  input  logic                     free,
  input  logic                     take,
  output logic                     gnt,
  output logic [(CORES > 1 ? $clog2(CORES) : 1)-1:0] gnt_core,
  output logic [1:0]               gnt_kind   // 0 LSU read, 1 IFU read, 2 write
);

  localparam int unsigned CW = (CORES > 1) ? $clog2(CORES) : 1;
  logic [CW-1:0] start;   // core searched first

  always_comb begin
    logic [CW-1:0] c;
    gnt      = 1'b0;
    gnt_core = '0;
    gnt_kind = 2'd0;
    for (int i = CORES - 1; i >= 0; i--) begin
      c = CW'((32'(start) + 32'(i)) % CORES);
      if (free && (req_lsu_rd[c] || req_ifu_rd[c] || req_wr[c])) begin
        gnt      = 1'b1;
        gnt_core = c;
        gnt_kind = req_lsu_rd[c] ? 2'd0 : req_ifu_rd[c] ? 2'd1 : 2'd2;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) start <= '0;
    else if (take && gnt)
      start <= (32'(gnt_core) == CORES - 1) ? '0 : gnt_core + 1'b1;
  end

endmodule
