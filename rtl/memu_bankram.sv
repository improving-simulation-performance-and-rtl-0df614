// memu_bankram: one data bank of the ParaNut cache, a true dual-port RAM.
//
// The cache line is spread over the banks, one 32-bit word per bank, so a bank
// holds one word of every line: SETS x WAYS words, addressed by {set, way}.
// With the default geometry (512 sets, 4 ways) that is 2048 words of 32 bits,
// 8 KiB, the size of the cache block RAM of the default ParaNut configuration.
// Both ports can read and write; writes use byte enables.  Read data appears
// one cycle after the address (registered).  The memory unit uses port A for
// processor accesses and write-back, port B to store words of a line fill.
module memu_bankram #(
  parameter int unsigned DEPTH = 2048
) (
  input  logic                     clk,
  // port A
  input  logic                     a_en,
  input  logic [3:0]               a_we,
  input  logic [$clog2(DEPTH)-1:0] a_addr,
  input  logic [31:0]              a_wdata,
  output logic [31:0]              a_rdata,
  // port B
  input  logic                     b_en,
  input  logic [3:0]               b_we,
  input  logic [$clog2(DEPTH)-1:0] b_addr,
  input  logic [31:0]              b_wdata,
  output logic [31:0]              b_rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      for (int i = 0; i < 4; i++)
        if (a_we[i]) mem[a_addr][8*i +: 8] <= a_wdata[8*i +: 8];
      a_rdata <= mem[a_addr];
    end
  end

  always_ff @(posedge clk) begin
    if (b_en) begin
      for (int i = 0; i < 4; i++)
        if (b_we[i]) mem[b_addr][8*i +: 8] <= b_wdata[8*i +: 8];
      b_rdata <= mem[b_addr];
    end
  end

endmodule
