// block_ram: simple dual-port RAM written so that FPGA tools map it to block RAM.
//
// One write port and one read port, both synchronous to the same clock.  A
// read returns the word one cycle after the address is applied (registered
// output, as block RAM requires).  A read and a write to the same address in
// the same cycle return the old word (read-first).  The memory is not reset;
// its contents are cleared by the users that need it (the tag RAM is swept
// after reset).  The ParaNut memory unit builds its tag and LRU memories from
// this cell; the widths and depths come from its users.
module block_ram #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 512
) (
  input  logic                     clk,
  // write port
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  // read port
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
