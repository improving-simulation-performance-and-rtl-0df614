// port_mem_model: behavioural memory behind the three memory-unit ports of a
// single core (instruction read, data read, data write), used to test a core
// without the cache.  Each port answers with a one-cycle ack LAT cycles after
// its request appeared; requests are served one at a time.  Addresses are
// taken relative to BASE; the array `mem` is loaded by the testbench.
module port_mem_model #(
  parameter int unsigned WORDS = 4096,
  parameter int unsigned LAT   = 2,
  parameter logic [31:0] BASE  = 32'h1000_0000
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        i_rd,
  input  logic [31:0] i_adr,
  output logic        i_ack,
  output logic [31:0] i_data,
  input  logic        d_rd,
  input  logic [31:0] d_adr,
  output logic        d_ack,
  output logic [31:0] d_data,
  input  logic        w_wr,
  input  logic [31:0] w_adr,
  input  logic [31:0] w_data,
  input  logic [3:0]  w_bsel,
  output logic        w_ack
);
  logic [31:0] mem [WORDS];
  int cnt;
  logic busy;
  logic [1:0] who;

  function automatic int idx(logic [31:0] a);
    return int'(((a - BASE) >> 2) % WORDS);
  endfunction

  always_ff @(posedge clk) begin
    i_ack <= 1'b0;
    d_ack <= 1'b0;
    w_ack <= 1'b0;
    if (rst) begin
      busy <= 1'b0;
      cnt  <= 0;
    end else if (!busy) begin
      if (d_rd && !d_ack)      begin busy <= 1'b1; who <= 2'd0; cnt <= 0; end
      else if (i_rd && !i_ack) begin busy <= 1'b1; who <= 2'd1; cnt <= 0; end
      else if (w_wr && !w_ack) begin busy <= 1'b1; who <= 2'd2; cnt <= 0; end
    end else if (cnt + 1 >= int'(LAT)) begin
      busy <= 1'b0;
      unique case (who)
        2'd0: begin d_ack <= 1'b1; d_data <= mem[idx(d_adr)]; end
        2'd1: begin i_ack <= 1'b1; i_data <= mem[idx(i_adr)]; end
        default: begin
          w_ack <= 1'b1;
          for (int b = 0; b < 4; b++)
            if (w_bsel[b]) mem[idx(w_adr)][8*b +: 8] <= w_data[8*b +: 8];
        end
      endcase
    end else cnt <= cnt + 1;
  end
endmodule
