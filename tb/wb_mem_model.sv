// wb_mem_model: behavioural main memory for simulation, a Wishbone slave.
//
// Stands in for the system's main memory (on the FPGA a DDR controller).
// WORDS 32-bit words, addressed by adr[2 +: log2(WORDS)] (higher bits are
// ignored, so the memory repeats over its window).  A transfer is
// acknowledged LAT+1 cycles after STB rises; writes honour the byte selects.
// Testbenches fill and inspect `mem` directly.  Not synthesizable as meant.
module wb_mem_model #(
  parameter int unsigned WORDS = 65536,
  parameter int unsigned LAT   = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        cyc,
  input  logic        stb,
  input  logic        we,
  input  logic [31:0] adr,
  input  logic [31:0] dat_i,
  input  logic [3:0]  sel,
  output logic        ack,
  output logic [31:0] dat_o
);

  logic [31:0] mem [WORDS];
  int unsigned wait_cnt;
  int unsigned n_read, n_write;

  always_ff @(posedge clk) begin
    if (rst) begin
      ack      <= 1'b0;
      wait_cnt <= 0;
      dat_o    <= '0;
      n_read   <= 0;
      n_write  <= 0;
    end else begin
      ack <= 1'b0;
      if (cyc && stb && !ack) begin
        if (wait_cnt < LAT) wait_cnt <= wait_cnt + 1;
        else begin
          int unsigned i;
          i = 32'(adr[2 +: $clog2(WORDS)]);
          wait_cnt <= 0;
          ack      <= 1'b1;
          if (we) begin
            for (int b = 0; b < 4; b++)
              if (sel[b]) mem[i][8*b +: 8] <= dat_i[8*b +: 8];
            n_write <= n_write + 1;
          end else begin
            dat_o  <= mem[i];
            n_read <= n_read + 1;
          end
        end
      end
    end
  end

endmodule
