// memu_busif: the ParaNut memory unit's master on the Wishbone system bus.
//
// The cache controller hands it one word transfer at a time (`req` with
// write flag, address, data and byte selects, held until `done`).  The
// interface runs a Wishbone classic single cycle: CYC and STB rise in the
// cycle after `req`, stay up with stable address and data until the slave
// answers ACK, and drop again in the next cycle.  `done` pulses in the cycle
// after ACK and, for a read, `rdata` holds the word from then on.  A slave
// may end the cycle with ERR instead of ACK; `err` then accompanies `done`.
// Line fills
// and write-backs are sequences of such transfers issued by the controller.
// Single transfers rather than bursts are this design's own choice.
module memu_busif (
  input  logic        clk,
  input  logic        rst,
  // controller side
  input  logic        req,
  input  logic        we,
  input  logic [31:0] adr,
  input  logic [31:0] wdata,
  input  logic [3:0]  sel,
  output logic        done,
  output logic [31:0] rdata,
  output logic        err,
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

  always_ff @(posedge clk) begin
    if (rst) begin
      wb_cyc <= 1'b0;
      wb_stb <= 1'b0;
      done   <= 1'b0;
      err    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (wb_cyc) begin
        if (wb_ack || wb_err) begin
          wb_cyc <= 1'b0;
          wb_stb <= 1'b0;
          done   <= 1'b1;
          err    <= wb_err;
          if (!wb_we) rdata <= wb_err ? '0 : wb_dat_i;
        end
      end else if (req && !done) begin
        wb_cyc   <= 1'b1;
        wb_stb   <= 1'b1;
        wb_we    <= we;
        wb_adr   <= adr;
        wb_dat_o <= wdata;
        wb_sel   <= sel;
      end
    end
  end

  // Wishbone rule: a strobe stays up with stable address until acknowledged
  assert property (@(posedge clk) disable iff (rst)
                   wb_stb && !wb_ack && !wb_err |=> wb_stb && $stable(wb_adr));
  assert property (@(posedge clk) disable iff (rst) wb_stb |-> wb_cyc);

endmodule
