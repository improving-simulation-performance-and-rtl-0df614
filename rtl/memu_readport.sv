// memu_readport: one read port of the ParaNut memory unit.
//
// A processor unit (the LSU or the IFU of a core) raises `rd` with an address
// and holds both until `ack`.  The port accepts the request into its buffer,
// raises `req` towards the arbiter and, when the memory unit reports the word
// with `srv_ack`/`srv_data`, returns it to the processor with a one-cycle
// `ack` pulse together with `data` in the following cycle.  The buffer decouples
// the processor from the arbitration: the address seen by the memory unit is
// the buffered one.  A requester must drop `rd` (or present a new request)
// in the cycle after `ack`; the port ignores `rd` while `ack` is high.
module memu_readport (
  input  logic        clk,
  input  logic        rst,
  // processor side
  input  logic        rd,
  input  logic [31:0] adr,
  output logic        ack,
  output logic        err,          // the access ended in a bus error (with ack)
  output logic [31:0] data,
  // memory unit side
  output logic        req,
  output logic [31:0] req_adr,
  input  logic        srv_ack,
  input  logic [31:0] srv_data,
  input  logic        srv_err
);

  always_ff @(posedge clk) begin
    if (rst) begin
      req  <= 1'b0;
      ack  <= 1'b0;
      err  <= 1'b0;
    end else begin
      ack <= 1'b0;
      if (req) begin
        if (srv_ack) begin
          req  <= 1'b0;
          ack  <= 1'b1;
          err  <= srv_err;
          data <= srv_data;
        end
      end else if (rd && !ack) begin
        req     <= 1'b1;
        req_adr <= adr;
      end
    end
  end

  // the memory unit only serves a port that asks
  assert property (@(posedge clk) disable iff (rst) srv_ack |-> req);

endmodule
