// memu_writeport: one write port of the ParaNut memory unit.
//
// The LSU of a core raises `wr` with address, data and byte enables and holds
// them until `ack`.  The port copies the request into its buffer, raises
// `req` towards the arbiter and pulses `ack` to the LSU in the cycle after the
// memory unit reports the write done with `srv_ack`.  Byte enables select the
// bytes of the aligned 32-bit word that are written; the LSU has already
// shifted the data into the right byte lanes.  `wr` is ignored while `ack` is
// high, so the LSU has one cycle to drop it.
module memu_writeport (
  input  logic        clk,
  input  logic        rst,
  // processor side
  input  logic        wr,
  input  logic [31:0] adr,
  input  logic [31:0] wdata,
  input  logic [3:0]  bsel,
  output logic        ack,
  output logic        err,          // the access ended in a bus error (with ack)
  // memory unit side
  output logic        req,
  output logic [31:0] req_adr,
  output logic [31:0] req_data,
  output logic [3:0]  req_bsel,
  input  logic        srv_ack,
  input  logic        srv_err
);

  always_ff @(posedge clk) begin
    if (rst) begin
      req <= 1'b0;
      ack <= 1'b0;
      err <= 1'b0;
    end else begin
      ack <= 1'b0;
      if (req) begin
        if (srv_ack) begin
          req <= 1'b0;
          ack <= 1'b1;
          err <= srv_err;
        end
      end else if (wr && !ack) begin
        req      <= 1'b1;
        req_adr  <= adr;
        req_data <= wdata;
        req_bsel <= bsel;
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) srv_ack |-> req);

endmodule
