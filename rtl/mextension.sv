// mextension: multiply and divide unit for the RISC-V "M" extension.
//
// `start` (one cycle) with the instruction's funct3 and both operands begins
// an operation; `busy` is high while it runs and `valid` pulses for one cycle
// with `result` when it is done, 33 cycles after `start`.
//   funct3 0 MUL, 1 MULH, 2 MULHSU, 3 MULHU, 4 DIV, 5 DIVU, 6 REM, 7 REMU
// Both kinds work on operand magnitudes, one bit per cycle (shift-and-add
// multiplication, restoring division), and restore the sign at the end.
// Division by zero gives all ones (quotient) and the dividend (remainder),
// and the signed overflow case -2^31 / -1 gives -2^31 and 0, as RISC-V
// requires.  The ParaNut makes this unit optional; its inside (one bit per
// cycle) is this design's own choice.
module mextension (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [2:0]  funct3,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        busy,
  output logic        valid,
  output logic [31:0] result
);

  logic [2:0]  op;
  logic [5:0]  cnt;
  logic        neg_res, neg_rem, div0;
  logic [63:0] acc, mcand;
  logic [31:0] mplier, quot, divisor, dividend;
  logic [32:0] rem;

  logic a_signed, b_signed;
  always_comb begin
    a_signed = (funct3 == 3'd1) || (funct3 == 3'd2) || (funct3 == 3'd4) || (funct3 == 3'd6);
    b_signed = (funct3 == 3'd1) || (funct3 == 3'd4) || (funct3 == 3'd6);
  end

  function automatic logic [31:0] mag(logic [31:0] x, logic sgn);
    return (sgn && x[31]) ? -x : x;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      busy  <= 1'b0;
      valid <= 1'b0;
      cnt   <= '0;
    end else begin
      valid <= 1'b0;
      if (start && !busy) begin
        busy     <= 1'b1;
        op       <= funct3;
        cnt      <= 6'd32;
        div0     <= (b == 0);
        dividend <= a;
        // multiplication
        acc      <= '0;
        mcand    <= {32'd0, mag(a, a_signed)};
        mplier   <= mag(b, b_signed);
        neg_res  <= (a_signed && a[31]) ^ (b_signed && b[31]);
        // division
        rem      <= '0;
        quot     <= mag(a, a_signed);
        divisor  <= mag(b, b_signed);
        neg_rem  <= a_signed && a[31];
      end else if (busy) begin
        if (cnt != 0) begin
          cnt <= cnt - 1'b1;
          if (!op[2]) begin
            if (mplier[0]) acc <= acc + mcand;
            mcand  <= mcand << 1;
            mplier <= mplier >> 1;
          end else begin
            logic [32:0] r;
            r = {rem[31:0], quot[31]};
            if (r >= {1'b0, divisor}) begin
              rem  <= r - {1'b0, divisor};
              quot <= {quot[30:0], 1'b1};
            end else begin
              rem  <= r;
              quot <= {quot[30:0], 1'b0};
            end
          end
        end else begin
          logic [63:0] prod;
          prod  = neg_res ? -acc : acc;
          busy  <= 1'b0;
          valid <= 1'b1;
          unique case (op)
            3'd0:          result <= prod[31:0];
            3'd1, 3'd2, 3'd3: result <= prod[63:32];
            3'd4, 3'd5:    result <= div0 ? '1 : (neg_res ? -quot : quot);
            default:       result <= div0 ? dividend : (neg_rem ? -rem[31:0] : rem[31:0]);
          endcase
        end
      end
    end
  end

endmodule
