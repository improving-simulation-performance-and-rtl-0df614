// lsu: load/store unit of a ParaNut core.
//
// The EXU starts an access with a one-cycle `req`, giving `we`, the RISC-V
// funct3 of the load or store (size and sign) and the byte address.  Loads go
// through the core's memory-unit read port, stores through its write port.
// For a load the LSU picks the addressed byte or halfword out of the aligned
// word and sign- or zero-extends it; for a store it moves the data into the
// addressed byte lanes and sets the byte selects.  `done` pulses when the
// access is finished; `rdata` is valid with it.  `misaligned` tells the EXU
// combinationally that an address is not aligned to the access size, which
// the EXU turns into an exception without starting the access.  `err` comes
// with `done` when the bus ended the access with an error (access fault).
// The ParaNut connects its LSU to one read and one write port of the memory
// unit, as here; the handshake is this design's own.
module lsu (
  input  logic        clk,
  input  logic        rst,
  input  logic        req,
  input  logic        we,
  input  logic [2:0]  funct3,
  input  logic [31:0] adr,
  input  logic [31:0] wdata,
  output logic        done,
  output logic [31:0] rdata,
  output logic        misaligned,
  output logic        err,
  // read port
  output logic        rp_rd,
  output logic [31:0] rp_adr,
  input  logic        rp_ack,
  input  logic [31:0] rp_data,
  input  logic        rp_err,
  // write port
  output logic        wp_wr,
  output logic [31:0] wp_adr,
  output logic [31:0] wp_data,
  output logic [3:0]  wp_bsel,
  input  logic        wp_ack,
  input  logic        wp_err
);

  logic [2:0] f3;
  logic [1:0] ofs;

  always_comb begin
    unique case (funct3[1:0])
      2'd0:    misaligned = 1'b0;
      2'd1:    misaligned = adr[0];
      default: misaligned = adr[1:0] != 2'b00;
    endcase
  end

  function automatic logic [31:0] extract(logic [31:0] w, logic [1:0] o,
                                          logic [2:0] f);
    logic [31:0] s;
    s = w >> (8 * o);
    unique case (f)
      3'd0:    return {{24{s[7]}}, s[7:0]};
      3'd1:    return {{16{s[15]}}, s[15:0]};
      3'd4:    return {24'd0, s[7:0]};
      3'd5:    return {16'd0, s[15:0]};
      default: return s;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rp_rd   <= 1'b0;
      wp_wr   <= 1'b0;
      done    <= 1'b0;
      err     <= 1'b0;
      rdata   <= '0;
      rp_adr  <= '0;
      wp_adr  <= '0;
      wp_data <= '0;
      wp_bsel <= '0;
      f3      <= '0;
      ofs     <= '0;
    end else begin
      done <= 1'b0;
      if (rp_rd) begin
        if (rp_ack) begin
          rp_rd <= 1'b0;
          done  <= 1'b1;
          err   <= rp_err;
          rdata <= extract(rp_data, ofs, f3);
        end
      end else if (wp_wr) begin
        if (wp_ack) begin
          wp_wr <= 1'b0;
          done  <= 1'b1;
          err   <= wp_err;
        end
      end else if (req) begin
        f3  <= funct3;
        ofs <= adr[1:0];
        if (we) begin
          wp_wr   <= 1'b1;
          wp_adr  <= {adr[31:2], 2'b00};
          wp_data <= wdata << (8 * adr[1:0]);
          unique case (funct3[1:0])
            2'd0:    wp_bsel <= 4'b0001 << adr[1:0];
            2'd1:    wp_bsel <= 4'b0011 << adr[1:0];
            default: wp_bsel <= 4'b1111;
          endcase
        end else begin
          rp_rd  <= 1'b1;
          rp_adr <= {adr[31:2], 2'b00};
        end
      end
    end
  end

endmodule
