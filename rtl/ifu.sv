// ifu: instruction fetch unit of a ParaNut core.
//
// The EXU asks for the instruction at a new program counter with a one-cycle
// `fetch` pulse and `pc`.  The IFU reads the word through its memory-unit read
// port and then holds it in its instruction buffer (`insn`, `insn_pc`,
// `valid`) until the next fetch.  Because the buffer carries the address of
// its word, the EXU only has to compare `insn_pc` with its own PC to know
// whether the buffered instruction is the one it needs; a fetch that arrives
// while a read is still running is remembered and issued after it.
// Instructions are 32-bit and word aligned (no compressed instructions).
// `insn_err` marks a buffered word whose read ended in a bus error; the EXU
// raises an instruction access fault when it reaches it.
// The ParaNut gives each core of capability level 2 or 3 its own IFU on a
// dedicated read port; the single-word buffer is this design's own choice.
module ifu (
  input  logic        clk,
  input  logic        rst,
  input  logic        fetch,
  input  logic [31:0] pc,
  output logic        valid,
  output logic [31:0] insn,
  output logic [31:0] insn_pc,
  output logic        insn_err,
  // memory unit read port
  output logic        rp_rd,
  output logic [31:0] rp_adr,
  input  logic        rp_ack,
  input  logic [31:0] rp_data,
  input  logic        rp_err
);

  logic        pend;       // another fetch waits for the running read
  logic [31:0] pend_pc;

  always_ff @(posedge clk) begin
    if (rst) begin
      valid   <= 1'b0;
      rp_rd   <= 1'b0;
      pend    <= 1'b0;
      insn    <= '0;
      insn_pc <= '0;
      insn_err <= 1'b0;
      rp_adr  <= '0;
      pend_pc <= '0;
    end else begin
      if (rp_rd) begin
        if (rp_ack) begin
          if (pend || (fetch && pc != rp_adr)) begin
            // a newer fetch overtook this read: drop the word, read again
            rp_adr <= pend ? pend_pc : pc;
            if (fetch) rp_adr <= pc;
            pend   <= 1'b0;
            valid  <= 1'b0;
          end else begin
            rp_rd   <= 1'b0;
            insn    <= rp_data;
            insn_pc <= rp_adr;
            insn_err <= rp_err;
            valid   <= 1'b1;
          end
        end else if (fetch) begin
          pend    <= 1'b1;
          pend_pc <= pc;
        end
      end else if (fetch) begin
        if (!(valid && insn_pc == pc)) begin
          rp_rd  <= 1'b1;
          rp_adr <= pc;
          valid  <= 1'b0;
        end
      end
    end
  end

endmodule
