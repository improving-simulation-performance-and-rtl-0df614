// mtimer: the machine timer of a ParaNut system.
//
// Keeps the two RISC-V timer registers: `mtime`, a 64-bit counter advanced
// every cycle, and `mtimecmp`.  The timer interrupt `irq` is high while
// mtime >= mtimecmp; software clears it by writing a larger mtimecmp.  Both
// registers are written through the Wishbone slave port (32 bits at a time):
//   0x0 mtime[31:0]   0x4 mtime[63:32]   0x8 mtimecmp[31:0]   0xC mtimecmp[63:32]
// A transfer is acknowledged one cycle after STB; reads return the register
// value of that cycle.  mtimecmp resets to all ones, so no interrupt is
// pending after reset.  The register set and the interrupt line to the CePU
// are those of the ParaNut timer; offsets and reset values follow the usual
// RISC-V layout and are this design's choice.
module mtimer (
  input  logic        clk,
  input  logic        rst,
  input  logic        wb_cyc,
  input  logic        wb_stb,
  input  logic        wb_we,
  input  logic [31:0] wb_adr,
  input  logic [31:0] wb_dat_i,
  input  logic [3:0]  wb_sel,
  output logic        wb_ack,
  output logic [31:0] wb_dat_o,
  output logic        irq
);

  logic [63:0] mtime, mtimecmp;
  logic        acc;
  assign acc = wb_cyc && wb_stb && !wb_ack;

  function automatic logic [31:0] merge(logic [31:0] old, logic [31:0] d,
                                        logic [3:0] sel);
    for (int i = 0; i < 4; i++) if (sel[i]) old[8*i +: 8] = d[8*i +: 8];
    return old;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      mtime    <= '0;
      mtimecmp <= '1;
      wb_ack   <= 1'b0;
      wb_dat_o <= '0;
    end else begin
      wb_ack <= acc;
      mtime  <= mtime + 64'd1;
      if (acc) begin
        unique case (wb_adr[3:2])
          2'd0: wb_dat_o <= mtime[31:0];
          2'd1: wb_dat_o <= mtime[63:32];
          2'd2: wb_dat_o <= mtimecmp[31:0];
          default: wb_dat_o <= mtimecmp[63:32];
        endcase
        if (wb_we)
          unique case (wb_adr[3:2])
            2'd0: mtime[31:0]     <= merge(mtime[31:0], wb_dat_i, wb_sel);
            2'd1: mtime[63:32]    <= merge(mtime[63:32], wb_dat_i, wb_sel);
            2'd2: mtimecmp[31:0]  <= merge(mtimecmp[31:0], wb_dat_i, wb_sel);
            default: mtimecmp[63:32] <= merge(mtimecmp[63:32], wb_dat_i, wb_sel);
          endcase
      end
    end
  end

  assign irq = (mtime >= mtimecmp);

endmodule
