// gpio: general purpose inputs and outputs of a ParaNut system.
//
// IN_W input pins are synchronised by two flip-flops and can be read in
// register 0x0; OUT_W output pins are driven from register 0x4, which can be
// written and read back.  Both widths are parameters, as in the ParaNut.
// The registers sit behind a Wishbone slave port; a transfer is acknowledged
// one cycle after STB.  Outputs reset to zero.  The register offsets, the
// synchroniser and the default widths (8 and 8) are this design's choice.
module gpio #(
  parameter int unsigned IN_W  = 8,
  parameter int unsigned OUT_W = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             wb_cyc,
  input  logic             wb_stb,
  input  logic             wb_we,
  input  logic [31:0]      wb_adr,
  input  logic [31:0]      wb_dat_i,
  input  logic [3:0]       wb_sel,
  output logic             wb_ack,
  output logic [31:0]      wb_dat_o,
  input  logic [IN_W-1:0]  gpio_in,
  output logic [OUT_W-1:0] gpio_out
);

  logic [IN_W-1:0] sync1, sync2;
  logic            acc;
  assign acc = wb_cyc && wb_stb && !wb_ack;

  always_ff @(posedge clk) begin
    if (rst) begin
      sync1    <= '0;
      sync2    <= '0;
      gpio_out <= '0;
      wb_ack   <= 1'b0;
      wb_dat_o <= '0;
    end else begin
      sync1  <= gpio_in;
      sync2  <= sync1;
      wb_ack <= acc;
      if (acc) begin
        wb_dat_o <= wb_adr[2] ? 32'(gpio_out) : 32'(sync2);
        if (wb_we && wb_adr[2])
          for (int i = 0; i < OUT_W; i++)
            if (wb_sel[i / 8]) gpio_out[i] <= wb_dat_i[i];
      end
    end
  end

endmodule
