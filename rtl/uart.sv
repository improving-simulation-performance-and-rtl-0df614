// uart: serial port of a ParaNut system, 8 data bits, no parity, 1 stop bit.
//
// Registers behind the Wishbone slave port (acknowledged one cycle after STB):
//   0x0 TX    write: send the low byte (ignored while the transmitter is busy)
//   0x4 RX    read: last received byte; reading clears the "received" flag
//   0x8 STAT  bit 0 transmitter busy, bit 1 byte received, bit 2 overrun
//   0xC DIV   clock cycles per bit, reset value DIV_RESET
// The transmitter shifts out start bit, eight data bits LSB first and a stop
// bit, each DIV cycles long.  The receiver synchronises `rx`, waits for a
// falling edge, checks the start bit in its middle and then samples each bit
// in its middle.  `irq` is high while a received byte waits to be read.
// A register interface over Wishbone is what the ParaNut specifies for its
// UART; the register map, the frame format and the default rate (25 MHz /
// 115200 baud) are this design's own choices.
module uart #(
  parameter logic [15:0] DIV_RESET = 16'd217
) (
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
  output logic        tx,
  input  logic        rx,
  output logic        irq
);

  logic [15:0] div;
  logic        acc;
  assign acc = wb_cyc && wb_stb && !wb_ack;

  // transmitter
  logic [9:0]  tx_shift;
  logic [3:0]  tx_bits;     // bits still to send
  logic [15:0] tx_cnt;
  logic        tx_busy;
  assign tx_busy = (tx_bits != 0);

  // receiver
  logic [2:0]  rx_sync;
  logic        rx_active;
  logic [3:0]  rx_bits;
  logic [15:0] rx_cnt;
  logic [7:0]  rx_shift, rx_data;
  logic        rx_valid, rx_overrun;

  always_ff @(posedge clk) begin
    if (rst) begin
      div        <= DIV_RESET;
      wb_ack     <= 1'b0;
      wb_dat_o   <= '0;
      tx         <= 1'b1;
      tx_bits    <= '0;
      tx_cnt     <= '0;
      tx_shift   <= '1;
      rx_sync    <= '1;
      rx_active  <= 1'b0;
      rx_bits    <= '0;
      rx_cnt     <= '0;
      rx_valid   <= 1'b0;
      rx_overrun <= 1'b0;
      rx_data    <= '0;
      rx_shift   <= '0;
    end else begin
      wb_ack <= acc;

      // ---- transmitter
      if (tx_busy) begin
        if (tx_cnt == div - 1) begin
          tx_cnt   <= '0;
          tx       <= tx_shift[0];
          tx_shift <= {1'b1, tx_shift[9:1]};
          tx_bits  <= tx_bits - 1'b1;
        end else tx_cnt <= tx_cnt + 1'b1;
      end

      // ---- receiver
      rx_sync <= {rx_sync[1:0], rx};
      if (!rx_active) begin
        if (rx_sync[2] && !rx_sync[1]) begin      // falling edge: start bit
          rx_active <= 1'b1;
          rx_cnt    <= '0;
          rx_bits   <= 4'd0;
        end
      end else begin
        // first sample after half a bit, then every full bit
        if ((rx_bits == 0 && rx_cnt == (div >> 1)) || (rx_bits != 0 && rx_cnt == div - 1)) begin
          rx_cnt <= '0;
          if (rx_bits == 0) begin
            if (rx_sync[1]) rx_active <= 1'b0;    // glitch, not a start bit
            else rx_bits <= 4'd1;
          end else if (rx_bits == 4'd9) begin     // stop bit
            rx_active <= 1'b0;
            if (rx_sync[1]) begin
              rx_data    <= rx_shift;
              rx_overrun <= rx_overrun | rx_valid;
              rx_valid   <= 1'b1;
            end
          end else begin
            rx_shift <= {rx_sync[1], rx_shift[7:1]};
            rx_bits  <= rx_bits + 1'b1;
          end
        end else rx_cnt <= rx_cnt + 1'b1;
      end

      // ---- registers
      if (acc) begin
        unique case (wb_adr[3:2])
          2'd0: wb_dat_o <= '0;
          2'd1: wb_dat_o <= {24'd0, rx_data};
          2'd2: wb_dat_o <= {29'd0, rx_overrun, rx_valid, tx_busy};
          default: wb_dat_o <= {16'd0, div};
        endcase
        if (wb_we) begin
          if (wb_adr[3:2] == 2'd0 && !tx_busy && wb_sel[0]) begin
            tx_shift <= {1'b1, wb_dat_i[7:0], 1'b0};
            tx_bits  <= 4'd10;
            tx_cnt   <= div - 1;          // first bit goes out next cycle
          end
          if (wb_adr[3:2] == 2'd3) div <= wb_dat_i[15:0];
        end else if (wb_adr[3:2] == 2'd1) begin
          rx_valid   <= 1'b0;
          rx_overrun <= 1'b0;
        end
      end
    end
  end

  assign irq = rx_valid;

endmodule
