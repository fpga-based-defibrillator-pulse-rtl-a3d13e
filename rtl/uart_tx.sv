// uart_tx: serial transmitter, one start bit, eight data bits LSB first,
// one stop bit, no parity (8N1).
//
// A byte is accepted on a clock edge where tx_start is high and tx_busy is
// low. From that edge the line carries the start bit (0), the eight data bits
// and the stop bit (1), each for CLKS_PER_BIT clock cycles; tx_busy is high
// for exactly 10 * CLKS_PER_BIT cycles, from the accepting edge to the edge
// that ends the stop bit. tx_start while tx_busy is high is ignored. The line
// idles high, and reset puts it there.
//
// The 9600 baud rate follows the design description; the 100 MHz clock is
// the Basys3 board oscillator. The frame format, the rounding of the bit
// period (CLKS_PER_BIT = round(CLK_HZ / BAUD) = 10417 cycles) and the
// synchronous active-high reset are this design's own choices.
module uart_tx
  import ecg_pkg::*;
#(
  parameter int unsigned CLK_HZ       = 100_000_000,
  parameter int unsigned BAUD         = 9600,
  parameter int unsigned CLKS_PER_BIT = (CLK_HZ + BAUD / 2) / BAUD
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              tx_start,
  input  logic [BYTE_W-1:0] tx_data,
  output logic              tx,
  output logic              tx_busy
);

  localparam int unsigned CNT_W   = (CLKS_PER_BIT > 1) ? $clog2(CLKS_PER_BIT) : 1;
  localparam int unsigned FRAME_W = BYTE_W + 2;  // start, data, stop

  logic [CNT_W-1:0]   baud_cnt;
  logic [3:0]         bit_idx;   // index of the bit now on the line, 0..9
  logic [BYTE_W:0]    frame;     // bits still to send, next one in bit 0

  always_ff @(posedge clk) begin
    if (rst) begin
      tx       <= 1'b1;
      tx_busy  <= 1'b0;
      baud_cnt <= '0;
      bit_idx  <= '0;
      frame    <= '1;
    end else if (!tx_busy) begin
      if (tx_start) begin
        frame    <= {1'b1, tx_data};
        tx       <= 1'b0;
        tx_busy  <= 1'b1;
        baud_cnt <= '0;
        bit_idx  <= '0;
      end
    end else if (baud_cnt == CNT_W'(CLKS_PER_BIT - 1)) begin
      baud_cnt <= '0;
      if (bit_idx == 4'(FRAME_W - 1)) begin
        tx      <= 1'b1;
        tx_busy <= 1'b0;
      end else begin
        bit_idx <= bit_idx + 4'd1;
        tx      <= frame[0];
        frame   <= {1'b1, frame[BYTE_W:1]};
      end
    end else begin
      baud_cnt <= baud_cnt + CNT_W'(1);
    end
  end

endmodule
