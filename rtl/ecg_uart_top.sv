// ecg_uart_top: FPGA top of the ECG streaming design (Basys3 board).
//
// A recorded ECG is stored in on-chip block RAM as 16-bit two's complement
// samples. Pressing start sends the whole record over a 9600 baud UART line
// to a host, which rebuilds each signed sample from two consecutive bytes
// (upper byte first) and classifies the rhythm in software.
//
//   start -> ecg_tx_controller -- bram_addr --> ecg_bram
//                              <- bram_data --
//                              -- tx_data, tx_start --> uart_tx --> tx
//                              <- tx_busy -------------
//   led[3:0] shows the controller state.
//
// Ports: clk (100 MHz board clock), rst (synchronous, active high), start
// (button, synchronised inside), tx (serial output, idles high), led[3:0].
// A record of NUM_SAMPLES samples takes NUM_SAMPLES * (20 * CLKS_PER_BIT + 8)
// clock cycles, about 4.27 s for 2048 samples at 9600 baud.
//
// Follows the design description: memory, controller and transmitter, the
// 16-bit samples, the 2048-sample record, 9600 baud and the top-level port
// names of the reference simulation. INIT_FILE selects the record (see
// ecg_bram); with none, a built-in synthetic waveform is used.
module ecg_uart_top
  import ecg_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 100_000_000,
  parameter int unsigned BAUD        = 9600,
  parameter int unsigned NUM_SAMPLES = 2048,
  parameter string       INIT_FILE   = ""
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  output logic       tx,
  output logic [3:0] led
);

  localparam int unsigned ADDR_W = (NUM_SAMPLES > 1) ? $clog2(NUM_SAMPLES) : 1;

  logic [ADDR_W-1:0]   bram_addr;
  logic [SAMPLE_W-1:0] bram_data;
  logic [BYTE_W-1:0]   tx_data;
  logic                tx_start;
  logic                tx_busy;
  tx_state_t           state;
  logic                record_done;

  ecg_bram #(
    .DATA_W   (SAMPLE_W),
    .DEPTH    (NUM_SAMPLES),
    .ADDR_W   (ADDR_W),
    .INIT_FILE(INIT_FILE)
  ) u_bram (
    .clk (clk),
    .addr(bram_addr),
    .dout(bram_data)
  );

  ecg_tx_controller #(
    .NUM_SAMPLES(NUM_SAMPLES),
    .ADDR_W     (ADDR_W)
  ) u_ctrl (
    .clk        (clk),
    .rst        (rst),
    .start      (start),
    .bram_addr  (bram_addr),
    .bram_data  (bram_data),
    .tx_data    (tx_data),
    .tx_start   (tx_start),
    .tx_busy    (tx_busy),
    .state      (state),
    .led        (led),
    .record_done(record_done)
  );

  uart_tx #(
    .CLK_HZ(CLK_HZ),
    .BAUD  (BAUD)
  ) u_uart (
    .clk     (clk),
    .rst     (rst),
    .tx_start(tx_start),
    .tx_data (tx_data),
    .tx      (tx),
    .tx_busy (tx_busy)
  );

endmodule
