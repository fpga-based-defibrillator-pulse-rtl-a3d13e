// ecg_tx_controller: walks the ECG sample memory and hands every sample to
// the UART transmitter as two bytes, upper byte first.
//
// How it works. The start button passes a three-flop synchroniser
// (start_sync); its last stage, start_pulse, is the synchronised level. While
// the controller is idle and start_pulse is high, a record transfer begins at
// address 0. For each address the finite-state machine
//   1. holds the address on bram_addr for two clock cycles (S_READ, S_WAIT),
//      the read latency of the memory,
//   2. copies bram_data into captured_data (S_CAPTURE),
//   3. pulses tx_start with captured_data[15:8] on tx_data (S_SEND_MSB) and
//      waits for tx_busy to fall (S_WAIT_MSB),
//   4. does the same with captured_data[7:0] (S_SEND_LSB, S_WAIT_LSB),
//   5. moves to the next address (S_NEXT).
// After the last address it returns to S_IDLE; if start is still held, the
// next record transfer begins at once, so a held button streams the record
// repeatedly. tx_data is a multiplexer on captured_data selected by state.
//
// Timing, with a transmitter that is busy for F cycles per byte and drops
// tx_busy one cycle after it is released: one sample takes 2 * F + 8 cycles
// (F = 10 * CLKS_PER_BIT for 8N1), and the upper-byte and lower-byte
// tx_start pulses are F + 2 cycles apart.
//
// Follows the design description: sequential address counter, two cycles for
// the synchronous memory, a capture register, the 16-bit sample split into
// two bytes sent upper byte first, a new byte only when the transmitter is no
// longer busy, and the start/start_sync/start_pulse/state/led signal names of
// the reference simulation. This design's own choices: the state encoding,
// driving led with the state code, start_pulse as a level rather than a
// one-cycle pulse, repeating the record while start is held, and the
// synchronous active-high reset.
module ecg_tx_controller
  import ecg_pkg::*;
#(
  parameter int unsigned NUM_SAMPLES = 2048,
  parameter int unsigned ADDR_W      = (NUM_SAMPLES > 1) ? $clog2(NUM_SAMPLES) : 1
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                start,          // asynchronous button
  // sample memory
  output logic [ADDR_W-1:0]   bram_addr,
  input  logic [SAMPLE_W-1:0] bram_data,
  // UART transmitter
  output logic [BYTE_W-1:0]   tx_data,
  output logic                tx_start,
  input  logic                tx_busy,
  // status
  output tx_state_t           state,
  output logic [3:0]          led,
  output logic                record_done     // one cycle after the last sample
);

  localparam logic [ADDR_W-1:0] LAST_ADDR = ADDR_W'(NUM_SAMPLES - 1);

  logic [2:0]          start_sync;
  logic                start_pulse;
  logic [ADDR_W-1:0]   mem_addr_counter;
  logic [SAMPLE_W-1:0] captured_data;

  always_ff @(posedge clk) begin
    if (rst) start_sync <= '0;
    else     start_sync <= {start_sync[1:0], start};
  end
  assign start_pulse = start_sync[2];

  always_ff @(posedge clk) begin
    if (rst) begin
      state            <= S_IDLE;
      mem_addr_counter <= '0;
      captured_data    <= '0;
      record_done      <= 1'b0;
    end else begin
      record_done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          mem_addr_counter <= '0;
          if (start_pulse) state <= S_READ;
        end
        S_READ:     state <= S_WAIT;
        S_WAIT:     state <= S_CAPTURE;
        S_CAPTURE: begin
          captured_data <= bram_data;
          state         <= S_SEND_MSB;
        end
        S_SEND_MSB: state <= S_WAIT_MSB;
        S_WAIT_MSB: if (!tx_busy) state <= S_SEND_LSB;
        S_SEND_LSB: state <= S_WAIT_LSB;
        S_WAIT_LSB: if (!tx_busy) state <= S_NEXT;
        S_NEXT: begin
          if (mem_addr_counter == LAST_ADDR) begin
            mem_addr_counter <= '0;
            record_done      <= 1'b1;
            state            <= S_IDLE;
          end else begin
            mem_addr_counter <= mem_addr_counter + ADDR_W'(1);
            state            <= S_READ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign bram_addr = mem_addr_counter;
  assign tx_start  = (state == S_SEND_MSB) || (state == S_SEND_LSB);
  assign tx_data   = (state == S_SEND_MSB || state == S_WAIT_MSB)
                   ? captured_data[SAMPLE_W-1 -: BYTE_W]
                   : captured_data[BYTE_W-1:0];
  assign led       = state;

  // A byte is only offered to an idle transmitter.
  a_start_when_idle: assert property (@(posedge clk) disable iff (rst) tx_start |-> !tx_busy)
    else $error("tx_start while the transmitter is busy");

endmodule
