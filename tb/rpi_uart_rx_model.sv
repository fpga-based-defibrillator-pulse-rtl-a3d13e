// rpi_uart_rx_model: behavioural model of the host end of the serial link.
//
// It stands for the single-board computer that receives the ECG stream. It
// watches the line for a falling edge, checks the start bit half a bit later,
// samples eight data bits (LSB first) at their centres and checks the stop
// bit. Every received byte is reported on byte_valid/byte_data; every second
// byte completes a sample, rebuilt as a signed 16-bit value with the first
// byte of the pair as the upper byte (sample_valid/sample). A bad start or
// stop bit raises framing_error for one cycle. rst also resets the byte
// pairing. Used by testbenches only; it is not part of the FPGA design.
module rpi_uart_rx_model #(
  parameter int unsigned CLKS_PER_BIT = 10
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               rx,
  output logic               byte_valid,
  output logic [7:0]         byte_data,
  output logic               sample_valid,
  output logic signed [15:0] sample,
  output logic               framing_error
);

  typedef enum logic [1:0] {R_IDLE, R_START, R_DATA, R_STOP} rx_state_t;

  rx_state_t rstate;
  int unsigned cnt;
  int unsigned nbit;
  logic [7:0] shreg;
  logic       have_msb;
  logic [7:0] msb;
  logic       rx_q;

  always_ff @(posedge clk) begin
    byte_valid    <= 1'b0;
    sample_valid  <= 1'b0;
    framing_error <= 1'b0;
    rx_q          <= rx;
    if (rst) begin
      rstate   <= R_IDLE;
      cnt      <= 0;
      nbit     <= 0;
      have_msb <= 1'b0;
      rx_q     <= 1'b1;
    end else begin
      unique case (rstate)
        R_IDLE: if (rx_q && !rx) begin
          rstate <= R_START;
          cnt    <= 1;
        end
        R_START: begin
          if (cnt == CLKS_PER_BIT / 2) begin
            if (rx) begin
              framing_error <= 1'b1;
              rstate        <= R_IDLE;
            end else begin
              rstate <= R_DATA;
              cnt    <= 0;
              nbit   <= 0;
            end
          end else cnt <= cnt + 1;
        end
        R_DATA: begin
          if (cnt == CLKS_PER_BIT - 1) begin
            cnt   <= 0;
            shreg <= {rx, shreg[7:1]};
            if (nbit == 7) rstate <= R_STOP;
            nbit <= nbit + 1;
          end else cnt <= cnt + 1;
        end
        R_STOP: begin
          if (cnt == CLKS_PER_BIT - 1) begin
            rstate <= R_IDLE;
            if (!rx) framing_error <= 1'b1;
            else begin
              byte_valid <= 1'b1;
              byte_data  <= shreg;
              if (have_msb) begin
                sample_valid <= 1'b1;
                sample       <= {msb, shreg};
                have_msb     <= 1'b0;
              end else begin
                msb      <= shreg;
                have_msb <= 1'b1;
              end
            end
          end else cnt <= cnt + 1;
        end
        default: rstate <= R_IDLE;
      endcase
    end
  end

endmodule
