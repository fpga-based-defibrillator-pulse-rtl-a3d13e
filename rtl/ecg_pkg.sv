// ecg_pkg: types and constants shared by the ECG-over-UART streaming design.
//
// It holds the sample and byte widths, the state encoding of the transmit
// controller, and the function that fills the sample memory when no
// initialisation file is given.
//
// The 16-bit signed sample width and the 8-bit UART byte follow the design
// description. The state encoding and the built-in test waveform are this
// design's own choices: the real design loads samples taken from a recorded
// ECG data set, converted to 16-bit two's complement.
package ecg_pkg;

  localparam int unsigned SAMPLE_W = 16;  // one ECG sample per memory word
  localparam int unsigned BYTE_W   = 8;   // one UART frame carries one byte

  // Transmit controller states. led[3:0] on the board shows this code.
  typedef enum logic [3:0] {
    S_IDLE     = 4'd0,  // wait for the synchronised start button
    S_READ     = 4'd1,  // address on the memory bus, first latency cycle
    S_WAIT     = 4'd2,  // second memory latency cycle
    S_CAPTURE  = 4'd3,  // memory output valid, copied into the sample register
    S_SEND_MSB = 4'd4,  // pulse tx_start with the upper byte
    S_WAIT_MSB = 4'd5,  // wait until the transmitter is idle again
    S_SEND_LSB = 4'd6,  // pulse tx_start with the lower byte
    S_WAIT_LSB = 4'd7,  // wait until the transmitter is idle again
    S_NEXT     = 4'd8   // advance the address or end the record
  } tx_state_t;

  // Built-in test waveform: a synthetic ECG beat repeated every 256 samples,
  // in signed 16-bit counts. Within one beat t = idx mod 256:
  //   P wave  t in [20,40):  triangle, peak +300 at t = 30
  //   Q dip   t in [60,64):  -100 * (t - 59)
  //   R peak  t in [64,72):  triangle, peak +8000 at t = 68
  //   S dip   t in [72,78):  -1200
  //   T wave  t in [110,150): triangle, peak +1200 at t = 130
  //   elsewhere a baseline of -50.
  function automatic logic signed [SAMPLE_W-1:0] synth_ecg_sample(int unsigned idx);
    int t;
    int v;
    t = int'(idx % 256);
    if (t >= 20 && t < 40)        v = 300 - 30 * ((t > 30) ? (t - 30) : (30 - t));
    else if (t >= 60 && t < 64)   v = -100 * (t - 59);
    else if (t >= 64 && t < 72)   v = 8000 - 2000 * ((t > 68) ? (t - 68) : (68 - t));
    else if (t >= 72 && t < 78)   v = -1200;
    else if (t >= 110 && t < 150) v = 1200 - 60 * ((t > 130) ? (t - 130) : (130 - t));
    else                          v = -50;
    return SAMPLE_W'(v);
  endfunction

endpackage
