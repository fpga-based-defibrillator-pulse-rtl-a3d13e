// ecg_uart_full_tb: one complete record at full size.
//
// The top runs with all its defaults: 100 MHz clock, 9600 baud
// (10417 clock cycles per bit), 2048 samples, built-in synthetic ECG. A host
// model decodes the serial line. The test presses start once and checks that
// all 2048 samples arrive in order with the values of the synthetic waveform
// (recomputed here from its formula), that there are no framing errors, that
// the record takes 2048 * (20 * 10417 + 8) clock cycles (about 4.27 s), and
// that the design then idles. About 427 million clock cycles are simulated.
module ecg_uart_full_tb;
  localparam int unsigned N   = 2048;
  localparam int unsigned CPB = 10417;
  localparam longint REC_CYCLES = longint'(N) * (20 * CPB + 8);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst;
  logic       start;
  logic       tx;
  logic [3:0] led;

  ecg_uart_top dut (.clk(clk), .rst(rst), .start(start), .tx(tx), .led(led));

  logic               byte_valid;
  logic [7:0]         byte_data;
  logic               sample_valid;
  logic signed [15:0] sample;
  logic               framing_error;

  rpi_uart_rx_model #(.CLKS_PER_BIT(CPB)) u_host (
    .clk(clk), .rst(rst), .rx(tx), .byte_valid(byte_valid), .byte_data(byte_data),
    .sample_valid(sample_valid), .sample(sample), .framing_error(framing_error));

  // Synthetic beat, period 256 samples (see the memory's default contents).
  function automatic logic signed [15:0] ref_synth(int unsigned i);
    int t = int'(i % 256);
    int v;
    int d;
    if (t >= 20 && t < 40)        begin d = t - 30;  if (d < 0) d = -d; v = 300 - 30 * d;  end
    else if (t >= 60 && t < 64)   v = -100 * (t - 59);
    else if (t >= 64 && t < 72)   begin d = t - 68;  if (d < 0) d = -d; v = 8000 - 2000 * d; end
    else if (t >= 72 && t < 78)   v = -1200;
    else if (t >= 110 && t < 150) begin d = t - 130; if (d < 0) d = -d; v = 1200 - 60 * d; end
    else                          v = -50;
    return v[15:0];
  endfunction

  int checks = 0;
  int failures = 0;
  int rx_index = 0;
  int rx_bad = 0;
  int n_framing = 0;
  int n_peaks = 0;
  longint cyc = 0;
  longint done_at = -1;

  always @(posedge clk) begin
    cyc++;
    if (!rst && sample_valid) begin
      if (sample !== ref_synth(rx_index)) begin
        rx_bad++;
        if (rx_bad < 10) $display("sample %0d: got %h expected %h", rx_index, sample, ref_synth(rx_index));
      end
      if (sample == 16'sd8000) n_peaks++;
      rx_index++;
    end
    if (!rst && framing_error) n_framing++;
    if (!rst && dut.record_done && done_at < 0) done_at = cyc;
  end

  initial begin
    #(64'd10 * 64'd450_000_000);
    failures++;
    $display("watchdog expired after %0d samples", rx_index);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  longint t0;

  initial begin
    rst = 1'b1;
    start = 1'b0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (10) @(negedge clk);
    start = 1'b1;
    t0 = cyc;
    repeat (100) @(negedge clk);
    start = 1'b0;
    while (done_at < 0) @(negedge clk);
    repeat (2 * CPB) @(negedge clk);
    check($sformatf("samples received %0d", rx_index), rx_index == N);
    check($sformatf("sample mismatches %0d", rx_bad), rx_bad == 0);
    check("no framing errors", n_framing == 0);
    check($sformatf("R peaks %0d", n_peaks), n_peaks == N / 256);
    check($sformatf("record length %0d", done_at - t0), done_at - t0 == REC_CYCLES + 5);
    check("idle after record", led == 4'd0 && tx === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
