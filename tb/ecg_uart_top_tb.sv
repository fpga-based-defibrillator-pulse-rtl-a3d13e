// ecg_uart_top_tb: end-to-end test of the ECG streaming design.
//
// The top runs at a reduced size: 16 samples loaded from tb/ecg_test16.hex and
// a bit period of 10 clock cycles (CLK_HZ 96000, BAUD 9600). A host model on
// the serial line rebuilds signed samples from byte pairs. The test
//   1. presses start briefly and checks one full record, sample by sample,
//      and that the record takes 16 * (20 * 10 + 8) cycles;
//   2. holds start and checks that records follow each other with one idle
//      cycle between them;
//   3. resets in mid-record and checks that the line goes quiet, then runs a
//      clean record again.
// It counts each mechanism of the design and fails if one never happened:
// start synchronised, two-cycle memory waits, upper/lower byte splitting,
// waits on a busy transmitter, end of record, record repetition with start
// held, negative samples, reset in mid-record.
module ecg_uart_top_tb;
  import ecg_pkg::*;
  localparam int unsigned N   = 16;
  localparam int unsigned CPB = 10;
  localparam longint REC_CYCLES = longint'(N) * (20 * CPB + 8);

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst;
  logic       start;
  logic       tx;
  logic [3:0] led;

  ecg_uart_top #(.CLK_HZ(96000), .BAUD(9600), .NUM_SAMPLES(N), .INIT_FILE("tb/ecg_test16.hex")) dut (
    .clk(clk), .rst(rst), .start(start), .tx(tx), .led(led));

  logic               byte_valid;
  logic [7:0]         byte_data;
  logic               sample_valid;
  logic signed [15:0] sample;
  logic               framing_error;

  rpi_uart_rx_model #(.CLKS_PER_BIT(CPB)) u_host (
    .clk(clk), .rst(rst), .rx(tx), .byte_valid(byte_valid), .byte_data(byte_data),
    .sample_valid(sample_valid), .sample(sample), .framing_error(framing_error));

  logic signed [15:0] expected [N] = '{
    16'sh0ba3, 16'sh0ebd, 16'sh0df7, 16'sh06fb, 16'sh0254, 16'sh03e1, 16'shffce, 16'shfc18,
    16'sh1f40, 16'sh8000, 16'sh7fff, 16'shf830, 16'sh0000, 16'shffff, 16'sh0123, 16'sha5c3};

  int checks = 0;
  int failures = 0;
  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Mechanism counters and the received stream.
  int n_records_started = 0;
  int n_mem_waits = 0;
  int n_msb = 0;
  int n_lsb = 0;
  int n_busy_wait = 0;
  int n_record_done = 0;
  int n_repeat = 0;
  int n_negative = 0;
  int n_reset_mid = 0;
  int n_framing = 0;
  int rx_index = 0;
  int rx_bad = 0;
  longint cyc = 0;
  longint done_at [$];
  tx_state_t st_q = S_IDLE;

  always @(posedge clk) begin
    cyc++;
    if (!rst) begin
      if (st_q == S_IDLE && dut.state == S_READ) begin
        n_records_started++;
        if (dut.u_ctrl.start_sync !== 3'b111) $display("record began without synchronised start");
      end
      if (dut.state == S_WAIT) n_mem_waits++;
      if (dut.state == S_SEND_MSB) n_msb++;
      if (dut.state == S_SEND_LSB) n_lsb++;
      if ((dut.state == S_WAIT_MSB || dut.state == S_WAIT_LSB) && dut.tx_busy) n_busy_wait++;
      if (dut.record_done) begin
        n_record_done++;
        done_at.push_back(cyc);
      end
      if (framing_error) n_framing++;
      if (sample_valid) begin
        if (sample !== expected[rx_index % N]) begin
          rx_bad++;
          $display("sample %0d: got %h expected %h", rx_index, sample, expected[rx_index % N]);
        end
        if (sample < 0) n_negative++;
        rx_index++;
      end
    end
    st_q <= dut.state;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint t0;
  int n_before;

  initial begin
    rst = 1'b1;
    start = 1'b0;
    repeat (5) @(negedge clk);
    rst = 1'b0;
    repeat (20) @(negedge clk);
    check("line idle high", tx === 1'b1 && led == 4'd0);

    // 1: one record.
    start = 1'b1;
    t0 = cyc;
    repeat (10) @(negedge clk);
    start = 1'b0;
    while (n_record_done < 1) @(negedge clk);
    repeat (3 * CPB) @(negedge clk);
    check("first record: all samples received", rx_index == N);
    check("first record: values", rx_bad == 0);
    // start rises after edge t0; 3 synchroniser edges and the idle edge start
    // the record at edge t0 + 4; record_done is set REC_CYCLES edges later and
    // is seen by the monitor on the edge after that.
    check($sformatf("first record length %0d", done_at[0] - t0), done_at[0] - t0 == REC_CYCLES + 5);
    check("idle after record", led == 4'd0 && tx === 1'b1);

    // 2: start held for more than two records.
    start = 1'b1;
    while (n_record_done < 3) @(negedge clk);
    n_repeat = n_record_done - 2;
    check($sformatf("repeat period %0d", done_at[2] - done_at[1]), done_at[2] - done_at[1] == REC_CYCLES + 1);
    start = 1'b0;
    while (n_record_done < 4) @(negedge clk);
    repeat (3 * CPB) @(negedge clk);
    check("four records received", rx_index == 4 * N && rx_bad == 0);

    // 3: reset in mid-record, then a clean record.
    start = 1'b1;
    repeat (N * (20 * CPB + 8) / 2 + 3 * CPB) @(negedge clk);
    start = 1'b0;
    rst = 1'b1;
    n_reset_mid++;
    @(negedge clk);
    rst = 1'b0;
    check("reset returns to idle", led == 4'd0);
    repeat (2) @(negedge clk);
    check("line idle after reset", tx === 1'b1);
    n_before = rx_index;
    repeat (30 * CPB) @(negedge clk);
    check("quiet after reset", rx_index == n_before);
    // The host saw a record cut short; start its next record clean.
    rx_index = 0;
    start = 1'b1;
    repeat (10) @(negedge clk);
    start = 1'b0;
    while (n_record_done < 5) @(negedge clk);
    repeat (3 * CPB) @(negedge clk);
    check("record after reset", rx_index == N && rx_bad == 0);

    // Mechanism coverage.
    $display("records started %0d, memory waits %0d, upper bytes %0d, lower bytes %0d, busy waits %0d",
             n_records_started, n_mem_waits, n_msb, n_lsb, n_busy_wait);
    $display("records done %0d, repeats %0d, negative samples %0d, mid-record resets %0d",
             n_record_done, n_repeat, n_negative, n_reset_mid);
    check("start synchronised", n_records_started == 6);
    check("memory waits", n_mem_waits > 0);
    // The mid-record reset may fall between the two bytes of a sample.
    check("upper/lower split", n_lsb > 0 && n_msb - n_lsb <= 1);
    check("busy waits", n_busy_wait > 0);
    check("end of record", n_record_done == 5);
    check("repetition with start held", n_repeat > 0);
    check("negative samples", n_negative > 0);
    check("reset in mid-record", n_reset_mid > 0);
    check("no framing errors", n_framing == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
