// ecg_tx_controller_tb: self-checking test of the transmit controller.
//
// The controller (8 samples) is surrounded by two small models: a memory with
// the same two-cycle read latency as ecg_bram, holding distinct random words,
// and a transmitter that stays busy for F = 13 cycles after each accepted
// byte. A monitor logs every accepted byte with its clock-edge number.
// Checks:
//   - the bytes are mem[0][15:8], mem[0][7:0], mem[1][15:8], ... in order;
//   - the first byte is accepted 8 edges after start rises (3 synchroniser
//     edges, then IDLE, READ, WAIT, CAPTURE, SEND_MSB);
//   - the upper and lower byte of a sample are F + 2 edges apart, and
//     consecutive samples 2 * F + 8 edges apart;
//   - tx_start never comes while the transmitter is busy;
//   - record_done pulses once per record and the controller then idles when
//     start is low, or starts the record again when start is still held;
//   - led shows the state code, and reset in mid-record returns to idle.
module ecg_tx_controller_tb;
  import ecg_pkg::*;
  localparam int unsigned N = 8;
  localparam int unsigned F = 13;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst;
  logic        start;
  logic [2:0]  bram_addr;
  logic [15:0] bram_data;
  logic [7:0]  tx_data;
  logic        tx_start;
  logic        tx_busy;
  tx_state_t   state;
  logic [3:0]  led;
  logic        record_done;

  ecg_tx_controller #(.NUM_SAMPLES(N)) dut (
    .clk(clk), .rst(rst), .start(start), .bram_addr(bram_addr), .bram_data(bram_data),
    .tx_data(tx_data), .tx_start(tx_start), .tx_busy(tx_busy), .state(state), .led(led),
    .record_done(record_done));

  // Memory model, two register stages.
  logic [15:0] mem [N];
  logic [15:0] rd_q;
  always_ff @(posedge clk) begin
    rd_q      <= mem[bram_addr];
    bram_data <= rd_q;
  end

  // Transmitter model.
  int unsigned busy_left;
  always_ff @(posedge clk) begin
    if (rst) begin
      busy_left <= 0;
      tx_busy   <= 1'b0;
    end else if (!tx_busy && tx_start) begin
      busy_left <= F - 1;
      tx_busy   <= 1'b1;
    end else if (tx_busy) begin
      if (busy_left == 0) tx_busy <= 1'b0;
      else busy_left <= busy_left - 1;
    end
  end

  int checks = 0;
  int failures = 0;
  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Monitor.
  longint edge_no = 0;
  logic [7:0] got_bytes [$];
  longint     got_edges [$];
  int         done_count = 0;
  int         busy_violations = 0;
  int         led_mismatch = 0;
  always @(posedge clk) begin
    edge_no++;
    if (!rst && tx_start) begin
      if (tx_busy) busy_violations++;
      else begin
        got_bytes.push_back(tx_data);
        got_edges.push_back(edge_no);
      end
    end
    if (!rst && record_done) done_count++;
    if (led !== 4'(state)) led_mismatch++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit check_record(int first_byte, longint t0);
    bit ok = 1;
    for (int s = 0; s < N; s++) begin
      int b = first_byte + 2 * s;
      if (got_bytes[b] !== mem[s][15:8] || got_bytes[b + 1] !== mem[s][7:0]) begin
        ok = 0;
        $display("sample %0d: got %h%h expected %h", s, got_bytes[b], got_bytes[b + 1], mem[s]);
      end
      if (got_edges[b + 1] - got_edges[b] != F + 2) begin
        ok = 0;
        $display("sample %0d: byte spacing %0d", s, got_edges[b + 1] - got_edges[b]);
      end
      if (s > 0 && got_edges[b] - got_edges[b - 2] != 2 * F + 8) begin
        ok = 0;
        $display("sample %0d: sample spacing %0d", s, got_edges[b] - got_edges[b - 2]);
      end
    end
    if (t0 >= 0 && got_edges[first_byte] - t0 != 8) begin
      ok = 0;
      $display("first byte %0d edges after start", got_edges[first_byte] - t0);
    end
    return ok;
  endfunction

  longint t_start;
  int n_before;

  initial begin
    for (int i = 0; i < N; i++) mem[i] = 16'($urandom) ^ 16'(i << 12);
    rst = 1'b1;
    start = 1'b0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    repeat (5) @(negedge clk);
    check("idle after reset", state == S_IDLE && led == 4'd0);

    // 1: short start press, one record.
    start = 1'b1;
    t_start = edge_no;
    repeat (5) @(negedge clk);
    start = 1'b0;
    while (done_count < 1) @(negedge clk);
    repeat (4 * F) @(negedge clk);
    check("one record of 2N bytes", got_bytes.size() == 2 * N);
    check("record 1 bytes and timing", check_record(0, t_start));
    check("idle after record", state == S_IDLE);

    // 2: start held: the record repeats.
    @(negedge clk) start = 1'b1;
    t_start = edge_no;
    while (done_count < 2) @(negedge clk);
    while (got_bytes.size() < 2 * N + 1) @(negedge clk);
    check("record 2 bytes and timing", check_record(2 * N, t_start));
    check("held start restarts the record", got_bytes[2 * N] === mem[0][15:8]);
    @(negedge clk) start = 1'b0;   // release during record 3: it completes
    while (done_count < 3) @(negedge clk);
    repeat (4 * F) @(negedge clk);
    check("record 3 complete", got_bytes.size() == 6 * N);
    check("record 3 bytes and timing", check_record(4 * N, -1));

    // 3: reset in mid-record.
    @(negedge clk) start = 1'b1;
    repeat (3 * F) @(negedge clk);
    start = 1'b0;
    rst = 1'b1;
    @(negedge clk) rst = 1'b0;
    n_before = got_bytes.size();
    check("reset in mid-record goes idle", state == S_IDLE);
    repeat (6 * F) @(negedge clk);
    check("no bytes after reset", got_bytes.size() == n_before);

    check("tx_start never while busy", busy_violations == 0);
    check("led follows state", led_mismatch == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
