// ecg_bram_tb: self-checking test of the ECG sample memory.
//
// Two instances are checked. One is loaded from tb/ecg_test16.hex (16 words:
// six reference samples followed by edge values such as 0x8000 and 0x7fff);
// the other, with no file, must hold the built-in synthetic ECG, which this
// testbench recomputes from its formula. Addresses change every clock cycle
// and each output is compared with the word addressed two cycles earlier,
// which checks the two-cycle read latency as well as the contents.
module ecg_bram_tb;
  localparam int unsigned N_FILE  = 16;
  localparam int unsigned N_SYNTH = 512;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  addr_f;
  logic [15:0] dout_f;
  logic [8:0]  addr_s;
  logic [15:0] dout_s;

  ecg_bram #(.DEPTH(N_FILE), .INIT_FILE("tb/ecg_test16.hex")) u_file (
    .clk(clk), .addr(addr_f), .dout(dout_f));
  ecg_bram #(.DEPTH(N_SYNTH)) u_synth (
    .clk(clk), .addr(addr_s), .dout(dout_s));

  int checks = 0;
  int failures = 0;

  logic [15:0] file_words [N_FILE] = '{
    16'h0ba3, 16'h0ebd, 16'h0df7, 16'h06fb, 16'h0254, 16'h03e1, 16'hffce, 16'hfc18,
    16'h1f40, 16'h8000, 16'h7fff, 16'hf830, 16'h0000, 16'hffff, 16'h0123, 16'ha5c3};

  // Reference synthetic beat, period 256 samples.
  function automatic logic [15:0] ref_synth(int unsigned i);
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

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [15:0] got, logic [15:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  logic [3:0] hist_f [3];
  logic [8:0] hist_s [3];
  bit seen_peak = 0;

  initial begin
    addr_f = 0;
    addr_s = 0;
    // Sequential walk, then random addresses, one new address per cycle.
    for (int k = 0; k < 2 * N_SYNTH + 200; k++) begin
      @(negedge clk);
      if (k >= 2) begin
        check("file word", dout_f, file_words[hist_f[1]]);
        check("synthetic word", dout_s, ref_synth(32'(hist_s[1])));
        if (ref_synth(32'(hist_s[1])) == 16'd8000) seen_peak = 1;
      end
      if (k < N_SYNTH) begin
        addr_f = 4'(k);
        addr_s = 9'(k);
      end else begin
        addr_f = 4'($urandom);
        addr_s = 9'($urandom);
      end
      hist_f[2] = hist_f[1]; hist_f[1] = hist_f[0]; hist_f[0] = addr_f;
      hist_s[2] = hist_s[1]; hist_s[1] = hist_s[0]; hist_s[0] = addr_s;
    end
    // Latency: hold an address, change it, the output changes exactly two edges later.
    @(negedge clk); addr_f = 4'd0;
    repeat (3) @(negedge clk);
    addr_f = 4'd9;
    @(negedge clk); check("one edge later still old word", dout_f, 16'h0ba3);
    @(negedge clk); check("two edges later new word", dout_f, 16'h8000);
    checks++;
    if (!seen_peak) begin failures++; $display("FAIL R peak never read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
