// uart_tx_tb: self-checking test of the 8N1 serial transmitter.
//
// The transmitter runs with CLKS_PER_BIT = 10 (CLK_HZ 1000, BAUD 100). The
// testbench sends random bytes, some back to back and some after idle gaps,
// and decodes the line itself by sampling every bit in its centre: the start
// bit must be 0, the data bits LSB first, the stop bit 1. It checks that
// tx_busy is high for exactly 10 * CLKS_PER_BIT cycles per byte, that a
// tx_start pulse during a frame is ignored, that the line idles high, and
// that the default parameters give round(100 MHz / 9600) = 10417 cycles per
// bit.
module uart_tx_tb;
  localparam int unsigned CPB = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst;
  logic       tx_start;
  logic [7:0] tx_data;
  logic       tx;
  logic       tx_busy;

  uart_tx #(.CLK_HZ(1000), .BAUD(100)) dut (
    .clk(clk), .rst(rst), .tx_start(tx_start), .tx_data(tx_data), .tx(tx), .tx_busy(tx_busy));

  // Default-parameter instance, only its bit period is checked.
  logic tx_d, busy_d;
  uart_tx u_default (
    .clk(clk), .rst(rst), .tx_start(1'b0), .tx_data(8'h00), .tx(tx_d), .tx_busy(busy_d));

  int checks = 0;
  int failures = 0;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Send one byte: pulse tx_start for one cycle, then decode the line.
  // If 'poke' is set, a second tx_start with other data is pulsed mid-frame.
  task automatic send_and_check(logic [7:0] b, bit poke);
    logic [7:0] got;
    int busy_cycles;
    @(negedge clk);
    check("idle before send", tx === 1'b1 && tx_busy === 1'b0);
    tx_start = 1'b1;
    tx_data  = b;
    @(negedge clk);              // accepting edge has passed
    tx_start = 1'b0;
    tx_data  = ~b;
    busy_cycles = 0;
    // Half a cycle after the accepting edge; bit i occupies loop steps
    // [i*CPB, (i+1)*CPB).
    for (int c = 0; c < 10 * CPB + 5; c++) begin
      if (tx_busy) busy_cycles++;
      if (c == CPB / 2)               check("start bit", tx === 1'b0);
      for (int i = 0; i < 8; i++)
        if (c == (i + 1) * CPB + CPB / 2) got[i] = tx;
      if (c == 9 * CPB + CPB / 2)     check("stop bit", tx === 1'b1);
      if (poke && c == 3 * CPB) begin
        tx_start = 1'b1;
        tx_data  = 8'h5a ^ b;
      end
      if (poke && c == 3 * CPB + 1) tx_start = 1'b0;
      @(negedge clk);
    end
    check($sformatf("data byte %h got %h", b, got), got === b);
    check($sformatf("busy cycles %0d", busy_cycles), busy_cycles == 10 * CPB);
  endtask

  initial begin
    rst = 1'b1;
    tx_start = 1'b0;
    tx_data = 8'h00;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    check("default bit period", u_default.CLKS_PER_BIT == 10417);
    send_and_check(8'h0b, 1'b0);
    send_and_check(8'ha3, 1'b0);
    send_and_check(8'h00, 1'b0);
    send_and_check(8'hff, 1'b0);
    send_and_check(8'h81, 1'b1);
    for (int k = 0; k < 20; k++) begin
      send_and_check(8'($urandom), k % 4 == 0);
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    // A start pulse during reset must not begin a frame.
    @(negedge clk); rst = 1'b1; tx_start = 1'b1; tx_data = 8'h00;
    @(negedge clk); rst = 1'b0; tx_start = 1'b0;
    repeat (CPB) begin
      @(negedge clk);
      check("idle after reset", tx === 1'b1 && tx_busy === 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
