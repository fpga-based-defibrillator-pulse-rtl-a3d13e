// ecg_bram: read-only block RAM that stores the ECG record, one sample per
// address.
//
// Address n holds sample n of the record as a 16-bit two's complement word.
// The read path has two register stages, like a block RAM with its output
// register enabled: the array is read into a first register on the clock
// edge after the address is presented, and that value moves to the output
// register on the next edge. dout therefore shows mem[addr] two clock cycles
// after addr is applied, which is why the controller waits two cycles before
// it captures the data.
//
// Contents: when INIT_FILE names a hex file (one word per line, read with
// $readmemh, path relative to the simulation directory) it is loaded;
// otherwise every word is filled with the built-in synthetic ECG waveform of
// ecg_pkg::synth_ecg_sample. On an FPGA both forms become the memory's
// power-up contents. The memory is never written at run time.
//
// Follows the design description: 16-bit data, depth set by the number of
// samples (2048 in the reference record), static contents, two-cycle access.
// The built-in waveform and the file format are this design's own choices.
module ecg_bram
  import ecg_pkg::*;
#(
  parameter int unsigned DATA_W    = SAMPLE_W,
  parameter int unsigned DEPTH     = 2048,
  parameter int unsigned ADDR_W    = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  parameter string       INIT_FILE = ""
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  output logic [DATA_W-1:0] dout
);

  logic [DATA_W-1:0] mem [DEPTH];
  logic [DATA_W-1:0] rd_q;

  initial begin
    if (INIT_FILE != "") begin
      $readmemh(INIT_FILE, mem);
    end else begin
      for (int unsigned i = 0; i < DEPTH; i++) begin
        mem[i] = DATA_W'(synth_ecg_sample(i));
      end
    end
  end

  always_ff @(posedge clk) begin
    rd_q <= mem[addr];
    dout <= rd_q;
  end

endmodule
