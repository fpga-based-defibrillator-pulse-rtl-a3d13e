# ECG record streamer: block RAM to UART on an FPGA

This design plays back a stored electrocardiogram (ECG) from an FPGA to a
host computer over a plain serial line. The host rebuilds the signal and
classifies the rhythm in software as normal or abnormal. The FPGA side is
kept deliberately small:

- The ECG record sits in on-chip block RAM. Each address holds one sample as a
  16-bit two's complement word. The reference record has 2048 samples.
- When the start button is pressed, a controller reads the samples in
  address order. Each sample goes out as two UART bytes, upper byte first.
- The serial line runs at 9600 baud with 8N1 frames. The host pairs the bytes
  again and rebuilds each signed sample.

The target board is a Basys3 (Artix-7, 100 MHz oscillator). The code is
plain synthesizable SystemVerilog and uses no vendor primitives.

```
             +-------------------+  bram_addr  +-----------+
 start ----->| ecg_tx_controller |------------>| ecg_bram  |
             |                   |<------------| 2048 x 16 |
             |  sync -> FSM ->   |  bram_data  +-----------+
             |  capture reg ->   |
             |  byte mux         |  tx_data, tx_start  +---------+
             |                   |-------------------->| uart_tx |---> tx
             |                   |<--------------------|  8N1    |
             +-------------------+       tx_busy       +---------+
                   | led[3:0] = state code
```

## Sending one sample

Most of the design's behaviour lives in the controller
(`rtl/ecg_tx_controller.sv`). It handles each address as a fixed sequence of
states. The state codes come from `rtl/ecg_pkg.sv` and are also shown on
`led[3:0]`.

| code | state        | what happens                                             | cycles |
|------|--------------|----------------------------------------------------------|--------|
| 0    | `S_IDLE`     | address counter cleared; leave when `start_pulse` is high | -      |
| 1    | `S_READ`     | address on `bram_addr`, first memory latency cycle       | 1      |
| 2    | `S_WAIT`     | second memory latency cycle                              | 1      |
| 3    | `S_CAPTURE`  | `bram_data` copied into `captured_data`                  | 1      |
| 4    | `S_SEND_MSB` | `tx_start` high, `tx_data = captured_data[15:8]`         | 1      |
| 5    | `S_WAIT_MSB` | hold until `tx_busy` is low                              | F + 1  |
| 6    | `S_SEND_LSB` | `tx_start` high, `tx_data = captured_data[7:0]`          | 1      |
| 7    | `S_WAIT_LSB` | hold until `tx_busy` is low                              | F + 1  |
| 8    | `S_NEXT`     | next address, or back to idle after the last one         | 1      |

F is the length of one UART frame: 10 × `CLKS_PER_BIT` = 104 170 cycles at
100 MHz and 9600 baud. One sample therefore takes 2F + 8 = 208 348 cycles.
A whole 2048-sample record takes 426.7 million cycles, about 4.27 s. Almost
all of that time is spent waiting on the serial line. The memory and control
overhead is 8 cycles per sample.

Details that matter when changing the controller:

- **Memory latency.** `ecg_bram` has two register stages, so `dout` shows
  `mem[addr]` two edges after `addr` changes. `S_READ` and `S_WAIT` cover
  those two edges. If the memory is made faster or slower, the number of wait
  states must change with it. The controller testbench has a memory model with
  the same latency and catches a mismatch.
- **Busy handshake.** `uart_tx` raises `tx_busy` on the same edge that accepts
  `tx_start`. The cycle after a send state therefore already sees the line
  busy. The controller moves on one cycle after `tx_busy` falls. An assertion
  in the controller checks that `tx_start` never comes while `tx_busy` is high.
- **Byte selection.** `tx_data` is a multiplexer on the captured word. It
  shows the upper byte in `S_SEND_MSB` and `S_WAIT_MSB`, and the lower byte
  otherwise. The transmitter copies the byte when it accepts it, so the
  multiplexer only has to be right in the send state.
- **Start button.** `start` goes through a three-flop synchroniser
  (`start_sync`). Its last stage, `start_pulse`, is used as a level, not as a
  one-cycle edge. A record begins whenever the controller is idle and the
  synchronised button is high. A short press sends one record. A held button
  restarts the record at address 0 after one idle cycle, so the stream repeats
  until the button is released. Releasing the button in the middle of a record
  lets that record finish.
- **Reset.** `rst` is synchronous and active high. It returns the controller
  to `S_IDLE` with address 0 and puts the line in its idle-high state. The
  memory contents are not affected.
- `record_done` pulses for one cycle after the last sample of each record. It
  is brought out of the controller for testbenches and for any logic you add;
  the top does not use it.

## The sample memory

`rtl/ecg_bram.sv` is an inferred read-only memory, `DEPTH × DATA_W` (default
2048 × 16), with a read register and an output register. On an FPGA it maps
to block RAM with the output register enabled. Its contents are set once, at
configuration:

- **`INIT_FILE` set.** The file is read with `$readmemh`: one hexadecimal word
  per line, the sample at address n on line n. To stream a real recording,
  scale it to signed 16-bit integers, write each as four hex digits in two's
  complement, and pass the file name as `INIT_FILE` on `ecg_uart_top`. The path
  is relative to the directory the simulator or synthesis tool runs in.
- **`INIT_FILE` empty (default).** The memory is filled with a synthetic ECG
  computed by `ecg_pkg::synth_ecg_sample`. This placeholder lets the design be
  built and tested without a recording. It repeats one beat every 256 samples,
  at a baseline of −50 counts:

  | feature | samples (t = index mod 256) | shape                    |
  |---------|-----------------------------|--------------------------|
  | P wave  | 20–39                       | triangle, peak +300      |
  | Q dip   | 60–63                       | −100 × (t − 59)          |
  | R peak  | 64–71                       | triangle, peak +8000     |
  | S dip   | 72–77                       | −1200                    |
  | T wave  | 110–149                     | triangle, peak +1200     |

  All values lie within ±16384, so bit 14 always equals the sign bit. A
  synthesis tool may therefore store the default contents in 15 bits per word.

The memory has no write port. Changing the record means re-running
synthesis, or updating the bitstream's memory contents.

## The serial link

`rtl/uart_tx.sv` sends 8N1 frames: a start bit (0), eight data bits LSB
first, and a stop bit (1). Each bit lasts `CLKS_PER_BIT` clock cycles,
computed as round(`CLK_HZ` / `BAUD`) = 10417. At 100 MHz that gives 9599.7
baud, 0.003 % slow. A byte is accepted on an edge where `tx_start` is high and
`tx_busy` is low. `tx_busy` then stays high for exactly 10 × `CLKS_PER_BIT`
cycles. A `tx_start` during a frame is ignored.

On the line, sample `0x0BA3` becomes the frame for `0x0B` followed by the
frame for `0xA3`. The receiver treats the first byte of each pair as the
upper byte. Nothing in the stream marks sample or record boundaries. A host
that starts listening in the middle of a byte pair stays misaligned until it
is reset. The testbenches' host model starts in step with the FPGA because
both share one reset.

## Parameters

On `ecg_uart_top`:

| parameter     | default     | meaning                                     |
|---------------|-------------|---------------------------------------------|
| `CLK_HZ`      | 100 000 000 | clock frequency, sets the bit period        |
| `BAUD`        | 9600        | serial rate                                 |
| `NUM_SAMPLES` | 2048        | record length = memory depth; address width is $clog2 of it |
| `INIT_FILE`   | `""`        | record to load; empty for the synthetic ECG |

The 16-bit sample width (`ecg_pkg::SAMPLE_W`) is fixed by the two-byte
format.

## Where the design comes from, and what was chosen here

These points follow the published description of the system:

- the block RAM store of 16-bit two's complement samples, one per address;
- the 2048-sample record;
- sequential address generation;
- two clock cycles for the synchronous memory read;
- a temporary register for the read sample;
- the split into two 8-bit UART frames, upper byte first;
- 9600 baud;
- sending a new byte only after the busy signal shows the previous frame is
  done;
- a start input that launches the state machine;
- the signal names `start_sync`, `start_pulse`, `mem_addr_counter`,
  `captured_data`, `state`, `led`, `tx_data`, `tx_start` and `tx_busy`.

These points are choices made for this RTL:

- the 100 MHz clock (the board's oscillator);
- the 8N1 frame and the rounding of the bit period;
- the state encoding, and showing it on the LEDs;
- treating the synchronised start as a level, and repeating the record while
  it is held;
- synchronous active-high reset;
- `$readmemh` instead of the vendor's COE initialisation format;
- the synthetic default waveform.

Known differences from the reference implementation:

- The vendor memory core there has a 17-bit address and 18-bit data port;
  only the low 16 data bits were used. Here the memory is exactly 11 × 16.
- The reference state codes are not known, so `led[3:0]` values will differ.

Outside this RTL are the data preparation (scaling a recording and writing
the memory file) and everything on the host: reception, signal
reconstruction, heart-rate analysis and the random-forest classifier that
labels the rhythm.

## Files

| file | contents |
|------|----------|
| `rtl/ecg_pkg.sv` | widths, state type, synthetic-ECG function |
| `rtl/ecg_bram.sv` | sample memory |
| `rtl/uart_tx.sv` | 8N1 transmitter |
| `rtl/ecg_tx_controller.sv` | start synchroniser, address counter, FSM, byte multiplexer |
| `rtl/ecg_uart_top.sv` | board top |
| `tb/rpi_uart_rx_model.sv` | host-side receiver model: decodes frames, pairs bytes into signed samples |
| `tb/ecg_test16.hex` | 16-word test record |
| `tb/*_tb.sv` | self-checking testbenches |

## Simulating

All testbenches print `TB_RESULT checks=N failures=M` and finish, and each
has a watchdog. Run them from the directory that holds `rtl/` and `tb/`,
because the test record is loaded as `tb/ecg_test16.hex`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module ecg_uart_top_tb \
    -Irtl -y rtl -y tb +libext+.sv rtl/ecg_pkg.sv tb/ecg_uart_top_tb.sv
./obj_dir/Vecg_uart_top_tb
```

Replace the testbench name to run another one.

| testbench | what it shows | run time |
|-----------|---------------|----------|
| `ecg_bram_tb` | file and synthetic contents, two-cycle latency | < 1 s |
| `uart_tx_tb` | frame bits, busy length, ignored mid-frame start, default bit period 10417 | < 1 s |
| `ecg_tx_controller_tb` | byte order; exact cycle timing (first byte 8 edges after start, 2F + 8 per sample); held-start repetition; release mid-record; reset mid-record; no start while busy | < 1 s |
| `ecg_uart_top_tb` | whole design, 16 samples, 10 cycles per bit, host model on the line; record length, repeat period, negative samples, reset mid-record; counts that every mechanism was exercised | < 1 s |
| `ecg_uart_full_tb` | whole design at default parameters: one 2048-sample record at 100 MHz / 9600 baud, every sample checked, exact record length | about 3 min (427 M cycles) |

The 16-word test record starts with the six samples `0BA3 0EBD 0DF7 06FB
0254 03E1` seen in the reference implementation's simulation. The rest are
edge values: `8000`, `7FFF`, `FFFF`, `0000` and several negative words.
