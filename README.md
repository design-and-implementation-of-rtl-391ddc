# Protocol-agnostic serial bus debugger

Reading a serial bus (CAN, SPI, I2C, JTAG, eMMC, ...) in a simulation
waveform normally means counting single bits by eye and checking them
against the protocol's frame format. This block does the counting in
hardware. It knows nothing of any protocol. It is only told how the bit
stream is cut into frames: a *wait table* gives the length in bits of each
frame ("state") of the protocol, in order. While an analysis window is open
it samples the line once per clock and walks through the table. For the
frame in progress it shows the state number and the frame's value in hex,
in both bit orders. A waveform viewer then shows the traffic as a series of
labelled frame values, not as a stream of bits.

The logic is small (a state register, a bit counter and two shift registers),
fully synthesizable, and parameterized. Any number of instances can watch
different lines or protocols, in a testbench or inside a design for debug
on silicon.

## Files

| file | contents |
|---|---|
| `rtl/serial_debugger_pkg.sv` | default widths and sizes |
| `rtl/serial_debugger.sv` | top: the debugger |
| `rtl/frame_sequencer.sv` | walks the wait table: state number and bit counter |
| `rtl/frame_capture.sv` | big- and little-endian frame registers |
| `rtl/frame_logger.sv` | simulation-only text log, one line per frame |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_me_protocol` |

## Configuring it for a protocol

```systemverilog
// Example protocol: 7 frames of 8 bits each (this is also the default).
serial_debugger #(
  .NO_OF_STATE(7),
  .WAIT_TABLE ({8'd8, 8'd8, 8'd8, 8'd8, 8'd8, 8'd8, 8'd8})  // state 6 ... state 0
) la0 (.clk, .rst, .in(sda), .start_la(start), .state(), .final_result1(),
       .final_result(), .bit_count(), .frame_done());

// A 1-bit frame followed by a 64-bit frame.
serial_debugger #(.NO_OF_STATE(2), .WAIT_TABLE({8'd64, 8'd1})) la1 (...);
```

| parameter | default | meaning |
|---|---|---|
| `NO_OF_STATE` | 7 | number of frames (states) in one pass of the protocol |
| `WAIT_TABLE` | 7 entries of 8 | packed array, entry *i* = length of state *i* in bits, written highest state first |
| `COUNT_W` | 8 | width of a table entry; frames may be 1..255 bits |
| `STATE_W` | 5 | width of `state`; up to 32 states |
| `RESULT_W` | 129 | width of the two result registers |
| `NAME` | `"la0"` | instance label used in the text log |
| `LOG_EN` | 0 | 1 adds the text log (simulation only) |

Elaboration fails with a message if a table entry is 0 or `NO_OF_STATE`
does not fit in `STATE_W` bits.

## Timing of a window

`start_la` is the analysis window. It is meant to open just before the first
bit of the first frame, for example on the falling edge of the line that
starts a transfer. It stays high for exactly `sum(WAIT_TABLE)` clocks, one
pass over all frames. The first rising clock edge after `start_la` rises
samples bit 0 of state 0. Every following rising edge with `start_la` high
samples the next bit.

- **Sampling**: one bit per clock. `in` must be stable at the rising edge,
  so drive it on the falling edge or at one bit per clock from a bus-clock
  domain that is already synchronized.
- **Outputs** are registered and follow each sampled bit by one clock:
  - `state` is the state number of the bit just captured;
  - `bit_count` is how many bits of that frame have been captured;
  - `final_result1` and `final_result` hold the frame so far.
- **Frame end**: when a frame's last bit has been captured, `frame_done` is
  high for one clock. In that clock `state`, `bit_count` and both results
  describe the complete frame. A frame of N bits therefore completes N
  clocks after its first bit is sampled.
- **Next frame**: the first bit of the next frame clears the result
  registers and advances `state`. A completed frame stays on display for
  exactly one clock if the bits run on, and until the next window opens if
  `start_la` falls.
- **Wrap**: if `start_la` stays high past the last state, the sequencer starts
  again at state 0. Repeated passes of the protocol can be watched in one
  window.
- **Abort**: if `start_la` falls in mid-frame, the partial frame stays on the
  outputs. The next window starts again at state 0, bit 0.
- **Reset**: `rst` is active low and asynchronous. It clears all outputs.

## The two bit orders

Bits are numbered in the order they arrive on the line.

- `final_result1` (big endian) shifts left and takes each new bit at bit 0.
  The first bit on the line becomes the most significant bit of the frame
  value, which is how most serial protocols that send MSB first are read.
- `final_result` (little endian) writes bit *k* of the frame to register bit
  *k*. The first bit on the line becomes the least significant bit.

For an 8-bit frame sent as `0 0 0 0 0 1 0 0`, `final_result1` reads `'h04`
and `final_result` reads `'h20`. `'h01` reads `'h80` and `'h05` reads `'ha0`.
The little-endian value is aligned to the frame's own length, not to the
register width. Both registers are 129 bits wide. For a frame longer than
that (table entries allow 255 bits):
- `final_result1` keeps the last 129 bits;
- `final_result` keeps the first 129 bits.

## Internals

`frame_sequencer` holds the position of the *next* sample: `cur_state` and
`bit_idx`. It compares `bit_idx` with `WAIT_TABLE[cur_state] - 1` to raise
`last_bit` combinationally. On a sampled edge it does two things:
- it copies `cur_state` and `bit_idx + 1` into the displayed `state` and
  `bit_count`;
- it either advances `bit_idx` or, on the last bit, clears it and steps
  `cur_state`, wrapping after `NO_OF_STATE - 1`.

Because the displayed state is registered with the captured bit, `state`
and the result registers always describe the same frame. An assertion
checks that the sequencer never points past the table or past the end of
a frame.

`frame_capture` receives `bit_idx` with each bit. Position 0 reloads both
registers with the new bit alone. Other positions shift `final_result1` and
set one bit of `final_result`.

`frame_logger` (enabled with `LOG_EN = 1`) prints one line per frame, for
example

    la0 state 4 bits 8 big-endian 'h4 little-endian 'h20

It also keeps the last line and a line count, which a testbench can read.
It uses `string` and `$display`, so it is simulation-only. The default
`LOG_EN = 0` leaves it out, and the default top is plain synthesizable logic:
about 285 flip-flops, most of them the two 129-bit result registers.

## Where this departs from the original description

- The original debugger is a SystemVerilog `interface`. Here it is a module
  with plain ports, so it can be used as ordinary RTL. Its parameter and
  port names follow the original, with the parameters in upper case.
- The original wait table lists `{state, length}` pairs. Here the state is
  implied by the entry's position, and each entry holds only the length.
- Entries are lengths in bits, as in the 8-bit-frame example and as in the
  window length `sum(wait_table)`. The original example of a protocol with a
  1-bit and a 64-bit frame prints 63 for the long frame. This design writes
  it as 64.
- These are this design's own choices, not given by the original:
  - reset polarity: active low, read from its waveform where reset sits
    at 1 during operation; asynchronous;
  - wrap-around after the last state;
  - return to state 0 when the window closes;
  - the clearing rule of the result registers;
  - truncation of frames longer than 129 bits;
  - the `bit_count` and `frame_done` outputs;
  - the text-log format.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog. With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/serial_debugger_pkg.sv tb/tb_serial_debugger.sv --top-module tb_serial_debugger
./obj_dir/Vtb_serial_debugger
```

| testbench | what it covers |
|---|---|
| `tb_serial_debugger` | default 7 x 8-bit configuration, end to end. Sends the example pass (frame *k* carries *k*) and checks `'h01/'h80`, `'h04/'h20` and `'h05/'ha0`. Also sends random passes. Checks one `frame_done` every 8 clocks and exercises and counts wrap, hold, abort and reset. |
| `tb_me_protocol` | two instances side by side on separate lines: a {1, 64}-bit protocol and the default one, both with the text log on. Checks the 64-bit values in both bit orders and the exact completion cycle. |
| `tb_frame_sequencer` | a 3-state table {3, 5, 2} against a reference model, with random gaps in `start_la`. Checks the latency of each `frame_done` and a reset in mid-frame. |
| `tb_frame_capture` | frames of 1, 8, 64, 129, 140 and random lengths. Checks both bit orders, truncation and holding while sampling pauses. |
| `tb_frame_logger` | exact text of logged lines and the line count |

To change the protocol, change `NO_OF_STATE` and `WAIT_TABLE`. To watch
longer frames, raise `RESULT_W` and, above 255 bits, `COUNT_W`. To show more
than 32 states, raise `STATE_W`.
