// serial_debugger: protocol-agnostic serial bus analyzer.
//
// Many serial protocols (CAN, SPI, I2C, JTAG, eMMC, ...) send a fixed series
// of fields of known lengths. Instead of decoding one protocol, this block
// is told only the lengths: WAIT_TABLE lists, for each of the NO_OF_STATE
// frames ("states") of the protocol, how many bits it has. While start_la is
// high the block samples `in` on every rising edge of clk, counts the bits
// through the table and shows, for the frame in progress, its state number
// and its value in hex in two bit orders: final_result1 with the first bit
// most significant (big endian) and final_result with the first bit least
// significant (little endian). A waveform viewer then shows the traffic as
// frame values instead of single bits; frame_done marks the cycle in which a
// frame is complete, and an optional text log (LOG_EN = 1, simulation only)
// prints one line per frame.
// Several instances can watch different lines or protocols side by side.
//
// Interface: clk, rst (active low), in (the serial line), start_la (analysis
// window: the first sampled edge is the first after start_la rises, and a
// window of sum(WAIT_TABLE) clocks covers one pass over all frames).
// Outputs are registered: state, final_result1/final_result and bit_count
// follow each sampled bit by one clock; frame_done is high for one clock
// after the last bit of each frame.
//
// Wait table format: entry i of the packed WAIT_TABLE is the bit length of
// state i, listed from the highest state down, e.g. the 7 x 8-bit protocol is
// {8'd8, 8'd8, 8'd8, 8'd8, 8'd8, 8'd8, 8'd8} (the default).
//
// From the reference design: the parameters and their defaults, the port
// names, the 5-bit state and 129-bit results, the two bit orders and the
// one-bit-per-clock sampling under start_la. This design's own choices: the
// active-low asynchronous reset, the frame_done and bit_count outputs, the
// wrap-around to state 0 and the way results are cleared and held (see
// frame_sequencer and frame_capture).
module serial_debugger #(
  parameter int unsigned NO_OF_STATE = serial_debugger_pkg::NO_OF_STATE_DEF,
  parameter int unsigned COUNT_W     = serial_debugger_pkg::COUNT_W_DEF,
  parameter int unsigned STATE_W     = serial_debugger_pkg::STATE_W_DEF,
  parameter int unsigned RESULT_W    = serial_debugger_pkg::RESULT_W_DEF,
  parameter logic [NO_OF_STATE-1:0][COUNT_W-1:0] WAIT_TABLE =
      {NO_OF_STATE{COUNT_W'(serial_debugger_pkg::FRAME_BITS_DEF)}},
  parameter string       NAME        = "la0",
  parameter bit          LOG_EN      = 1'b0
) (
  input  logic                clk,
  input  logic                rst,            // active low
  input  logic                in,             // monitored serial line
  input  logic                start_la,       // analyse while high
  output logic [STATE_W-1:0]  state,          // state of the displayed frame
  output logic [RESULT_W-1:0] final_result1,  // big-endian frame value
  output logic [RESULT_W-1:0] final_result,   // little-endian frame value
  output logic [COUNT_W-1:0]  bit_count,      // bits captured in that frame
  output logic                frame_done      // displayed frame is complete
);

  logic [STATE_W-1:0] cur_state;
  logic [COUNT_W-1:0] bit_idx;
  logic               last_bit;

  frame_sequencer #(
    .NO_OF_STATE(NO_OF_STATE),
    .COUNT_W    (COUNT_W),
    .STATE_W    (STATE_W),
    .WAIT_TABLE (WAIT_TABLE)
  ) u_seq (
    .clk       (clk),
    .rst       (rst),
    .start_la  (start_la),
    .cur_state (cur_state),
    .bit_idx   (bit_idx),
    .last_bit  (last_bit),
    .state     (state),
    .nbits     (bit_count),
    .frame_done(frame_done)
  );

  frame_capture #(
    .RESULT_W(RESULT_W),
    .COUNT_W (COUNT_W)
  ) u_cap (
    .clk    (clk),
    .rst    (rst),
    .sample (start_la),
    .din    (in),
    .bit_idx(bit_idx),
    .be     (final_result1),
    .le     (final_result)
  );

  // Simulation-only text log, one line per frame; left out of synthesis.
  if (LOG_EN) begin : g_log
    frame_logger #(
      .STATE_W (STATE_W),
      .COUNT_W (COUNT_W),
      .RESULT_W(RESULT_W),
      .NAME    (NAME),
      .LOG_EN  (1'b1)
    ) u_log (
      .clk       (clk),
      .rst       (rst),
      .frame_done(frame_done),
      .state     (state),
      .nbits     (bit_count),
      .be        (final_result1),
      .le        (final_result)
    );
  end

endmodule
