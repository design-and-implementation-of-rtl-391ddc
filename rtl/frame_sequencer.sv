// frame_sequencer: walks the wait table of the serial bus debugger.
//
// The serial protocol is described as NO_OF_STATE frames ("states") that
// follow each other in a fixed order; WAIT_TABLE[i] holds the length of
// state i in bits. While start_la is high, one bit is sampled on every
// rising clock edge. The sequencer keeps the state and the bit position that
// the next sample belongs to (cur_state, bit_idx) and raises last_bit
// combinationally when that sample ends its state. After the last state it
// starts again at state 0; when start_la is low it returns to state 0,
// bit 0, so that every analysis window begins with the first frame.
//
// Registered outputs, updated on each sampled edge and held otherwise:
//   state      - the state the most recently sampled bit belonged to,
//                i.e. the frame shown in the result registers;
//   nbits      - how many bits of that frame have been captured so far;
//   frame_done - one-cycle pulse in the cycle after the last bit of a frame
//                was sampled, when state/nbits and the results describe the
//                complete frame.
// Latency: a frame of N bits is complete N clock cycles after its first bit
// is sampled, and frame_done is high in the cycle that follows.
//
// The table of frame lengths, the state count and one sample per clock while
// start_la is high follow the reference design. The wrap-around, the return
// to state 0 when start_la drops, the alignment of the displayed state with
// the captured data and the active-low asynchronous reset are this design's
// choices.
module frame_sequencer #(
  parameter int unsigned NO_OF_STATE = serial_debugger_pkg::NO_OF_STATE_DEF,
  parameter int unsigned COUNT_W     = serial_debugger_pkg::COUNT_W_DEF,
  parameter int unsigned STATE_W     = serial_debugger_pkg::STATE_W_DEF,
  // Entry i (bits i*COUNT_W +: COUNT_W) is the length of state i in bits.
  parameter logic [NO_OF_STATE-1:0][COUNT_W-1:0] WAIT_TABLE =
      {NO_OF_STATE{COUNT_W'(serial_debugger_pkg::FRAME_BITS_DEF)}}
) (
  input  logic               clk,
  input  logic               rst,        // active low
  input  logic               start_la,   // sample enable / analysis window
  output logic [STATE_W-1:0] cur_state,  // state of the next sample
  output logic [COUNT_W-1:0] bit_idx,    // position of the next sample in it
  output logic               last_bit,   // next sample ends cur_state
  output logic [STATE_W-1:0] state,      // state of the frame on display
  output logic [COUNT_W-1:0] nbits,      // bits of that frame captured
  output logic               frame_done  // that frame is complete
);

  localparam logic [STATE_W-1:0] LAST_STATE = STATE_W'(NO_OF_STATE - 1);

  logic [COUNT_W-1:0] cur_len;

  always_comb begin
    cur_len  = WAIT_TABLE[cur_state];
    last_bit = (bit_idx == cur_len - COUNT_W'(1));
  end

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      cur_state  <= '0;
      bit_idx    <= '0;
      state      <= '0;
      nbits      <= '0;
      frame_done <= 1'b0;
    end else begin
      frame_done <= start_la && last_bit;
      if (!start_la) begin
        cur_state <= '0;
        bit_idx   <= '0;
      end else begin
        state <= cur_state;
        nbits <= bit_idx + COUNT_W'(1);
        if (last_bit) begin
          bit_idx   <= '0;
          cur_state <= (cur_state == LAST_STATE) ? '0 : cur_state + STATE_W'(1);
        end else begin
          bit_idx <= bit_idx + COUNT_W'(1);
        end
      end
    end
  end

  // The sequencer never points past the table or past the end of a frame.
  a_state_in_range: assert property (@(posedge clk) disable iff (!rst)
                                     cur_state <= LAST_STATE && bit_idx < cur_len);

  // Elaboration checks on the configuration.
  if (NO_OF_STATE < 1 || NO_OF_STATE > (1 << STATE_W)) begin : g_bad_states
    $error("frame_sequencer: NO_OF_STATE must be 1..2**STATE_W");
  end
  for (genvar i = 0; i < NO_OF_STATE; i++) begin : g_check_table
    if (WAIT_TABLE[i] == '0) begin : g_zero
      $error("frame_sequencer: every WAIT_TABLE entry must be at least 1");
    end
  end

endmodule
