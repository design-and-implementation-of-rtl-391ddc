// frame_capture: assembles the bits of one frame in two bit orders.
//
// Each sampled bit (din while sample is high) is written into two registers
// of RESULT_W bits:
//   be - big endian: the register shifts left and the new bit enters at bit 0,
//        so the first bit of the frame ends up as its most significant bit
//        (an 8-bit frame 0000_0001 reads 'h01);
//   le - little endian: bit k of the frame is written to bit k, so the first
//        bit of the frame is the least significant (the same frame reads 'h80).
// The first bit of a frame (bit_idx == 0) clears both registers, so each
// register holds the current frame alone; a completed frame stays visible
// until the first bit of the next frame arrives, or until the next analysis
// window if sampling stops. Both registers update on the clock edge that
// samples the bit, with no further latency. A frame longer than RESULT_W
// keeps its last RESULT_W bits in be and its first RESULT_W bits in le.
//
// The two bit orders and the 129-bit width come from the reference design;
// clearing on the first bit of the next frame and the truncation rule are
// this design's choices.
module frame_capture #(
  parameter int unsigned RESULT_W = serial_debugger_pkg::RESULT_W_DEF,
  parameter int unsigned COUNT_W  = serial_debugger_pkg::COUNT_W_DEF
) (
  input  logic                clk,
  input  logic                rst,      // active low
  input  logic                sample,   // din is a bit of the frame
  input  logic                din,
  input  logic [COUNT_W-1:0]  bit_idx,  // position of din in its frame
  output logic [RESULT_W-1:0] be,       // big-endian frame value
  output logic [RESULT_W-1:0] le        // little-endian frame value
);

  always_ff @(posedge clk or negedge rst) begin
    if (!rst) begin
      be <= '0;
      le <= '0;
    end else if (sample) begin
      if (bit_idx == '0) begin
        be <= RESULT_W'(din);
        le <= RESULT_W'(din);
      end else begin
        be <= {be[RESULT_W-2:0], din};
        if (32'(bit_idx) < RESULT_W) le[bit_idx] <= din;
      end
    end
  end

endmodule
