// frame_logger: behavioural model, simulation only. Text log of the frames
// the serial bus debugger decodes.
//
// On every rising clock edge with frame_done high it formats one line,
//   "<NAME> state <hex> bits <n> big-endian 'h<hex> little-endian 'h<hex>",
// prints it when LOG_EN is set, stores it in last_line and counts it in
// lines_logged. The little-endian value is shown over the frame's own length
// (nbits), the way it sits in the result register. It has no hardware
// function; it gives the text-format record of the decoded traffic next to
// the waveform view. Its inputs are sampled on the clock edge that ends the
// frame_done cycle. An active-low reset clears last_line and lines_logged.
module frame_logger #(
  parameter int unsigned STATE_W  = serial_debugger_pkg::STATE_W_DEF,
  parameter int unsigned COUNT_W  = serial_debugger_pkg::COUNT_W_DEF,
  parameter int unsigned RESULT_W = serial_debugger_pkg::RESULT_W_DEF,
  parameter string       NAME     = "la0",
  parameter bit          LOG_EN   = 1'b1
) (
  input logic                clk,
  input logic                rst,         // active low, clears the count
  input logic                frame_done,
  input logic [STATE_W-1:0]  state,
  input logic [COUNT_W-1:0]  nbits,
  input logic [RESULT_W-1:0] be,
  input logic [RESULT_W-1:0] le
);

  string       last_line;
  int unsigned lines_logged;

  always @(posedge clk or negedge rst) begin
    if (!rst) begin
      last_line    <= "";
      lines_logged <= 0;
    end else if (frame_done) begin
      automatic string line =
          $sformatf("%s state %0h bits %0d big-endian 'h%0h little-endian 'h%0h",
                    NAME, state, nbits, be, le);
      last_line    <= line;
      lines_logged <= lines_logged + 1;
      if (LOG_EN) $display("%s", line);
    end
  end

endmodule
