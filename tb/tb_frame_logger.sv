// tb_frame_logger: checks the text record of the frame logger.
//
// Drives frame_done with known frame values and compares the line the logger
// formats (last_line) and its line count with the expected text. A clock with
// frame_done low must not add a line.
module tb_frame_logger;
  logic         clk = 1'b0;
  logic         rst = 1'b0;
  logic         frame_done = 1'b0;
  logic [4:0]   state = '0;
  logic [7:0]   nbits = '0;
  logic [128:0] be = '0, le = '0;

  int checks = 0, failures = 0;

  frame_logger #(.NAME("la0"), .LOG_EN(1'b1)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: got \"%s\" (%0d lines)", what, dut.last_line, dut.lines_logged);
    end
  endtask

  task automatic frame(input int s, input int n, input logic [128:0] b, input logic [128:0] l,
                       input string exp_line, input int exp_count);
    @(negedge clk);
    frame_done = 1'b1; state = 5'(s); nbits = 8'(n); be = b; le = l;
    @(negedge clk);
    frame_done = 1'b0;
    check(dut.last_line == exp_line, "line text");
    check(dut.lines_logged == exp_count, "line count");
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst = 1'b1;
    check(dut.lines_logged == 0 && dut.last_line == "", "reset");
    frame(1, 8, 129'h01, 129'h80, "la0 state 1 bits 8 big-endian 'h1 little-endian 'h80", 1);
    frame(4, 8, 129'h04, 129'h20, "la0 state 4 bits 8 big-endian 'h4 little-endian 'h20", 2);
    frame(5, 8, 129'h05, 129'ha0, "la0 state 5 bits 8 big-endian 'h5 little-endian 'ha0", 3);
    frame(17, 64, 129'hdead_beef_0123_4567, 129'he6a2_c480_f77d_b57b,
          "la0 state 11 bits 64 big-endian 'hdeadbeef01234567 little-endian 'he6a2c480f77db57b", 4);
    repeat (3) @(negedge clk);
    check(dut.lines_logged == 4, "no line without frame_done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
