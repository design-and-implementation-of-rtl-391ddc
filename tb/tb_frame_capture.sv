// tb_frame_capture: self-checking test of the big/little-endian frame
// assembler.
//
// Frames of 8, 1, 64, 129 and 140 bits with random contents are fed one bit
// per clock, with bit_idx counting 0..N-1 as the sequencer would. After the
// last bit the testbench compares be with the frame value built with the
// first bit most significant and le with the value built with the first bit
// least significant (for 140 bits: the last 129 bits in be, the first 129 in
// le). The reference examples 'h01/'h80, 'h04/'h20 and 'h05/'ha0 for 8-bit
// frames are sent first. A pause in sample must leave both registers alone.
module tb_frame_capture;
  localparam int W = 129;

  logic         clk = 1'b0;
  logic         rst = 1'b0;
  logic         sample = 1'b0;
  logic         din = 1'b0;
  logic [7:0]   bit_idx = '0;
  logic [W-1:0] be, le;

  int checks = 0, failures = 0;

  frame_capture dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: be=%h le=%h", what, be, le);
    end
  endtask

  // Sends n bits (bits[0] first) and checks the registers after the last one.
  task automatic send(input int n, input logic [255:0] bits);
    logic [W-1:0] exp_be = '0, exp_le = '0;
    for (int k = 0; k < n; k++) begin
      exp_be = {exp_be[W-2:0], bits[k]};
      if (k < W) exp_le[k] = bits[k];
    end
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      sample = 1'b1; din = bits[k]; bit_idx = 8'(k);
    end
    @(negedge clk);
    sample = 1'b0;
    check(be == exp_be, $sformatf("be of %0d-bit frame", n));
    check(le == exp_le, $sformatf("le of %0d-bit frame", n));
    // Held while sampling is paused.
    din = ~din;
    repeat (3) @(negedge clk);
    check(be == exp_be && le == exp_le, "hold while sample is low");
  endtask

  function automatic logic [255:0] msb_first8(input logic [7:0] v);
    logic [255:0] b = '0;
    for (int k = 0; k < 8; k++) b[k] = v[7 - k];
    return b;
  endfunction

  initial begin
    logic [255:0] r;
    repeat (2) @(negedge clk);
    check(be == '0 && le == '0, "reset value");
    rst = 1'b1;
    send(8, msb_first8(8'h01));
    check(be == W'(8'h01) && le == W'(8'h80), "value 'h01 ('h80)");
    send(8, msb_first8(8'h04));
    check(be == W'(8'h04) && le == W'(8'h20), "value 'h04 ('h20)");
    send(8, msb_first8(8'h05));
    check(be == W'(8'h05) && le == W'(8'ha0), "value 'h05 ('ha0)");
    foreach (r[i]) r[i] = 1'($urandom);
    send(1, r);
    foreach (r[i]) r[i] = 1'($urandom);
    send(64, r);
    foreach (r[i]) r[i] = 1'($urandom);
    send(129, r);
    foreach (r[i]) r[i] = 1'($urandom);
    send(140, r);
    for (int t = 0; t < 20; t++) begin
      foreach (r[i]) r[i] = 1'($urandom);
      send($urandom_range(1, 200), r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
