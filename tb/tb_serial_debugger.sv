// tb_serial_debugger: end-to-end test of the serial bus debugger with every
// parameter at its default (7 states of 8 bits, 5-bit state, 129-bit results).
//
// The serial line is driven on falling clock edges, most significant bit of
// each frame first, and start_la is raised for exactly sum(wait table) = 56
// clocks per pass, as an analysis window would be. On every frame_done the
// testbench compares state, bit_count, final_result1 (big endian) and
// final_result (little endian) with the values it sent, and checks that the
// pulse comes exactly 8 clocks after the previous one (one frame per 8 bits).
// Pass 1 sends frame k = k, the reference example, so state 1 shows 'h01
// ('h80), state 4 'h04 ('h20) and state 5 'h05 ('ha0). Later passes send
// random bytes and exercise, counting each:
//   frame   - a completed frame;
//   wrap    - start_la held over two passes, state 6 followed by state 0;
//   hold    - start_la low, the last frame stays on the outputs;
//   abort   - start_la dropped in mid-frame, next window starts at state 0;
//   reset   - rst asserted in mid-frame clears everything.
// A mechanism that never happened counts as a failure.
module tb_serial_debugger;
  localparam int NS = 7;
  localparam int FB = 8;
  localparam int TOTAL = NS * FB;  // wait_table sum

  logic         clk = 1'b0;
  logic         rst = 1'b0;
  logic         in = 1'b1;
  logic         start_la = 1'b0;
  logic [4:0]   state;
  logic [128:0] final_result1, final_result;
  logic [7:0]   bit_count;
  logic         frame_done;

  int checks = 0, failures = 0;
  int n_frame = 0, n_wrap = 0, n_hold = 0, n_abort = 0, n_reset = 0;

  serial_debugger la0 (.*);

  always #10 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: state=%0d bits=%0d be=%h le=%h", what, $time, state,
               bit_count, final_result1, final_result);
    end
  endtask

  function automatic logic [7:0] rev8(input logic [7:0] v);
    for (int k = 0; k < 8; k++) rev8[k] = v[7 - k];
  endfunction

  // Expected frames, in order; the monitor pops one per frame_done.
  logic [7:0] exp_q[$];
  int         exp_state = 0;
  int         cyc = 0, last_done = -1;
  bit         first_of_window = 1'b0;

  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    if (rst && frame_done) begin
      logic [7:0] v;
      n_frame++;
      check(exp_q.size() > 0, "unexpected frame");
      v = (exp_q.size() > 0) ? exp_q.pop_front() : 8'h00;
      check(state == 5'(exp_state), "state");
      check(bit_count == 8'(FB), "bit_count");
      check(final_result1 == 129'(v), "big-endian value");
      check(final_result == 129'(rev8(v)), "little-endian value");
      if (!first_of_window) check(cyc - last_done == FB, "one frame per 8 clocks");
      first_of_window = 1'b0;
      last_done = cyc;
      if (exp_state == NS - 1) exp_state = 0;
      else exp_state++;
      if (exp_state == 0 && start_la) n_wrap++;
    end
  end

  // Sends n_bits of frames vals[] (MSB first) inside one window, then drops
  // start_la. n_bits below the full count aborts in mid-frame.
  task automatic window(input logic [7:0] vals[], input int n_bits);
    first_of_window = 1'b1;
    exp_state = 0;
    for (int b = 0; b < n_bits; b++) begin
      if (b % FB == FB - 1) exp_q.push_back(vals[b / FB]);
    end
    @(negedge clk);
    start_la = 1'b1;
    for (int b = 0; b < n_bits; b++) begin
      in = vals[b / FB][7 - b % FB];
      @(negedge clk);
    end
    start_la = 1'b0;
    in = 1'b1;
  endtask

  initial begin
    logic [7:0] vals[];
    logic [128:0] be_hold, le_hold;
    logic [4:0] st_hold;
    repeat (3) @(negedge clk);
    rst = 1'b1;
    repeat (5) @(negedge clk);

    // Pass 1: the reference example, frame k carries k.
    vals = new[NS];
    foreach (vals[k]) vals[k] = 8'(k);
    window(vals, TOTAL);
    repeat (2) @(negedge clk);
    check(exp_q.size() == 0, "all frames of pass 1 seen");

    // Hold: outputs keep the last frame while start_la is low.
    be_hold = final_result1; le_hold = final_result; st_hold = state;
    in = 1'b0;
    repeat (10) @(negedge clk);
    check(final_result1 == be_hold && final_result == le_hold && state == st_hold, "hold");
    if (be_hold == 129'(8'h06) && st_hold == 5'd6) n_hold++;
    in = 1'b1;

    // Two passes in one window: wrap from state 6 to state 0.
    vals = new[2 * NS];
    foreach (vals[k]) vals[k] = 8'($urandom);
    window(vals, 2 * TOTAL);
    repeat (2) @(negedge clk);
    check(exp_q.size() == 0, "all frames of double pass seen");

    // Abort in mid-frame (after 2 frames and 3 bits), then a full pass that
    // must start again at state 0.
    vals = new[NS];
    foreach (vals[k]) vals[k] = 8'($urandom);
    window(vals, 2 * FB + 3);
    repeat (2) @(negedge clk);
    check(exp_q.size() == 0 && state == 5'd2 && bit_count == 8'd3, "abort keeps partial frame");
    n_abort++;
    foreach (vals[k]) vals[k] = 8'($urandom);
    window(vals, TOTAL);
    repeat (2) @(negedge clk);
    check(exp_q.size() == 0, "all frames after abort seen");

    // Reset in mid-frame.
    foreach (vals[k]) vals[k] = 8'($urandom);
    fork
      window(vals, TOTAL);
    join_none
    repeat (20) @(negedge clk);
    rst = 1'b0;
    #1;
    check(state == 0 && final_result1 == 0 && final_result == 0 && bit_count == 0 && !frame_done,
          "reset clears outputs");
    n_reset++;
    wait fork;
    exp_q.delete();
    repeat (2) @(negedge clk);
    rst = 1'b1;

    // Random passes after reset.
    repeat (5) begin
      foreach (vals[k]) vals[k] = 8'($urandom);
      window(vals, TOTAL);
      repeat ($urandom_range(1, 5)) @(negedge clk);
    end
    repeat (2) @(negedge clk);
    check(exp_q.size() == 0, "all frames of random passes seen");

    $display("mechanisms: frame=%0d wrap=%0d hold=%0d abort=%0d reset=%0d",
             n_frame, n_wrap, n_hold, n_abort, n_reset);
    check(n_frame > 0, "frame happened");
    check(n_wrap > 0, "wrap happened");
    check(n_hold > 0, "hold happened");
    check(n_abort > 0, "abort happened");
    check(n_reset > 0, "reset happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
