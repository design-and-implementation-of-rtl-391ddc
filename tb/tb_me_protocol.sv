// tb_me_protocol: two debugger instances side by side, each on its own line.
//
// Instance la1 is configured for a two-frame protocol: a 1-bit frame
// followed by a 64-bit frame (NO_OF_STATE = 2, WAIT_TABLE = {64, 1}).
// Instance la0 keeps the default 7 x 8-bit table and watches a second line at
// the same time. Each window sends random frames, MSB first, for exactly the
// sum of the instance's table; every frame_done is checked for state, bit
// count, big-endian and little-endian value and for its clock cycle (the
// 64-bit frame completes 64 clocks after the 1-bit one). Both instances have
// their text log enabled, which must print one line per frame.
module tb_me_protocol;
  localparam logic [1:0][7:0] ME_TABLE = {8'd64, 8'd1};
  localparam int ME_LEN[2] = '{1, 64};

  logic         clk = 1'b0;
  logic         rst = 1'b0;
  logic         in1 = 1'b1, in0 = 1'b1;
  logic         start1 = 1'b0, start0 = 1'b0;
  logic [4:0]   state1, state0;
  logic [128:0] be1, le1, be0, le0;
  logic [7:0]   cnt1, cnt0;
  logic         done1, done0;

  int checks = 0, failures = 0;
  int frames1 = 0, frames0 = 0;

  serial_debugger #(.NO_OF_STATE(2), .WAIT_TABLE(ME_TABLE), .NAME("la1"), .LOG_EN(1'b1)) la1 (
    .clk, .rst, .in(in1), .start_la(start1), .state(state1), .final_result1(be1),
    .final_result(le1), .bit_count(cnt1), .frame_done(done1));

  serial_debugger #(.NAME("la0"), .LOG_EN(1'b1)) la0 (
    .clk, .rst, .in(in0), .start_la(start0), .state(state0), .final_result1(be0),
    .final_result(le0), .bit_count(cnt0), .frame_done(done0));

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
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [128:0] rev(input logic [128:0] v, input int n);
    logic [128:0] r = '0;
    for (int k = 0; k < n; k++) r[k] = v[n - 1 - k];
    return r;
  endfunction

  int cyc = 0;
  always @(posedge clk) cyc++;

  // Expected frames of each instance: value, length, state.
  logic [63:0] q1_val[$];
  int          q1_len[$], q1_st[$], q1_cyc[$];
  logic [7:0]  q0_val[$];
  int          q0_st[$];

  always @(negedge clk) begin
    if (done1) begin
      frames1++;
      check(q1_val.size() > 0, "la1 unexpected frame");
      if (q1_val.size() > 0) begin
        logic [63:0] v;
        int n, s, c;
        v = q1_val.pop_front();
        n = q1_len.pop_front();
        s = q1_st.pop_front();
        c = q1_cyc.pop_front();
        check(state1 == 5'(s) && cnt1 == 8'(n), "la1 state and bit count");
        check(be1 == 129'(v), "la1 big-endian value");
        check(le1 == rev(129'(v), n), "la1 little-endian value");
        check(cyc == c, "la1 frame cycle");
      end
    end
    if (done0) begin
      frames0++;
      check(q0_val.size() > 0, "la0 unexpected frame");
      if (q0_val.size() > 0) begin
        logic [7:0] v;
        int s;
        v = q0_val.pop_front();
        s = q0_st.pop_front();
        check(state0 == 5'(s) && cnt0 == 8'd8, "la0 state and bit count");
        check(be0 == 129'(v) && le0 == rev(129'(v), 8), "la0 values");
      end
    end
  end

  task automatic me_window();
    logic [63:0] v[2];
    int t0, acc = 0;
    v[0] = 64'($urandom_range(0, 1));
    v[1] = {$urandom, $urandom};
    t0 = cyc;  // first sample on posedge t0+1
    for (int s = 0; s < 2; s++) begin
      acc += ME_LEN[s];
      q1_val.push_back(v[s]); q1_len.push_back(ME_LEN[s]); q1_st.push_back(s);
      q1_cyc.push_back(t0 + acc);  // seen on the falling edge after the last sample
    end
    start1 = 1'b1;
    for (int s = 0; s < 2; s++)
      for (int b = ME_LEN[s] - 1; b >= 0; b--) begin
        in1 = v[s][b];
        @(negedge clk);
      end
    start1 = 1'b0;
  endtask

  task automatic my_window();
    logic [7:0] v;
    start0 = 1'b1;
    for (int s = 0; s < 7; s++) begin
      v = 8'($urandom);
      q0_val.push_back(v); q0_st.push_back(s);
      for (int b = 7; b >= 0; b--) begin
        in0 = v[b];
        @(negedge clk);
      end
    end
    start0 = 1'b0;
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b1;
    repeat (2) @(negedge clk);
    repeat (6) begin
      fork
        me_window();
        my_window();
      join
      repeat ($urandom_range(1, 4)) @(negedge clk);
    end
    repeat (3) @(negedge clk);
    check(q1_val.size() == 0 && q0_val.size() == 0, "all frames seen");
    check(frames1 == 12 && frames0 == 42, "frame counts");
    check(la1.g_log.u_log.lines_logged == 12 && la0.g_log.u_log.lines_logged == 42,
          "one text log line per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
