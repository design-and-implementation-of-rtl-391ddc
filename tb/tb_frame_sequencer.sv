// tb_frame_sequencer: self-checking test of the wait-table sequencer.
//
// A 3-state table (lengths 3, 5, 2) is walked with start_la held high for
// several passes, then with random gaps in start_la. A reference model in the
// testbench, written from the rules (one sample per clock while start_la is
// high, next state after the table length, wrap after the last state, back
// to state 0 when start_la is low), is compared with every output after each
// clock. The frame_done pulses of the first pass are also checked against
// their expected clock cycles (3, 8 and 10 cycles after the first sample, plus
// one cycle of output latency).
module tb_frame_sequencer;
  localparam int unsigned NS = 3;
  localparam logic [NS-1:0][7:0] TABLE = {8'd2, 8'd5, 8'd3};
  localparam int LEN[NS] = '{3, 5, 2};

  logic       clk = 1'b0;
  logic       rst = 1'b0;
  logic       start_la = 1'b0;
  logic [4:0] cur_state, state;
  logic [7:0] bit_idx, nbits;
  logic       last_bit, frame_done;

  int checks = 0, failures = 0;

  frame_sequencer #(.NO_OF_STATE(NS), .WAIT_TABLE(TABLE)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference model.
  int m_state = 0, m_idx = 0, m_shown = 0, m_nbits = 0;
  bit m_done = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: cur_state=%0d bit_idx=%0d state=%0d nbits=%0d done=%0b",
               what, $time, cur_state, bit_idx, state, nbits, frame_done);
    end
  endtask

  always @(posedge clk) begin
    if (rst) begin
      m_done <= start_la && (m_idx == LEN[m_state] - 1);
      if (!start_la) begin
        m_state <= 0; m_idx <= 0;
      end else begin
        m_shown <= m_state; m_nbits <= m_idx + 1;
        if (m_idx == LEN[m_state] - 1) begin
          m_idx <= 0; m_state <= (m_state == NS - 1) ? 0 : m_state + 1;
        end else m_idx <= m_idx + 1;
      end
    end
  end

  always @(negedge clk) begin
    if (rst) begin
      check(cur_state == 5'(m_state), "cur_state");
      check(bit_idx == 8'(m_idx), "bit_idx");
      check(last_bit == (m_idx == LEN[m_state] - 1), "last_bit");
      check(state == 5'(m_shown), "state");
      check(nbits == 8'(m_nbits), "nbits");
      check(frame_done == m_done, "frame_done");
    end
  end

  int cyc = 0;
  int done_at[$];
  always @(posedge clk) begin
    cyc++;
    if (frame_done) done_at.push_back(cyc);
  end

  initial begin
    int t0;
    repeat (3) @(negedge clk);
    rst = 1'b1;
    repeat (2) @(negedge clk);
    start_la = 1'b1;
    t0 = cyc;  // the next posedge is cycle t0+1 and samples the first bit
    repeat (3 * 10 + 1) @(negedge clk);
    // Done pulses of the first pass: after 3, 8, 10 samples, seen one edge later.
    check(done_at.size() >= 3, "three frames in first pass");
    if (done_at.size() >= 3) begin
      check(done_at[0] == t0 + 4, "frame 0 latency");
      check(done_at[1] == t0 + 9, "frame 1 latency");
      check(done_at[2] == t0 + 11, "frame 2 latency");
    end
    check(done_at.size() == 9, "nine frames in three passes");
    // Random gaps in start_la, including drops in mid-frame.
    repeat (400) begin
      @(negedge clk);
      start_la = ($urandom_range(0, 9) != 0);
    end
    // Reset in mid-frame.
    start_la = 1'b1;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    #1;
    check(cur_state == 0 && bit_idx == 0 && state == 0 && nbits == 0 && !frame_done, "reset");
    @(negedge clk);
    rst = 1'b1;
    start_la = 1'b0;
    m_state = 0; m_idx = 0; m_shown = 0; m_nbits = 0; m_done = 0;
    repeat (5) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
