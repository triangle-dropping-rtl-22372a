// Testbench for refresh_ctrl: drives a sequence of frames with and without
// new commands and compares the key-frame pattern and the interval with a
// reference model of the dynamic refreshing interval (start at 2, +1 at a
// key frame with no new commands since the previous one, back to 2
// otherwise, at most 5). Checks that the interval reaches 5, stays there,
// and falls back to 2.
module tb_refresh_ctrl;
  logic clk = 0, rst_n = 0, frame_start = 0, new_cmd = 0, key_frame;
  logic [3:0] interval;
  int checks = 0, failures = 0;

  refresh_ctrl dut (.clk, .rst_n, .frame_start, .new_cmd, .key_frame, .interval);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int m_int, m_since, seen5, back2;
    bit m_new, m_first, exp_key, newc;
    m_int = 2; m_since = 0; m_new = 0; m_first = 1; seen5 = 0; back2 = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 120; f++) begin
      @(negedge clk) frame_start = 1;
      @(negedge clk) frame_start = 0;
      // model of the frame start
      if (m_first) begin
        exp_key = 1; m_first = 0; m_since = 0; m_new = 0;
      end else if (m_since + 1 >= m_int) begin
        exp_key = 1; m_since = 0;
        if (m_new) begin
          m_int = 2;
          back2++;
        end else if (m_int < 5) m_int++;
        m_new = 0;
      end else begin
        exp_key = 0; m_since++;
      end
      check(key_frame == exp_key, $sformatf("frame %0d key %0b expected %0b", f, key_frame, exp_key));
      check(int'(interval) == m_int, $sformatf("frame %0d interval %0d expected %0d", f, interval, m_int));
      if (m_int == 5) seen5++;
      // new commands: frequent at the start and around frame 60, none else
      newc = (f < 5) || (f >= 60 && f < 62) || (f == 95);
      repeat (3) @(negedge clk);
      if (newc) begin
        new_cmd = 1;
        @(negedge clk) new_cmd = 0;
        m_new = 1;
      end
      repeat (2) @(negedge clk);
    end
    check(seen5 > 10, "interval reached the maximum of 5");
    check(back2 >= 2, "interval reset to 2 after new commands");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
