// Testbench for bbox_unit: random commands of 1..30 quad-vertex beats with
// random lane masks and coordinates. The expected box is the min/max over
// the valid lanes of the first 18 beats only; done must rise exactly one
// cycle after the 18th beat (or the last beat of a shorter command), and
// later beats must not change the box.
module tb_bbox_unit;
  import td_pkg::*;

  localparam int MAXQ = 18;
  logic clk = 0, rst_n = 0, start = 0, vq_valid = 0, vq_last = 0, done;
  svtx_t [3:0] vq;
  logic [3:0] vq_mask;
  bbox_t bbox;
  int checks = 0, failures = 0;

  bbox_unit #(.MAX_QV(MAXQ)) dut (.clk, .rst_n, .start, .vq_valid, .vq, .vq_mask,
                                  .vq_last, .done, .bbox);

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
    int n;
    int xmin, ymin, xmax, ymax;
    vq = '0; vq_mask = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      n = 1 + ($urandom % 30);
      xmin = 32767; ymin = 32767; xmax = -32768; ymax = -32768;
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      check(!done, "done low after start");
      for (int b = 0; b < n; b++) begin
        vq_valid = 1;
        vq_last  = (b == n - 1);
        vq_mask  = (b == 0) ? 4'hF : 4'($urandom);
        for (int l = 0; l < 4; l++) begin
          vq[l].x = 16'(int'($urandom % 2400) - 120);
          vq[l].y = 16'(int'($urandom % 1200) - 60);
          if (vq_mask[l] && b < MAXQ) begin
            if (int'(vq[l].x) < xmin) xmin = int'(vq[l].x);
            if (int'(vq[l].x) > xmax) xmax = int'(vq[l].x);
            if (int'(vq[l].y) < ymin) ymin = int'(vq[l].y);
            if (int'(vq[l].y) > ymax) ymax = int'(vq[l].y);
          end
        end
        @(negedge clk);
        if (b == n - 1 || b >= MAXQ - 1) check(done, $sformatf("done after beat %0d", b));
        else check(!done, $sformatf("done early at beat %0d", b));
      end
      vq_valid = 0; vq_last = 0;
      @(negedge clk);
      check(done, "done holds");
      check(int'(bbox.xmin) == xmin && int'(bbox.xmax) == xmax &&
            int'(bbox.ymin) == ymin && int'(bbox.ymax) == ymax,
            $sformatf("box %0d %0d %0d %0d expected %0d %0d %0d %0d", bbox.xmin, bbox.ymin,
                      bbox.xmax, bbox.ymax, xmin, ymin, xmax, ymax));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
