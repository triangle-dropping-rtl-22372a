// Testbench for frame_vis_buffer at its full 262144-entry size: random reads
// and writes on the dropper port and the two updater lanes, concentrated on
// a small address window so that ports collide. A behavioural memory model
// checks one-cycle read latency, read data holding while the port is idle,
// read-before-write on the same edge, and the write priority b1 > b0 > a.
module tb_frame_vis_buffer;
  import td_pkg::*;

  logic clk = 0;
  logic a_re = 0, a_we = 0;
  fvb_addr_t a_raddr, a_waddr;
  fvb_entry_t a_rdata, a_wdata;
  logic [1:0] b_re = 0, b_we = 0;
  fvb_addr_t b_raddr [2];
  fvb_addr_t b_waddr [2];
  fvb_entry_t b_rdata [2];
  fvb_entry_t b_wdata [2];
  int checks = 0, failures = 0, collisions = 0;

  frame_vis_buffer dut (.clk, .a_re, .a_raddr, .a_rdata, .a_we, .a_waddr, .a_wdata,
                        .b_re, .b_raddr, .b_rdata, .b_we, .b_waddr, .b_wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  fvb_entry_t m [int];
  function automatic fvb_addr_t pick();
    return (($urandom % 2) != 0) ? fvb_addr_t'($urandom % 16) : fvb_addr_t'(262144 - 1 - ($urandom % 8));
  endfunction

  initial begin
    fvb_entry_t exp_a, exp_b [2];
    bit ra, rb0, rb1;
    // initialise the window
    ra = 0; rb0 = 0; rb1 = 0;
    a_raddr = 0; a_waddr = 0; a_wdata = '0;
    for (int l = 0; l < 2; l++) begin b_raddr[l] = 0; b_waddr[l] = 0; b_wdata[l] = '0; end
    for (int i = 0; i < 16; i++) begin
      @(negedge clk); a_we = 1; a_waddr = fvb_addr_t'(i); a_wdata = 3'(i); m[i] = 3'(i);
      @(negedge clk); a_we = 1; a_waddr = fvb_addr_t'(262143 - i); a_wdata = 3'(i + 3); m[262143 - i] = 3'(i + 3);
    end
    @(negedge clk); a_we = 0;
    exp_a = '0; exp_b[0] = '0; exp_b[1] = '0;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      a_re = 1'($urandom); a_raddr = pick();
      a_we = 1'($urandom); a_waddr = pick(); a_wdata = 3'($urandom);
      for (int l = 0; l < 2; l++) begin
        b_re[l] = 1'($urandom); b_raddr[l] = pick();
        b_we[l] = 1'($urandom); b_waddr[l] = pick(); b_wdata[l] = 3'($urandom);
      end
      // expected read data (old contents)
      if (a_re) begin exp_a = m[int'(a_raddr)]; ra = 1; end
      rb0 |= b_re[0]; rb1 |= b_re[1];
      for (int l = 0; l < 2; l++) if (b_re[l]) exp_b[l] = m[int'(b_raddr[l])];
      if (a_we && b_we[0] && a_waddr == b_waddr[0]) collisions++;
      if (a_we) m[int'(a_waddr)] = a_wdata;
      if (b_we[0]) m[int'(b_waddr[0])] = b_wdata[0];
      if (b_we[1]) m[int'(b_waddr[1])] = b_wdata[1];
      @(posedge clk); #1;
      if (ra) check(a_rdata == exp_a, "port a read data");
      if (rb0 && rb1) check(b_rdata[0] == exp_b[0] && b_rdata[1] == exp_b[1], "updater lanes read data");
    end
    check(collisions > 10, "write collisions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
