// Testbench for primitive_dropper, attached to a 1024-entry frame_vis_buffer
// whose contents the testbench loads and reads back through the updater
// lanes. Commands of every kind are sent: matched (prediction on), newly
// inserted, key frame, transparent, geometry shader, null pointer. For each
// primitive the expected fate (dropped or passed, with which visibility
// pointer) comes from the entry the testbench wrote; afterwards the entries
// are read back to check the initialisation of new bitmaps and the key-frame
// save-and-clear. Output back-pressure is random, except in one command
// where the rate of one primitive per cycle is checked.
module tb_primitive_dropper;
  import td_pkg::*;

  logic clk = 0, rst_n = 0, key_frame = 0;
  logic ctx_valid = 0, ctx_ready, in_valid = 0, in_ready, in_last = 0;
  cmd_ctx_t ctx;
  fvb_addr_t in_id;
  logic [31:0] in_payload, out_payload;
  logic out_valid, out_ready, out_last;
  vptr_t out_vptr;
  logic a_re, a_we, done, dropped, bypassed, intm_kept;
  fvb_addr_t a_raddr, a_waddr;
  fvb_entry_t a_rdata, a_wdata;
  logic [1:0] b_re = 0, b_we = 0;
  fvb_addr_t b_raddr [2];
  fvb_addr_t b_waddr [2];
  fvb_entry_t b_rdata [2];
  fvb_entry_t b_wdata [2];
  int checks = 0, failures = 0;
  int n_drop = 0, n_pass = 0, n_intm = 0;
  bit rand_ready = 1;

  primitive_dropper dut (.clk, .rst_n, .key_frame, .ctx_valid, .ctx_ready, .ctx,
    .in_valid, .in_ready, .in_id, .in_last, .in_payload,
    .out_valid, .out_ready, .out_payload, .out_vptr, .out_last,
    .fvb_re(a_re), .fvb_raddr(a_raddr), .fvb_rdata(a_rdata),
    .fvb_we(a_we), .fvb_waddr(a_waddr), .fvb_wdata(a_wdata),
    .done, .dropped, .bypassed, .intm_kept);

  frame_vis_buffer #(.ENTRIES(1024)) u_fvb (.clk, .a_re, .a_raddr, .a_rdata, .a_we, .a_waddr,
    .a_wdata, .b_re, .b_raddr, .b_rdata, .b_we, .b_waddr, .b_wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  // output collector
  logic [31:0] got_pay [$];
  vptr_t       got_ptr [$];
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      got_pay.push_back(out_payload);
      got_ptr.push_back(out_vptr);
    end
    if (dropped) n_drop++;
    if (intm_kept) n_intm++;
  end
  always @(negedge clk) out_ready = rand_ready ? 1'($urandom % 4 != 0) : 1'b1;

  fvb_entry_t mem [1024];

  task automatic fvb_write(input int a, input fvb_entry_t e);
    @(negedge clk); b_we = 2'b01; b_waddr[0] = fvb_addr_t'(a); b_wdata[0] = e;
    @(negedge clk); b_we = 0;
    mem[a] = e;
  endtask

  task automatic fvb_read(input int a, output fvb_entry_t e);
    @(negedge clk); b_re = 2'b01; b_raddr[0] = fvb_addr_t'(a);
    @(negedge clk); b_re = 0; e = b_rdata[0];
  endtask

  // kind: 0 matched, 1 new, 2 key frame, 3 transparent, 4 geometry shader, 5 null
  task automatic run_cmd(input int kind, input int base, input int n, input bit timed);
    logic [31:0] exp_pay [$];
    vptr_t exp_ptr [$];
    fvb_entry_t e;
    int t0, t1;
    bit pred, has;
    vptr_t vp;
    has  = !(kind == 4 || kind == 5);
    pred = (kind == 0);
    key_frame = (kind == 2);
    ctx = '{bmp: '{valid: kind != 5, addr: fvb_addr_t'(base)}, is_new: kind == 1,
            gs: kind == 4, transparent: kind == 3};
    for (int i = 0; i < n; i++) begin
      e = '{vis: 1'($urandom), intm: ($urandom % 4 == 0), prev: 1'($urandom)};
      fvb_write(base + i, e);
    end
    @(negedge clk) ctx_valid = 1;
    while (!ctx_ready) @(negedge clk);
    @(negedge clk) ctx_valid = 0;
    t0 = int'($time);
    for (int i = 0; i < n; i++) begin
      in_valid = 1; in_id = fvb_addr_t'(i); in_last = (i == n - 1);
      in_payload = {16'(kind), 16'(i)};
      if (!(pred && !mem[base + i].vis && !mem[base + i].intm)) begin
        exp_pay.push_back(in_payload);
        vp.valid = has;
        vp.addr  = has ? fvb_addr_t'(base + i) : '0;
        exp_ptr.push_back(vp);
      end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0; in_last = 0;
    while (!ctx_ready) @(negedge clk);
    t1 = int'($time);
    if (timed) check((t1 - t0) / 10 <= n + 2, $sformatf("rate: %0d primitives took %0d cycles", n, (t1 - t0) / 10));
    repeat (2) @(negedge clk);
    check(got_pay.size() == exp_pay.size(), $sformatf("kind %0d: %0d passed, expected %0d", kind, got_pay.size(), exp_pay.size()));
    n_pass += got_pay.size();
    for (int i = 0; i < exp_pay.size() && i < got_pay.size(); i++)
      check(got_pay[i] == exp_pay[i] && got_ptr[i] == exp_ptr[i],
            $sformatf("kind %0d primitive %0d payload/pointer", kind, i));
    got_pay.delete(); got_ptr.delete();
    // bookkeeping writes
    for (int i = 0; i < n; i++) begin
      fvb_entry_t exp;
      exp = mem[base + i];
      if (kind == 1) exp = '{vis: 0, intm: 0, prev: 1};
      if (kind == 2) exp = '{vis: 0, intm: mem[base + i].intm, prev: mem[base + i].vis};
      fvb_read(base + i, e);
      check(e == exp, $sformatf("kind %0d entry %0d = %b expected %b", kind, i, e, exp));
      mem[base + i] = e;
    end
  endtask

  initial begin
    ctx = '0; in_id = 0; in_payload = 0;
    for (int l = 0; l < 2; l++) begin b_raddr[l] = 0; b_waddr[l] = 0; b_wdata[l] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int r = 0; r < 30; r++)
      for (int k = 0; k < 6; k++)
        run_cmd(k, int'($urandom % 900), 1 + int'($urandom % 100), 0);
    rand_ready = 0;
    run_cmd(0, 100, 100, 1);
    run_cmd(2, 100, 100, 1);
    check(n_drop > 500 && n_intm > 50 && n_pass > 1000,
          $sformatf("coverage drop=%0d intermittent=%0d pass=%0d", n_drop, n_intm, n_pass));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
