// Testbench for visibility_updater, connected to a tile_vis_buffer and a
// 4096-entry frame_vis_buffer. For each tile the testbench preloads random
// visibility entries, fills the tile buffer with random pointers (many
// repeated, some pixels left null), reports a few culled primitives, starts
// the scan and waits for busy to fall. Every entry is then compared with the
// expected update: pointed-to entries get vis = 1 and, in key frames,
// intm |= ~prev; all other entries must be unchanged. The scan of a tile
// must finish within 128 + 8 cycles (two pointers per cycle).
module tb_visibility_updater;
  import td_pkg::*;

  localparam int N = 4096;
  logic clk = 0, rst_n = 0, key_frame = 0, scan_start = 0, clear = 0;
  logic wr_valid = 0, wr_opaque = 1;
  logic [5:0] wr_quad;
  logic [3:0] wr_mask;
  vptr_t wr_ptr, cull_ptr;
  logic cull_valid = 0, cull_ready, busy, intm_marked;
  logic [1:0] n_updates;
  logic [7:0] t_ridx [2];
  vptr_t t_rdata [2];
  logic a_re = 0, a_we = 0;
  fvb_addr_t a_raddr, a_waddr;
  fvb_entry_t a_rdata, a_wdata;
  logic [1:0] b_re, b_we;
  fvb_addr_t b_raddr [2];
  fvb_addr_t b_waddr [2];
  fvb_entry_t b_rdata [2];
  fvb_entry_t b_wdata [2];
  int checks = 0, failures = 0, n_marked = 0;

  tile_vis_buffer u_tvb (.clk, .rst_n, .clear, .wr_valid, .wr_quad, .wr_mask, .wr_opaque,
                         .wr_ptr, .rd_idx(t_ridx), .rd_data(t_rdata));
  visibility_updater dut (.clk, .rst_n, .key_frame, .scan_start, .tvb_ridx(t_ridx),
    .tvb_rdata(t_rdata), .cull_valid, .cull_ready, .cull_ptr,
    .fvb_re(b_re), .fvb_raddr(b_raddr), .fvb_rdata(b_rdata),
    .fvb_we(b_we), .fvb_waddr(b_waddr), .fvb_wdata(b_wdata),
    .busy, .n_updates, .intm_marked);
  frame_vis_buffer #(.ENTRIES(N)) u_fvb (.clk, .a_re, .a_raddr, .a_rdata, .a_we, .a_waddr,
    .a_wdata, .b_re, .b_raddr, .b_rdata, .b_we, .b_waddr, .b_wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  always @(posedge clk) if (intm_marked) n_marked++;

  fvb_entry_t mem [N];
  bit hitm [N];

  initial begin
    int base, cyc;
    fvb_entry_t e, exp;
    wr_quad = 0; wr_mask = 0; wr_ptr = VPTR_NULL; cull_ptr = VPTR_NULL; a_raddr = 0; a_waddr = 0;
    a_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) begin
      key_frame = (t % 2 == 0);
      base = int'($urandom % (N - 200));
      // preload 200 entries
      for (int i = 0; i < 200; i++) begin
        @(negedge clk); a_we = 1; a_waddr = fvb_addr_t'(base + i);
        a_wdata = 3'($urandom); mem[base + i] = a_wdata; hitm[base + i] = 0;
      end
      @(negedge clk) a_we = 0; clear = 1;
      @(negedge clk) clear = 0;
      // fill the tile: pointers into the first 150 entries
      for (int q = 0; q < 100; q++) begin
        @(negedge clk); wr_valid = 1; wr_quad = 6'($urandom); wr_mask = 4'($urandom);
        wr_ptr = '{valid: 1'b1, addr: fvb_addr_t'(base + int'($urandom % 150))};
      end
      @(negedge clk) wr_valid = 0;
      for (int i = 0; i < 256; i++) begin
        if (u_tvb.pix[i].valid) hitm[int'(u_tvb.pix[i].addr)] = 1;
      end
      // culled primitives in the last 50 entries
      for (int k = 0; k < 5; k++) begin
        cull_ptr = '{valid: 1'b1, addr: fvb_addr_t'(base + 150 + int'($urandom % 50))};
        hitm[int'(cull_ptr.addr)] = 1;
        cull_valid = 1;
        @(posedge clk); while (!cull_ready) @(posedge clk);
        @(negedge clk) cull_valid = 0;
      end
      while (busy) @(negedge clk);
      scan_start = 1;
      @(negedge clk) scan_start = 0;
      cyc = 1;
      while (busy) begin @(negedge clk); cyc++; end
      check(cyc <= 128 + 8, $sformatf("tile scan took %0d cycles", cyc));
      for (int i = 0; i < 200; i++) begin
        @(negedge clk); a_re = 1; a_raddr = fvb_addr_t'(base + i);
        @(negedge clk); a_re = 0; e = a_rdata;
        exp = mem[base + i];
        if (hitm[base + i]) begin
          exp.vis = 1;
          exp.intm = exp.intm | (key_frame & ~exp.prev);
        end
        check(e == exp, $sformatf("tile %0d entry %0d = %b expected %b", t, i, e, exp));
      end
    end
    check(n_marked > 0, "intermittent primitives marked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
