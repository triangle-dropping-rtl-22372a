// Testbench for command_matcher with a small Command Buffer (4 main sets,
// 4 overflow sets, 2 ways, 600-entry visibility buffer) so that overflow
// chains, chain allocation, reuse of a deleted command's bitmap region, a
// full buffer, bitmap exhaustion and the unlinking of emptied overflow sets
// all occur.
// A behavioural model of the Command Buffer predicts every response (hit or
// insert, bitmap pointer, null pointer) and its latency (2 cycles plus one
// per overflow set followed, plus one for an insertion). Commands come from
// a pool of signatures whose boxes are jittered across the DELTA boundary,
// some are repeated within a frame (a used slot must not match twice), and
// every frame ends with the deletion sweep.
module tb_command_matcher;
  import td_pkg::*;

  localparam int MS = 4, OS = 4, W = 2, DL = 16, FE = 600;
  logic clk = 0, rst_n = 0;
  logic req_valid = 0, req_ready, resp_valid, resp_hit, resp_new, frame_end = 0, busy;
  logic new_cmd, ins_ovf, chained, reused, unlinked, full;
  sig_t req_sig;
  bbox_t req_bbox;
  logic [31:0] req_nprims;
  vptr_t resp_ptr;
  int checks = 0, failures = 0;
  int n_hit = 0, n_ins = 0, n_ovf = 0, n_chain = 0, n_full = 0, n_reuse = 0, n_unl = 0;

  command_matcher #(.MT_SETS(MS), .OB_SETS(OS), .WAYS(W), .DELTA(DL), .FVB_ENTRIES(FE)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req_sig, .req_bbox, .req_nprims,
    .resp_valid, .resp_ptr, .resp_hit, .resp_new, .frame_end, .busy,
    .new_cmd, .ins_ovf, .chained, .reused, .unlinked, .full);

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

  // ----------------------------------------------------------- model
  typedef struct {bit v; bit ru; sig_t sig; bbox_t bb; int bmp; bit h; int len;} mslot_t;
  mslot_t tab [2][4][W];    // [0] main, [1] overflow
  int     ovf [2][4];       // -1 = null
  bit     oalloc [OS];
  int     pv_t [OS], pv_s [OS];   // set that points to each chained set
  int     top_m;

  function automatic int hash(sig_t s);
    int h = 0;
    for (int i = 0; i < 64; i += 2) h ^= int'(s[i +: 2]);
    return h;
  endfunction

  function automatic bit near(bbox_t a, bbox_t b);
    return (int'(a.xmin) - int'(b.xmin) <= DL) && (int'(b.xmin) - int'(a.xmin) <= DL) &&
           (int'(a.ymin) - int'(b.ymin) <= DL) && (int'(b.ymin) - int'(a.ymin) <= DL) &&
           (int'(a.xmax) - int'(b.xmax) <= DL) && (int'(b.xmax) - int'(a.xmax) <= DL) &&
           (int'(a.ymax) - int'(b.ymax) <= DL) && (int'(b.ymax) - int'(a.ymax) <= DL);
  endfunction

  // returns kind: 1 hit, 2 insert, 0 null; ptr; latency; ovf insert; chained
  task automatic model(input sig_t s, input bbox_t bb, input int np,
                       output int kind, output int ptr, output int lat,
                       output bit oi, output bit ch, output bit ru);
    int t, st, hops, ft, fs, fw, nf, gt, gs, gw;
    bit found, fit;
    t = 0; st = hash(s); hops = 0; found = 0; fit = 0; oi = 0; ch = 0; ru = 0;
    forever begin
      for (int w = 0; w < W; w++)
        if (tab[t][st][w].v && !tab[t][st][w].ru && tab[t][st][w].sig == s && near(tab[t][st][w].bb, bb)) begin
          tab[t][st][w].bb = bb; tab[t][st][w].ru = 1;
          kind = 1; ptr = tab[t][st][w].bmp; lat = 2 + hops;
          return;
        end
      if (!found)
        for (int w = 0; w < W; w++)
          if (!tab[t][st][w].v && !found) begin
            found = 1; ft = t; fs = st; fw = w;
          end
      if (!fit)
        for (int w = 0; w < W; w++)
          if (!tab[t][st][w].v && tab[t][st][w].h && tab[t][st][w].len >= np && !fit) begin
            fit = 1; gt = t; gs = st; gw = w;
          end
      if (ovf[t][st] < 0) break;
      st = ovf[t][st]; t = 1; hops++;
    end
    lat = 3 + hops;
    if (fit) begin
      // a deleted command's region in a free slot is large enough: reuse it
      tab[gt][gs][gw].v = 1; tab[gt][gs][gw].ru = 1;
      tab[gt][gs][gw].sig = s; tab[gt][gs][gw].bb = bb;
      oi = (gt == 1); ru = 1;
      kind = 2; ptr = tab[gt][gs][gw].bmp;
      return;
    end
    nf = -1;
    for (int i = OS - 1; i >= 0; i--) if (!oalloc[i]) nf = i;
    if (top_m + np > FE || (!found && nf < 0)) begin
      kind = 0; ptr = -1; return;
    end
    if (!found) begin
      oalloc[nf] = 1; ovf[t][st] = nf; pv_t[nf] = t; pv_s[nf] = st; ft = 1; fs = nf; fw = 0; ch = 1;
    end
    tab[ft][fs][fw] = '{v: 1, ru: 1, sig: s, bb: bb, bmp: top_m, h: 1, len: np};
    oi = (ft == 1);
    kind = 2; ptr = top_m; top_m += np;
  endtask

  task automatic model_sweep(output int unl);
    bit any = 0, empty;
    unl = 0;
    for (int t = 0; t < 2; t++)
      for (int st = 0; st < 4; st++)
        for (int w = 0; w < W; w++) begin
          tab[t][st][w].v = tab[t][st][w].v & tab[t][st][w].ru;
          tab[t][st][w].ru = 0;
          any |= tab[t][st][w].v;
        end
    if (!any) begin
      top_m = 0;
      for (int t = 0; t < 2; t++)
        for (int st = 0; st < 4; st++)
          for (int w = 0; w < W; w++) tab[t][st][w].h = 0;
    end
    // empty overflow sets at the end of a chain are unlinked, highest first
    for (int i = OS - 1; i >= 0; i--) begin
      empty = 1;
      for (int w = 0; w < W; w++) if (tab[1][i][w].v) empty = 0;
      if (oalloc[i] && empty && ovf[1][i] < 0) begin
        oalloc[i] = 0; ovf[pv_t[i]][pv_s[i]] = -1; unl++;
      end
    end
  endtask

  // -------------------------------------------------------- stimulus
  sig_t  pool_sig [16];
  bbox_t pool_bb  [16];
  int    pool_np  [16];

  task automatic lookup(input int c, input int jit);
    int kind, ptr, lat, cyc;
    bit oi, ch, ru, got_ins, got_ovf, got_ch, got_full, got_ru;
    bbox_t bb;
    bb = pool_bb[c];
    bb.xmin = bb.xmin + 16'(jit);
    bb.ymax = bb.ymax - 16'(jit);
    @(negedge clk);
    req_valid = 1; req_sig = pool_sig[c]; req_bbox = bb; req_nprims = pool_np[c];
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
    cyc = 1; got_ins = 0; got_ovf = 0; got_ch = 0; got_full = 0; got_ru = 0;
    while (!resp_valid) begin
      @(negedge clk); cyc++;
      got_ins |= new_cmd; got_ovf |= ins_ovf; got_ch |= chained; got_full |= full; got_ru |= reused;
      if (cyc > 40) break;
    end
    got_ins |= new_cmd; got_ovf |= ins_ovf; got_ch |= chained; got_full |= full; got_ru |= reused;
    model(pool_sig[c], bb, pool_np[c], kind, ptr, lat, oi, ch, ru);
    check(resp_valid, "response arrives");
    check(cyc == lat, $sformatf("cmd %0d latency %0d expected %0d", c, cyc, lat));
    check(resp_hit == (kind == 1) && resp_new == (kind == 2),
          $sformatf("cmd %0d kind hit=%0b new=%0b expected %0d", c, resp_hit, resp_new, kind));
    check(resp_ptr.valid == (kind != 0) && (kind == 0 || int'(resp_ptr.addr) == ptr),
          $sformatf("cmd %0d ptr %0b/%0d expected %0d", c, resp_ptr.valid, resp_ptr.addr, ptr));
    check(got_ins == (kind == 2) && got_ovf == (kind == 2 && oi) && got_ch == ch && got_full == (kind == 0) &&
          got_ru == ru,
          "event pulses");
    if (kind == 1) n_hit++;
    if (kind == 2) n_ins++;
    if (kind == 2 && oi) n_ovf++;
    if (ch) n_chain++;
    if (kind == 0) n_full++;
    if (ru) n_reuse++;
  endtask

  task automatic end_frame();
    int got, unl, cyc;
    @(negedge clk) frame_end = 1;
    @(negedge clk) frame_end = 0;
    check(busy, "busy during sweep");
    got = 0; cyc = 1;
    while (busy) begin
      got += int'(unlinked);
      @(negedge clk); cyc++;
    end
    got += int'(unlinked);
    model_sweep(unl);
    n_unl += unl;
    check(got == unl, $sformatf("unlinked sets %0d expected %0d", got, unl));
    check(cyc == ((MS > OS) ? MS : OS) + OS + 3, $sformatf("end-of-frame cycles %0d", cyc));
  endtask

  initial begin
    int jit, n, c;
    for (int t = 0; t < 2; t++) for (int st = 0; st < 4; st++) begin
      ovf[t][st] = -1;
      for (int w = 0; w < W; w++) tab[t][st][w] = '{v: 0, ru: 0, sig: 0, bb: 0, bmp: 0, h: 0, len: 0};
    end
    for (int i = 0; i < OS; i++) oalloc[i] = 0;
    top_m = 0;
    // signatures: 0..5 share main set 0 to build chains
    for (int i = 0; i < 16; i++) begin
      do pool_sig[i] = {$urandom, $urandom};
      while (i < 6 ? hash(pool_sig[i]) != 0 : hash(pool_sig[i]) == 0);
      pool_bb[i] = '{xmin: 16'($urandom % 1000), ymin: 16'($urandom % 500),
                     xmax: 16'(1000 + $urandom % 1000), ymax: 16'(500 + $urandom % 500)};
      pool_np[i] = 1 + ($urandom % 40);
    end
    req_sig = '0; req_bbox = '0; req_nprims = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 40; f++) begin
      n = (f < 20) ? 10 : 4;
      for (int k = 0; k < n; k++) begin
        c = (f < 20) ? int'($urandom % 16) : int'($urandom % 6);
        jit = (f % 7 == 3) ? int'($urandom % 40) - 20 : int'($urandom % 33) - 16;
        lookup(c, jit);
      end
      end_frame();
    end
    check(n_hit > 20 && n_ins > 10 && n_ovf > 3 && n_chain > 0 && n_full > 0 && n_reuse > 0 && n_unl > 0,
          $sformatf("coverage hit=%0d ins=%0d ovf=%0d chain=%0d full=%0d reuse=%0d unlinked=%0d",
                    n_hit, n_ins, n_ovf, n_chain, n_full, n_reuse, n_unl));
    $display("hit=%0d ins=%0d ovf=%0d chain=%0d full=%0d reuse=%0d unlinked=%0d",
             n_hit, n_ins, n_ovf, n_chain, n_full, n_reuse, n_unl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
