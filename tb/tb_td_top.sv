// End-to-end testbench of td_top at its default (full) size.
//
// A synthetic scene of 20 draw commands is rendered for 24 frames. The
// testbench plays the baseline GPU around the design: it issues each
// command's state, its vertices and its primitives, accepts the surviving
// primitives with random back-pressure, reports culled ones, and in the
// raster phase writes the visibility pointers of visible opaque primitives
// into the Tile Visibility Buffer (after an occluded primitive in the same
// pixel, as a depth test would), tile by tile.
//
// Ground truth per primitive p of command c in frame f:
//   p % 11 == 5            culled (back-facing)
//   p % 3 == 0             always occluded
//   p % 7 == 1             intermittent: visible when (f / 3) is even
//   otherwise              visible
// A behavioural model of the predictor (bitmap state per primitive, key-frame
// schedule with the dynamic refreshing interval, command matching by
// presence in the previous frame) predicts which primitives must be dropped;
// every primitive's fate and visibility pointer is checked against it.
// Eighteen commands are chosen so that their signatures hash to the same
// Main Table set, forcing insertions into a chained Overflow Buffer set; one
// command is transparent, one uses a geometry shader, and the two commands
// held in the Overflow Buffer leave the scene for two frames, so that they
// are deleted, their emptied overflow set is unlinked, and they are later
// inserted again (one of them into its old slot, reusing its old bitmap
// region). Each mechanism (hit, insertion, overflow insertion, chaining,
// region reuse, set unlinking, drop, bypass, intermittent kept,
// intermittent marked, key frame, interval growth to 5 and reset to 2,
// deletion, culled report, tile wait) is counted and must happen at least
// once.
module tb_td_top;
  import td_pkg::*;

  localparam int NC = 20, NF = 24;
  localparam int C_TRANSP = 18, C_GS = 19, C_AWAY = 17, C_AWAY2 = 16;

  logic clk = 0, rst_n = 0;
  logic frame_start = 0, frame_end = 0, key_frame;
  logic [3:0] interval;
  logic cmd_valid = 0, cmd_ready, cmd_gs = 0;
  cmd_state_t cmd_state;
  logic vq_valid = 0, vq_last = 0;
  svtx_t [3:0] vq;
  logic [3:0] vq_mask;
  logic prim_valid = 0, prim_ready, prim_last = 0;
  fvb_addr_t prim_id;
  logic [31:0] prim_payload, out_payload;
  logic out_valid, out_ready, out_last;
  vptr_t out_vptr, cull_ptr, quad_ptr;
  logic cull_valid = 0, cull_ready;
  logic tile_ready, tile_start = 0, tile_end = 0, quad_valid = 0, quad_opaque = 0;
  logic [5:0] quad_idx;
  logic [3:0] quad_mask;
  logic ev_hit, ev_insert, ev_ins_ovf, ev_chain, ev_reuse, ev_unlink, ev_full, ev_drop, ev_bypass;
  logic ev_intm_kept, ev_intm_marked;
  logic [1:0] ev_updates;
  int checks = 0, failures = 0;

  td_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
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

  // ------------------------------------------------------- event counters
  int c_hit, c_ins, c_ovf, c_chain, c_full, c_drop, c_byp, c_ikept, c_imark, c_upd;
  int c_reuse, c_unl, c_key, c_int5, c_reset2, c_deleted, c_cull, c_tilewait;
  always @(posedge clk) if (rst_n) begin
    c_hit += int'(ev_hit); c_ins += int'(ev_insert); c_ovf += int'(ev_ins_ovf);
    c_chain += int'(ev_chain); c_reuse += int'(ev_reuse); c_unl += int'(ev_unlink); c_full += int'(ev_full); c_drop += int'(ev_drop);
    c_byp += int'(ev_bypass); c_ikept += int'(ev_intm_kept); c_imark += int'(ev_intm_marked);
    c_upd += int'(ev_updates);
  end

  // ---------------------------------------------------- signature search
  localparam logic [64:0] GEN = {1'b1, 64'h42F0_E1EB_A9EA_3693};
  function automatic sig_t crc(input cmd_state_t st);
    logic [$bits(cmd_state_t)+63:0] r;
    r = {st, 64'h0};
    for (int i = $bits(cmd_state_t) + 63; i >= 64; i--)
      if (r[i]) r[i -: 65] = r[i -: 65] ^ GEN;
    return r[63:0];
  endfunction
  function automatic int hash5(input sig_t s);
    logic [4:0] h = '0;
    for (int i = 0; i < 64; i++) h[i % 5] ^= s[i];
    return int'(h);
  endfunction

  // ------------------------------------------------------------- scene
  cmd_state_t st [NC];
  int np [NC];
  int bx [NC], by [NC];

  function automatic bit present(int c, int f);
    return !((c == C_AWAY || c == C_AWAY2) && (f == 6 || f == 7));
  endfunction
  function automatic bit culled(int p);
    return p % 11 == 5;
  endfunction
  function automatic bit truly_visible(int p, int f);
    if (p % 3 == 0) return 0;
    if (p % 7 == 1) return ((f / 3) % 2) == 0;
    return 1;
  endfunction

  // ------------------------------------------------------------- model
  bit m_vis [NC][64], m_intm [NC][64], m_prev [NC][64];
  bit m_known [NC];
  bit m_first = 1, m_new_seen = 0;
  int m_int = 2, m_since = 0;
  bit m_key;

  // outputs collected per frame
  bit got [NC][64];
  vptr_t got_ptr [NC][64];
  vptr_t cull_q [$];
  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      int c, p;
      c = int'(out_payload[31:16]); p = int'(out_payload[15:0]);
      got[c][p] = 1; got_ptr[c][p] = out_vptr;
      if (culled(p) && out_vptr.valid) cull_q.push_back(out_vptr);
    end
  end
  always @(negedge clk) out_ready = ($urandom % 4) != 0;

  task automatic send_cmd(int c, int f);
    int nb;
    @(negedge clk);
    while (!cmd_ready) @(negedge clk);
    cmd_valid = 1; cmd_state = st[c]; cmd_gs = (c == C_GS);
    @(negedge clk) cmd_valid = 0;
    nb = 3;
    for (int b = 0; b < nb; b++) begin
      vq_valid = 1; vq_last = (b == nb - 1); vq_mask = 4'hF;
      for (int l = 0; l < 4; l++) begin
        vq[l].x = 16'(bx[c] + ((b * 4 + l) * 7) % 60 + (f % 3));
        vq[l].y = 16'(by[c] + ((b * 4 + l) * 5) % 40 - (f % 2));
      end
      @(negedge clk);
    end
    vq_valid = 0; vq_last = 0;
    for (int p = 0; p < np[c]; p++) begin
      prim_valid = 1; prim_id = fvb_addr_t'(p); prim_last = (p == np[c] - 1);
      prim_payload = {16'(c), 16'(p)};
      @(posedge clk);
      while (!prim_ready) @(posedge clk);
      @(negedge clk);
    end
    prim_valid = 0; prim_last = 0;
  endtask

  task automatic raster(int f);
    vptr_t vis_list [$];
    vptr_t hid_list [$];
    vptr_t tr_list [$];
    int ntiles, k;
    for (int c = 0; c < NC; c++)
      for (int p = 0; p < np[c]; p++)
        if (got[c][p] && !culled(p) && got_ptr[c][p].valid) begin
          if (c == C_TRANSP) tr_list.push_back(got_ptr[c][p]);
          else if (truly_visible(p, f)) vis_list.push_back(got_ptr[c][p]);
          else hid_list.push_back(got_ptr[c][p]);
        end
    ntiles = (vis_list.size() + 255) / 256;
    if (ntiles == 0) ntiles = 1;
    k = 0;
    for (int t = 0; t < ntiles; t++) begin
      @(negedge clk);
      if (!tile_ready) c_tilewait++;
      while (!tile_ready) @(negedge clk);
      tile_start = 1;
      @(negedge clk) tile_start = 0;
      for (int q = 0; q < 64; q++) begin
        // an occluded primitive first, then the nearer visible one
        if (hid_list.size() > 0 && k + 4 <= vis_list.size()) begin
          quad_valid = 1; quad_idx = 6'(q); quad_mask = 4'hF; quad_opaque = 1;
          quad_ptr = hid_list.pop_front();
          @(negedge clk);
        end
        for (int px = 0; px < 4; px++) begin
          if (k < vis_list.size()) begin
            quad_valid = 1; quad_idx = 6'(q); quad_mask = 4'(1 << px); quad_opaque = 1;
            quad_ptr = vis_list[k]; k++;
            @(negedge clk);
          end
        end
        if (tr_list.size() > 0) begin
          quad_valid = 1; quad_idx = 6'(q); quad_mask = 4'hF; quad_opaque = 0;
          quad_ptr = tr_list.pop_front();
          @(negedge clk);
        end
        quad_valid = 0;
      end
      tile_end = 1;
      @(negedge clk) tile_end = 0;
    end
    while (!tile_ready) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    bit is_new [NC];
    bit exp_pass;
    // ---- build the scene: 18 signatures in Main Table set 0
    for (int c = 0; c < NC; c++) begin
      np[c] = 16 + (c * 5) % 40;
      bx[c] = 40 + (c * 97) % 1900;
      by[c] = 30 + (c * 53) % 900;
      st[c] = '0;
      st[c].num_prims = 32'(np[c]);
      st[c].num_vertices = 32'(3 * np[c]);
      st[c].z_enable = 1; st[c].z_write_mask = 1; st[c].z_func = 3'd1;
      st[c].blend_enable = (c == C_TRANSP);
      st[c].color_mask = 4'hF;
      st[c].prim_type = 4'd4;
      st[c].fs_entry = 32'h100 + 32'(c);
      do st[c].vs_entry = $urandom;
      while (c < 18 && hash5(crc(st[c])) != 0);
    end
    for (int c = 0; c < NC; c++) m_known[c] = 0;
    cmd_state = '0; vq = '0; vq_mask = '0; prim_id = '0; prim_payload = '0;
    cull_ptr = VPTR_NULL; quad_ptr = VPTR_NULL; quad_idx = '0; quad_mask = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);

    for (int f = 0; f < NF; f++) begin
      // ---- model: frame start
      if (m_first) begin m_key = 1; m_first = 0; m_since = 0; m_new_seen = 0; end
      else if (m_since + 1 >= m_int) begin
        m_key = 1; m_since = 0;
        if (m_new_seen) begin
          if (m_int != 2) c_reset2++;
          m_int = 2;
        end else if (m_int < 5) m_int++;
        m_new_seen = 0;
      end else begin m_key = 0; m_since++; end
      frame_start = 1;
      @(negedge clk) frame_start = 0;
      check(key_frame == m_key, $sformatf("frame %0d key frame %0b expected %0b", f, key_frame, m_key));
      check(int'(interval) == m_int, $sformatf("frame %0d interval %0d expected %0d", f, interval, m_int));
      if (key_frame) c_key++;
      if (interval == 5) c_int5++;
      // ---- geometry phase
      for (int c = 0; c < NC; c++) for (int p = 0; p < 64; p++) got[c][p] = 0;
      for (int c = 0; c < NC; c++) begin
        if (!present(c, f)) continue;
        is_new[c] = (c != C_GS) && !m_known[c];
        if (is_new[c]) m_new_seen = 1;
        send_cmd(c, f);
      end
      repeat (4) @(negedge clk);
      // ---- check every primitive against the model, then update the model
      for (int c = 0; c < NC; c++) begin
        if (!present(c, f)) continue;
        for (int p = 0; p < np[c]; p++) begin
          exp_pass = 1;
          if (c != C_GS && c != C_TRANSP && !is_new[c] && !m_key && !m_intm[c][p] && !m_vis[c][p])
            exp_pass = 0;
          check(got[c][p] == exp_pass, $sformatf("frame %0d cmd %0d prim %0d passed=%0b expected %0b",
                                                 f, c, p, got[c][p], exp_pass));
          if (got[c][p])
            check(got_ptr[c][p].valid == (c != C_GS), $sformatf("frame %0d cmd %0d prim %0d pointer", f, c, p));
          if (c == C_GS) continue;
          if (is_new[c]) begin m_vis[c][p] = 0; m_intm[c][p] = 0; m_prev[c][p] = 1; end
          else if (m_key) begin m_prev[c][p] = m_vis[c][p]; m_vis[c][p] = 0; end
          if (exp_pass && (culled(p) || (c != C_TRANSP && truly_visible(p, f)))) begin
            if (m_key && !m_prev[c][p]) m_intm[c][p] = 1;
            m_vis[c][p] = 1;
          end
        end
      end
      // ---- culled primitives reported by the culling stage
      while (cull_q.size() > 0) begin
        cull_valid = 1; cull_ptr = cull_q.pop_front();
        @(posedge clk); while (!cull_ready) @(posedge clk);
        @(negedge clk); cull_valid = 0; c_cull++;
      end
      frame_end = 1;
      @(negedge clk) frame_end = 0;
      // ---- raster phase
      raster(f);
      // ---- model: end-of-frame deletion of unused commands
      for (int c = 0; c < NC; c++) begin
        if (c == C_GS) continue;
        if (m_known[c] && !present(c, f)) c_deleted++;
        m_known[c] = present(c, f);
      end
    end
    $display("hit=%0d ins=%0d ovf=%0d chain=%0d full=%0d drop=%0d bypass=%0d intm_kept=%0d intm_marked=%0d updates=%0d",
             c_hit, c_ins, c_ovf, c_chain, c_full, c_drop, c_byp, c_ikept, c_imark, c_upd);
    $display("reuse=%0d unlinked=%0d key=%0d int5=%0d reset2=%0d deleted=%0d cull=%0d tilewait=%0d",
             c_reuse, c_unl, c_key, c_int5, c_reset2, c_deleted, c_cull, c_tilewait);
    check(c_hit > 0, "command hit");
    check(c_ins > 0, "command insertion");
    check(c_ovf > 0, "insertion into the Overflow Buffer");
    check(c_chain > 0, "overflow set chained");
    check(c_reuse > 0, "deleted command's bitmap region reused");
    check(c_unl > 0, "emptied overflow set unlinked");
    check(c_drop > 0, "primitive dropped");
    check(c_byp > 0, "primitive bypassed");
    check(c_ikept > 0, "intermittent primitive kept");
    check(c_imark > 0, "intermittent primitive marked");
    check(c_upd > 0, "visibility updates");
    check(c_key > 1, "key frames");
    check(c_int5 > 0, "refreshing interval reached 5");
    check(c_reset2 > 0, "refreshing interval reset to 2");
    check(c_deleted > 0, "unused command deleted");
    check(c_cull > 0, "culled primitive reported");
    check(c_tilewait > 0, "tile start waited for the updater");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
