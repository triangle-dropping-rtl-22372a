// Testbench for cmd_table (default 32 sets x 16 ways): random slot writes,
// overflow-pointer writes and end-of-frame sweeps, checked every cycle
// against a behavioural copy of the table on a randomly chosen set
// (payload of valid and held slots, valid, recently-used and held bits,
// overflow pointer, any_valid). A deleted slot must keep its payload and
// held bit until release_all.
module tb_cmd_table;
  import td_pkg::*;

  localparam int S = 32, W = 16;
  logic clk = 0, rst_n = 0;
  logic [4:0] rd_set, wr_set, ovf_set, sweep_set;
  logic [3:0] wr_way;
  slot_t [W-1:0] rd_slots;
  logic [W-1:0] rd_valid, rd_ru, rd_held;
  logic rd_ovf_valid, wr_en = 0, ovf_we = 0, ovf_valid, sweep_en = 0, any_valid, release_all = 0;
  logic [4:0] rd_ovf, ovf_ptr;
  slot_t wr_slot;
  int checks = 0, failures = 0, n_sweep_del = 0, n_release = 0;

  cmd_table #(.SETS(S), .WAYS(W), .PTR_SETS(S)) dut (
    .clk, .rst_n, .rd_set, .rd_slots, .rd_valid, .rd_ru, .rd_held, .rd_ovf_valid, .rd_ovf,
    .wr_en, .wr_set, .wr_way, .wr_slot, .ovf_we, .ovf_set, .ovf_valid, .ovf_ptr,
    .sweep_en, .sweep_set, .release_all, .any_valid);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
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

  slot_t m_slot [S][W];
  bit    m_v [S][W], m_ru [S][W], m_h [S][W], m_ov [S];
  int    m_o [S];

  initial begin
    bit any;
    for (int s = 0; s < S; s++) begin
      m_ov[s] = 0; m_o[s] = 0;
      for (int w = 0; w < W; w++) begin m_v[s][w] = 0; m_ru[s][w] = 0; m_h[s][w] = 0; end
    end
    rd_set = 0; wr_set = 0; wr_way = 0; wr_slot = '0; ovf_set = 0; ovf_valid = 0;
    ovf_ptr = 0; sweep_set = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      // check the state left by the previous edge
      rd_set = 5'($urandom);
      #1;
      any = 0;
      for (int s = 0; s < S; s++) for (int w = 0; w < W; w++) any |= m_v[s][w];
      check(any_valid == any, "any_valid");
      check(rd_ovf_valid == m_ov[rd_set] && (!m_ov[rd_set] || int'(rd_ovf) == m_o[rd_set]), "overflow pointer");
      for (int w = 0; w < W; w++) begin
        check(rd_valid[w] == m_v[rd_set][w] && rd_ru[w] == m_ru[rd_set][w] &&
              rd_held[w] == m_h[rd_set][w],
              $sformatf("valid/ru/held set %0d way %0d", rd_set, w));
        if (m_v[rd_set][w] || m_h[rd_set][w]) check(rd_slots[w] == m_slot[rd_set][w], "slot payload");
      end
      // next operations
      wr_en = ($urandom % 3) == 0;
      wr_set = 5'($urandom % 8); wr_way = 4'($urandom);
      wr_slot = '{sig: {$urandom, $urandom}, bbox: {$urandom, $urandom}, bmp: 18'($urandom),
                 len: 19'($urandom)};
      release_all = ($urandom % 50) == 0;
      if (release_all) begin
        n_release++;
        for (int s = 0; s < S; s++) for (int w = 0; w < W; w++) m_h[s][w] = 0;
      end
      ovf_we = ($urandom % 5) == 0;
      ovf_set = 5'($urandom); ovf_valid = 1'($urandom); ovf_ptr = 5'($urandom);
      sweep_en = ($urandom % 6) == 0;
      sweep_set = 5'($urandom % 8);
      if (sweep_en)
        for (int w = 0; w < W; w++) begin
          if (m_v[sweep_set][w] && !m_ru[sweep_set][w]) n_sweep_del++;
          m_v[sweep_set][w] = m_v[sweep_set][w] & m_ru[sweep_set][w];
          m_ru[sweep_set][w] = 0;
        end
      if (wr_en) begin
        m_v[wr_set][wr_way] = 1; m_ru[wr_set][wr_way] = 1; m_slot[wr_set][wr_way] = wr_slot;
        m_h[wr_set][wr_way] = 1;
      end
      if (ovf_we) begin m_ov[ovf_set] = ovf_valid; m_o[ovf_set] = int'(ovf_ptr); end
      if (c == 5000) begin
        // clear everything through sweeps with no writes in between
        wr_en = 0; ovf_we = 0; release_all = 0;
        for (int k = 0; k < 2; k++)
          for (int s = 0; s < S; s++) begin
            sweep_en = 1; sweep_set = 5'(s);
            for (int w = 0; w < W; w++) begin
              if (m_v[s][w] && !m_ru[s][w]) n_sweep_del++;
              m_v[s][w] = m_v[s][w] & m_ru[s][w]; m_ru[s][w] = 0;
            end
            @(negedge clk);
          end
        sweep_en = 0;
        #1 check(!any_valid, "table empty after two full sweeps");
      end
    end
    check(n_sweep_del > 50 && n_release > 20, "sweep deleted unused slots; regions released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
