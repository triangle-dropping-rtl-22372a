// Testbench for tile_vis_buffer (16x16 tile): per tile, random depth-tested
// quad-fragments (random pass masks, opaque or transparent) are written and
// every pixel is read back through both read ports and compared with a
// behavioural copy; clear must null every pixel.
module tb_tile_vis_buffer;
  import td_pkg::*;

  logic clk = 0, rst_n = 0, clear = 0, wr_valid = 0, wr_opaque;
  logic [5:0] wr_quad;
  logic [3:0] wr_mask;
  vptr_t wr_ptr;
  logic [7:0] rd_idx [2];
  vptr_t rd_data [2];
  int checks = 0, failures = 0;

  tile_vis_buffer dut (.clk, .rst_n, .clear, .wr_valid, .wr_quad, .wr_mask, .wr_opaque,
                       .wr_ptr, .rd_idx, .rd_data);

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

  vptr_t m [256];

  initial begin
    wr_quad = 0; wr_mask = 0; wr_opaque = 0; wr_ptr = VPTR_NULL; rd_idx[0] = 0; rd_idx[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      for (int i = 0; i < 256; i++) m[i] = VPTR_NULL;
      for (int i = 0; i < 256; i += 2) begin
        rd_idx[0] = 8'(i); rd_idx[1] = 8'(i + 1); #1;
        check(!rd_data[0].valid && !rd_data[1].valid, "null after clear");
      end
      for (int q = 0; q < 150; q++) begin
        @(negedge clk);
        wr_valid = 1; wr_quad = 6'($urandom); wr_mask = 4'($urandom);
        wr_opaque = ($urandom % 4 != 0);
        wr_ptr = '{valid: 1'b1, addr: fvb_addr_t'($urandom)};
        if (wr_opaque)
          for (int p = 0; p < 4; p++) if (wr_mask[p]) m[{wr_quad, 2'(p)}] = wr_ptr;
      end
      @(negedge clk) wr_valid = 0;
      for (int i = 0; i < 256; i += 2) begin
        rd_idx[0] = 8'(i); rd_idx[1] = 8'(i + 1); #1;
        check(rd_data[0] == m[i] && rd_data[1] == m[i + 1], $sformatf("tile %0d pixel %0d", t, i));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
