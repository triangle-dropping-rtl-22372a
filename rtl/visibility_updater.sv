// Visibility Updater.
//
// Writes the visibility measured by the raster pipeline back into the Frame
// Visibility Buffer. Two sources feed it:
//   - at the end of each tile (scan_start), the Tile Visibility Buffer is
//     scanned two pixels per cycle and every non-null pointer is queued;
//   - primitives removed by back-face culling or clipping are reported on the
//     cull port and are marked visible too, so that the dropper leaves them to
//     the ordinary culling stage.
// Up to LANES = 2 queued pointers per cycle go through a read-modify-write of
// their entry: read in one cycle, written in the next with
//   vis  = 1
//   intm = intm | (key_frame & ~prev)   (invisible-to-visible change)
//   prev = unchanged.
// The queue holds INFLIGHT = 8 pointers. Because the update never changes
// the bits it reads, repeated pointers (a primitive covering many pixels)
// need no hazard logic: every write of the same entry carries the same value.
// Two pointers per cycle, 8 in flight and the intermittent rule follow the
// technique's description; the queue and the cull port are this design's.
//
// busy stays high from scan_start until the last write; the next tile must
// not clear the Tile Visibility Buffer before busy falls. A full scan of a
// 16x16 tile takes 128 cycles when the queue does not fill.
module visibility_updater
  import td_pkg::*;
#(
  parameter int unsigned NPIX     = 256,
  parameter int unsigned INFLIGHT = 8,
  localparam int unsigned PXW = $clog2(NPIX),
  localparam int unsigned QAW = $clog2(INFLIGHT)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            key_frame,
  input  logic            scan_start,
  output logic [PXW-1:0]  tvb_ridx  [2],
  input  vptr_t           tvb_rdata [2],
  input  logic            cull_valid,
  output logic            cull_ready,
  input  vptr_t           cull_ptr,
  output logic [1:0]      fvb_re,
  output fvb_addr_t       fvb_raddr [2],
  input  fvb_entry_t      fvb_rdata [2],
  output logic [1:0]      fvb_we,
  output fvb_addr_t       fvb_waddr [2],
  output fvb_entry_t      fvb_wdata [2],
  output logic            busy,
  output logic [1:0]      n_updates,
  output logic            intm_marked
);

  logic             scanning;
  logic [PXW-2:0]   pair;
  fvb_addr_t        q [INFLIGHT];
  logic [QAW-1:0]   q_rd, q_wr;
  logic [QAW:0]     q_cnt;
  logic [1:0]       s2_v;
  fvb_addr_t        s2_addr [2];

  logic             scan_go, cull_go;
  logic [1:0]       n_push, n_pop;
  fvb_addr_t        push0, push1;

  assign tvb_ridx[0] = {pair, 1'b0};
  assign tvb_ridx[1] = {pair, 1'b1};

  assign scan_go    = scanning && (q_cnt <= (QAW+1)'(INFLIGHT - 2));
  assign cull_ready = !scan_go && (q_cnt < (QAW+1)'(INFLIGHT));
  assign cull_go    = cull_valid && cull_ready && cull_ptr.valid;

  always_comb begin
    n_push = '0;
    push0  = tvb_rdata[0].addr;
    push1  = tvb_rdata[1].addr;
    if (scan_go) begin
      n_push = 2'(tvb_rdata[0].valid) + 2'(tvb_rdata[1].valid);
      if (!tvb_rdata[0].valid) push0 = tvb_rdata[1].addr;
    end else if (cull_go) begin
      n_push = 2'd1;
      push0  = cull_ptr.addr;
    end
    n_pop = (q_cnt >= 2) ? 2'd2 : 2'(q_cnt);
  end

  always_comb begin
    for (int l = 0; l < 2; l++) begin
      fvb_re[l]    = (2'(l) < n_pop);
      fvb_raddr[l] = q[q_rd + QAW'(l)];
      fvb_we[l]    = s2_v[l];
      fvb_waddr[l] = s2_addr[l];
      fvb_wdata[l] = '{vis: 1'b1,
                       intm: fvb_rdata[l].intm | (key_frame & ~fvb_rdata[l].prev),
                       prev: fvb_rdata[l].prev};
    end
  end

  assign n_updates   = 2'(s2_v[0]) + 2'(s2_v[1]);
  assign intm_marked = key_frame &&
                       ((s2_v[0] && !fvb_rdata[0].prev && !fvb_rdata[0].intm) ||
                        (s2_v[1] && !fvb_rdata[1].prev && !fvb_rdata[1].intm));
  assign busy = scanning || (q_cnt != '0) || (s2_v != '0);

  always_ff @(posedge clk) begin
    if (n_push >= 2'd1) q[q_wr] <= push0;
    if (n_push == 2'd2) q[q_wr + 1'b1] <= push1;
    for (int l = 0; l < 2; l++) s2_addr[l] <= fvb_raddr[l];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scanning <= 1'b0;
      pair     <= '0;
      q_rd     <= '0;
      q_wr     <= '0;
      q_cnt    <= '0;
      s2_v     <= '0;
    end else begin
      if (scan_start) begin
        scanning <= 1'b1;
        pair     <= '0;
      end else if (scan_go) begin
        pair <= pair + 1'b1;
        if (pair == '1) scanning <= 1'b0;
      end
      q_wr  <= q_wr + QAW'(n_push);
      q_rd  <= q_rd + QAW'(n_pop);
      q_cnt <= q_cnt + (QAW+1)'(n_push) - (QAW+1)'(n_pop);
      s2_v  <= fvb_re;
    end
  end

endmodule
