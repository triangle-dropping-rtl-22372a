// Triangle Dropping: occluded-geometry predictor for a tile-based deferred
// rendering GPU.
//
// The units sit between the baseline GPU stages, which stay outside this
// module and connect through its ports:
//
//   command processor --cmd_*--> Command Signature (CRC of static state)
//   vertex processors --vq_*---> Bounding Box (first 18 quad-vertices)
//        both --> Command Matcher + Command Buffer --bitmap pointer-->
//   primitive assembly --prim_*--> Primitive Dropper --out_*--> clipping/culling
//                                       |  ^ Frame Visibility Buffer
//   clipping/culling --cull_*-----------+--|--------------------+
//   early depth test --quad_*--> Tile Visibility Buffer --> Visibility Updater
//   frame control --frame_*--> refresh controller (key frames)
//
// A command sequencer moves one command at a time through the front end:
// it starts the signature and bounding-box registers when the command is
// issued, sends both to the Command Matcher once the partial box is complete,
// and hands the returned bitmap pointer to the Primitive Dropper, which then
// filters that command's primitives. The next command is accepted when the
// dropper has passed the previous command's last primitive. Commands using a
// geometry shader or tessellation skip the matcher and are bypassed, as are
// commands with no primitives (they are simply retired).
//
// Frame protocol: pulse frame_start before the first command of a frame
// (key_frame is valid from the next cycle) and frame_end after the last
// primitive of its geometry phase; the matcher then deletes commands not
// used in the frame. The raster phase follows: for each tile wait for
// tile_ready, pulse tile_start, stream quad-fragments, pulse tile_end.
//
// The block structure follows the technique's description (its figure of
// the pipeline); the sequencer, handshakes and port formats are this
// design's. The ev_* outputs pulse on the events named and are meant for
// statistics.
module td_top
  import td_pkg::*;
#(
  parameter int unsigned MT_SETS     = 32,
  parameter int unsigned OB_SETS     = 32,
  parameter int unsigned WAYS        = 16,
  parameter int unsigned DELTA       = 16,
  parameter int unsigned FVB_ENTRIES = FVB_ENTRIES_DEF,
  parameter int unsigned MAX_QV      = 18,
  parameter int unsigned PAYLOAD_W   = 32,
  parameter int unsigned TILE_W      = 16,
  parameter int unsigned TILE_H      = 16,
  localparam int unsigned QW = $clog2((TILE_W / 2) * (TILE_H / 2))
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // frame control
  input  logic                 frame_start,
  input  logic                 frame_end,
  output logic                 key_frame,
  output logic [3:0]           interval,
  // command processor
  input  logic                 cmd_valid,
  output logic                 cmd_ready,
  input  cmd_state_t           cmd_state,
  input  logic                 cmd_gs,
  // vertex processors (screen-space positions, four per beat)
  input  logic                 vq_valid,
  input  svtx_t [3:0]          vq,
  input  logic  [3:0]          vq_mask,
  input  logic                 vq_last,
  // primitive assembly
  input  logic                 prim_valid,
  output logic                 prim_ready,
  input  fvb_addr_t            prim_id,
  input  logic                 prim_last,
  input  logic [PAYLOAD_W-1:0] prim_payload,
  // to clipping and culling
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [PAYLOAD_W-1:0] out_payload,
  output vptr_t                out_vptr,
  output logic                 out_last,
  // culled primitives reported back by clipping and culling
  input  logic                 cull_valid,
  output logic                 cull_ready,
  input  vptr_t                cull_ptr,
  // early depth test
  output logic                 tile_ready,
  input  logic                 tile_start,
  input  logic                 tile_end,
  input  logic                 quad_valid,
  input  logic [QW-1:0]        quad_idx,
  input  logic [3:0]           quad_mask,
  input  logic                 quad_opaque,
  input  vptr_t                quad_ptr,
  // events
  output logic                 ev_hit,
  output logic                 ev_insert,
  output logic                 ev_ins_ovf,
  output logic                 ev_chain,
  output logic                 ev_reuse,
  output logic                 ev_unlink,
  output logic                 ev_full,
  output logic                 ev_drop,
  output logic                 ev_bypass,
  output logic                 ev_intm_kept,
  output logic                 ev_intm_marked,
  output logic [1:0]           ev_updates
);

  localparam int unsigned NPIX = TILE_W * TILE_H;

  // ------------------------------------------------------------ front end
  typedef enum logic [2:0] {T_IDLE, T_WAIT, T_REQ, T_RESP, T_CTX, T_RUN} tstate_e;
  tstate_e ts;

  logic        sig_valid, bb_done;
  sig_t        signature;
  bbox_t       bbox;
  logic        r_gs, r_transp;
  logic [31:0] r_nprims;
  logic        cmd_go;

  assign cmd_ready = (ts == T_IDLE);
  assign cmd_go    = cmd_valid && cmd_ready;

  cmd_signature u_sig (
    .clk, .rst_n, .start(cmd_go), .state(cmd_state),
    .sig_valid, .signature);

  bbox_unit #(.MAX_QV(MAX_QV)) u_bbox (
    .clk, .rst_n, .start(cmd_go), .vq_valid, .vq, .vq_mask, .vq_last,
    .done(bb_done), .bbox);

  logic  m_req_valid, m_req_ready, m_resp_valid, m_resp_hit, m_resp_new;
  vptr_t m_resp_ptr;
  logic  new_cmd;

  command_matcher #(.MT_SETS(MT_SETS), .OB_SETS(OB_SETS), .WAYS(WAYS),
                    .DELTA(DELTA), .FVB_ENTRIES(FVB_ENTRIES)) u_match (
    .clk, .rst_n,
    .req_valid(m_req_valid), .req_ready(m_req_ready),
    .req_sig(signature), .req_bbox(bbox), .req_nprims(r_nprims),
    .resp_valid(m_resp_valid), .resp_ptr(m_resp_ptr), .resp_hit(m_resp_hit),
    .resp_new(m_resp_new), .frame_end, .busy(), .new_cmd,
    .ins_ovf(ev_ins_ovf), .chained(ev_chain), .reused(ev_reuse), .unlinked(ev_unlink),
    .full(ev_full));

  assign ev_hit    = m_resp_valid && m_resp_hit;
  assign ev_insert = new_cmd;

  cmd_ctx_t ctx;
  logic     ctx_valid, ctx_ready, d_done;

  assign m_req_valid = (ts == T_REQ);
  assign ctx_valid   = (ts == T_CTX);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts       <= T_IDLE;
      r_gs     <= 1'b0;
      r_transp <= 1'b0;
      r_nprims <= '0;
      ctx      <= '0;
    end else begin
      case (ts)
        T_IDLE: if (cmd_go) begin
          r_gs     <= cmd_gs;
          r_transp <= cmd_state.blend_enable;
          r_nprims <= cmd_state.num_prims;
          ts       <= T_WAIT;
        end
        T_WAIT: if (bb_done && sig_valid) begin
          ctx <= '{bmp: VPTR_NULL, is_new: 1'b0, gs: r_gs, transparent: r_transp};
          if (r_nprims == '0) ts <= T_IDLE;
          else if (r_gs)      ts <= T_CTX;
          else                ts <= T_REQ;
        end
        T_REQ:  if (m_req_ready) ts <= T_RESP;
        T_RESP: if (m_resp_valid) begin
          ctx.bmp    <= m_resp_ptr;
          ctx.is_new <= m_resp_new;
          ts         <= T_CTX;
        end
        T_CTX:  if (ctx_ready) ts <= T_RUN;
        T_RUN:  if (d_done) ts <= T_IDLE;
        default: ts <= T_IDLE;
      endcase
    end
  end

  // -------------------------------------------------- refresh controller
  refresh_ctrl u_refresh (
    .clk, .rst_n, .frame_start, .new_cmd, .key_frame, .interval);

  // ------------------------------------------- Frame Visibility Buffer
  logic       a_re, a_we;
  fvb_addr_t  a_raddr, a_waddr;
  fvb_entry_t a_rdata, a_wdata;
  logic [1:0] b_re, b_we;
  fvb_addr_t  b_raddr [2];
  fvb_addr_t  b_waddr [2];
  fvb_entry_t b_rdata [2];
  fvb_entry_t b_wdata [2];

  frame_vis_buffer #(.ENTRIES(FVB_ENTRIES)) u_fvb (
    .clk,
    .a_re, .a_raddr, .a_rdata, .a_we, .a_waddr, .a_wdata,
    .b_re, .b_raddr, .b_rdata, .b_we, .b_waddr, .b_wdata);

  // ------------------------------------------------- Primitive Dropper
  primitive_dropper #(.PAYLOAD_W(PAYLOAD_W)) u_drop (
    .clk, .rst_n, .key_frame,
    .ctx_valid, .ctx_ready, .ctx,
    .in_valid(prim_valid), .in_ready(prim_ready), .in_id(prim_id),
    .in_last(prim_last), .in_payload(prim_payload),
    .out_valid, .out_ready, .out_payload, .out_vptr, .out_last,
    .fvb_re(a_re), .fvb_raddr(a_raddr), .fvb_rdata(a_rdata),
    .fvb_we(a_we), .fvb_waddr(a_waddr), .fvb_wdata(a_wdata),
    .done(d_done), .dropped(ev_drop), .bypassed(ev_bypass), .intm_kept(ev_intm_kept));

  // ------------------------------ Tile Visibility Buffer and updater
  logic [$clog2(NPIX)-1:0] t_ridx [2];
  vptr_t                   t_rdata [2];
  logic                    upd_busy;

  tile_vis_buffer #(.TILE_W(TILE_W), .TILE_H(TILE_H)) u_tvb (
    .clk, .rst_n, .clear(tile_start),
    .wr_valid(quad_valid), .wr_quad(quad_idx), .wr_mask(quad_mask),
    .wr_opaque(quad_opaque), .wr_ptr(quad_ptr),
    .rd_idx(t_ridx), .rd_data(t_rdata));

  visibility_updater #(.NPIX(NPIX)) u_upd (
    .clk, .rst_n, .key_frame, .scan_start(tile_end),
    .tvb_ridx(t_ridx), .tvb_rdata(t_rdata),
    .cull_valid, .cull_ready, .cull_ptr,
    .fvb_re(b_re), .fvb_raddr(b_raddr), .fvb_rdata(b_rdata),
    .fvb_we(b_we), .fvb_waddr(b_waddr), .fvb_wdata(b_wdata),
    .busy(upd_busy), .n_updates(ev_updates), .intm_marked(ev_intm_marked));

  assign tile_ready = !upd_busy && !tile_end;

endmodule
