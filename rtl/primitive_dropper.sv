// Primitive Dropper.
//
// Sits right after primitive assembly. For every primitive of the current
// command it reads the primitive's Frame Visibility Buffer entry (bitmap
// pointer + primitive id) and removes the primitive from the geometry
// pipeline when it was occluded when last rendered. Everything that cannot be
// predicted safely is passed on unchanged:
//   - commands with no bitmap (not matched and not inserted: null pointer),
//   - commands flagged as using a geometry shader or tessellation,
//   - transparent commands (blending enabled),
//   - commands inserted into the Command Buffer in this frame (no history),
//   - primitives marked intermittent,
//   - every primitive of a key frame.
// Bookkeeping writes, done as the primitive leaves the unit:
//   - new command: the entry is initialised to not visible, not intermittent,
//     previous visibility 1 (no evidence yet of an invisible-to-visible change);
//   - key frame: the visible bit is copied into the previous-visibility bit and
//     cleared, so that the raster pass of this frame rebuilds it.
// Every primitive that goes on carries its visibility pointer, so that the
// raster pipeline can report it visible.
// The drop rule and the bypass cases follow the technique's description; the
// initial previous bit and the key-frame clearing are this design's way of
// realising the intermittent-primitive detection it describes.
//
// Timing: one primitive per cycle. A primitive is accepted into a single
// stage while its entry is read (one cycle read latency) and leaves, or is
// dropped, from that stage. A command context (ctx_valid/ctx_ready) must be
// loaded before its primitives are accepted; it is released when the
// primitive flagged in_last leaves (done pulse).
module primitive_dropper
  import td_pkg::*;
#(
  parameter int unsigned PAYLOAD_W = 32
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 key_frame,
  // command context from the command matcher
  input  logic                 ctx_valid,
  output logic                 ctx_ready,
  input  cmd_ctx_t             ctx,
  // primitives from primitive assembly
  input  logic                 in_valid,
  output logic                 in_ready,
  input  fvb_addr_t            in_id,
  input  logic                 in_last,
  input  logic [PAYLOAD_W-1:0] in_payload,
  // primitives to clipping and culling
  output logic                 out_valid,
  input  logic                 out_ready,
  output logic [PAYLOAD_W-1:0] out_payload,
  output vptr_t                out_vptr,
  output logic                 out_last,
  // Frame Visibility Buffer port
  output logic                 fvb_re,
  output fvb_addr_t            fvb_raddr,
  input  fvb_entry_t           fvb_rdata,
  output logic                 fvb_we,
  output fvb_addr_t            fvb_waddr,
  output fvb_entry_t           fvb_wdata,
  // events
  output logic                 done,
  output logic                 dropped,
  output logic                 bypassed,
  output logic                 intm_kept
);

  logic                 ctx_active, last_in;
  cmd_ctx_t             c;
  logic                 s1_valid, s1_last;
  fvb_addr_t            s1_id;
  logic [PAYLOAD_W-1:0] s1_payload;

  logic has_ptr, predict, drop, retire, accept;

  assign has_ptr = c.bmp.valid && !c.gs;
  assign predict = has_ptr && !c.is_new && !key_frame && !c.transparent;
  assign drop    = s1_valid && predict && !fvb_rdata.intm && !fvb_rdata.vis;
  assign retire  = s1_valid && (drop || out_ready);

  assign ctx_ready = !ctx_active;
  assign in_ready  = ctx_active && !last_in && (!s1_valid || retire);
  assign accept    = in_valid && in_ready;

  assign fvb_re    = accept;
  assign fvb_raddr = c.bmp.addr + in_id;

  assign out_valid   = s1_valid && !drop;
  assign out_payload = s1_payload;
  assign out_last    = s1_last;
  assign out_vptr    = has_ptr ? '{valid: 1'b1, addr: c.bmp.addr + s1_id} : VPTR_NULL;

  always_comb begin
    fvb_we    = retire && has_ptr && (c.is_new || key_frame);
    fvb_waddr = c.bmp.addr + s1_id;
    if (c.is_new) fvb_wdata = '{vis: 1'b0, intm: 1'b0, prev: 1'b1};
    else          fvb_wdata = '{vis: 1'b0, intm: fvb_rdata.intm, prev: fvb_rdata.vis};
  end

  assign dropped   = retire && drop;
  assign bypassed  = retire && !drop && !predict;
  assign intm_kept = retire && predict && fvb_rdata.intm && !fvb_rdata.vis;
  assign done      = retire && s1_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctx_active <= 1'b0;
      last_in    <= 1'b0;
      c          <= '0;
      s1_valid   <= 1'b0;
      s1_last    <= 1'b0;
      s1_id      <= '0;
      s1_payload <= '0;
    end else begin
      if (ctx_valid && ctx_ready) begin
        ctx_active <= 1'b1;
        last_in    <= 1'b0;
        c          <= ctx;
      end
      if (accept) begin
        s1_valid   <= 1'b1;
        s1_id      <= in_id;
        s1_last    <= in_last;
        s1_payload <= in_payload;
        if (in_last) last_in <= 1'b1;
      end else if (retire) begin
        s1_valid <= 1'b0;
      end
      if (retire && s1_last) ctx_active <= 1'b0;
    end
  end

endmodule
