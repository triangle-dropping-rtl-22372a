// Tile Visibility Buffer.
//
// Lives beside the Z-Buffer of the early depth test and records, for every
// pixel of the current tile, the visibility pointer of the nearest opaque
// fragment seen so far. When the tile's last quad-fragment has been
// depth-tested, the non-null entries name exactly the primitives that are
// visible in the tile; the Visibility Updater then reads them out.
//
// Organisation: one entry per quad-fragment (2x2 pixels), each holding four
// per-pixel pointers, so the buffer has as many pointers as the Z-Buffer has
// depths. The technique describes the buffer both as "one pointer per
// quad-fragment" and as "the same dimensions as the Z-Buffer"; keeping a
// pointer per pixel satisfies both and never loses a primitive that wins only
// part of a quad. The 16x16 tile follows the technique; the per-pixel pass
// mask supplied by the depth test is this design's interface choice.
//
// Interface:
//   clear            tile start: every pointer becomes null (next cycle);
//   wr_*             one depth-tested quad-fragment per cycle: for each pixel
//                    whose bit in wr_mask is set (it passed the depth test),
//                    the pointer is replaced by wr_ptr if the fragment is
//                    opaque; transparent fragments never write;
//   rd_idx/rd_data   two combinational read ports, pixel index = quad*4+pixel.
module tile_vis_buffer
  import td_pkg::*;
#(
  parameter int unsigned TILE_W = 16,
  parameter int unsigned TILE_H = 16,
  localparam int unsigned QUADS = (TILE_W / 2) * (TILE_H / 2),
  localparam int unsigned NPIX  = QUADS * 4,
  localparam int unsigned QW    = $clog2(QUADS),
  localparam int unsigned PXW   = $clog2(NPIX)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           clear,
  input  logic           wr_valid,
  input  logic [QW-1:0]  wr_quad,
  input  logic [3:0]     wr_mask,
  input  logic           wr_opaque,
  input  vptr_t          wr_ptr,
  input  logic [PXW-1:0] rd_idx  [2],
  output vptr_t          rd_data [2]
);

  vptr_t pix [NPIX];

  always_comb
    for (int l = 0; l < 2; l++) rd_data[l] = pix[rd_idx[l]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPIX; i++) pix[i] <= VPTR_NULL;
    end else if (clear) begin
      for (int i = 0; i < NPIX; i++) pix[i] <= VPTR_NULL;
    end else if (wr_valid && wr_opaque) begin
      for (int p = 0; p < 4; p++)
        if (wr_mask[p]) pix[{wr_quad, 2'(p)}] <= wr_ptr;
    end
  end

endmodule
