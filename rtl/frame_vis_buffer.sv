// Frame Visibility Buffer.
//
// Global on-chip memory holding one entry per primitive of every command in
// the Command Buffer: the visible bit measured when the primitive was last
// rendered, plus the intermittent and previous-visibility bits used to stop
// dropping primitives whose visibility flickers. A command's visibility
// bitmap is a run of consecutive entries starting at its bitmap pointer; the
// entry of a primitive is at bitmap pointer + primitive id.
//
// The default of 262144 entries is the 32 KiB of one-bit visibility entries
// the technique budgets; the two extra bits per entry are stored alongside
// (3 bits per entry in total), this design's resolution of the two sizes.
//
// Ports (all synchronous, read data one cycle after the read enable and held
// until the next read on that port):
//   a_*      Primitive Dropper: one read and one write per cycle;
//   b_*[2]   Visibility Updater: two read lanes and two write lanes.
// Writes to the same address in one cycle: lane b1 wins over b0, b0 over a.
// Addresses are taken modulo the power-of-two size. The memory is not reset; entries are initialised when a command's bitmap
// is allocated.
module frame_vis_buffer
  import td_pkg::*;
#(
  parameter int unsigned ENTRIES = FVB_ENTRIES_DEF,
  localparam int unsigned AW = FVB_AW,
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic             clk,
  input  logic             a_re,
  input  logic [AW-1:0]    a_raddr,
  output fvb_entry_t       a_rdata,
  input  logic             a_we,
  input  logic [AW-1:0]    a_waddr,
  input  fvb_entry_t       a_wdata,
  input  logic [1:0]       b_re,
  input  logic [AW-1:0]    b_raddr [2],
  output fvb_entry_t       b_rdata [2],
  input  logic [1:0]       b_we,
  input  logic [AW-1:0]    b_waddr [2],
  input  fvb_entry_t       b_wdata [2]
);

  fvb_entry_t mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (a_re) a_rdata <= mem[a_raddr[IW-1:0]];
    for (int l = 0; l < 2; l++)
      if (b_re[l]) b_rdata[l] <= mem[b_raddr[l][IW-1:0]];
    if (a_we) mem[a_waddr[IW-1:0]] <= a_wdata;
    for (int l = 0; l < 2; l++)
      if (b_we[l]) mem[b_waddr[l][IW-1:0]] <= b_wdata[l];
  end

endmodule
