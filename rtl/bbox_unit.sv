// Bounding Box register: partial screen-space bounding box of a command.
//
// Waiting for all vertices of a command before looking it up would stall the
// geometry pipeline, so only the first MAX_QV quad-vertices (beats of four
// vertices, one from each vertex processor) are folded into the box. The
// limit of 18 quad-vertices follows the technique's description; reading a
// quad-vertex as a beat of four vertices with a lane mask is this design's
// reading.
//
// Interface: start clears the box and begins a new command. Each vq_valid
// beat carries up to four screen-space vertices (vq_mask marks the valid
// lanes); vq_last marks the command's final beat. done rises the cycle after
// the MAX_QV-th beat or the last beat and stays high, with bbox stable, until
// the next start. Beats arriving after done are ignored. A command whose
// first beat has no valid lane keeps an empty box (min > max).
module bbox_unit
  import td_pkg::*;
#(
  parameter int unsigned MAX_QV = 18
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        vq_valid,
  input  svtx_t [3:0] vq,
  input  logic  [3:0] vq_mask,
  input  logic        vq_last,
  output logic        done,
  output bbox_t       bbox
);

  localparam logic signed [COORD_W-1:0] CMAX = {1'b0, {(COORD_W-1){1'b1}}};
  localparam logic signed [COORD_W-1:0] CMIN = {1'b1, {(COORD_W-1){1'b0}}};

  logic [$clog2(MAX_QV+1)-1:0] count;
  logic active;
  bbox_t nxt;

  always_comb begin
    nxt = bbox;
    for (int l = 0; l < 4; l++) begin
      if (vq_mask[l]) begin
        if (vq[l].x < nxt.xmin) nxt.xmin = vq[l].x;
        if (vq[l].x > nxt.xmax) nxt.xmax = vq[l].x;
        if (vq[l].y < nxt.ymin) nxt.ymin = vq[l].y;
        if (vq[l].y > nxt.ymax) nxt.ymax = vq[l].y;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      done   <= 1'b0;
      count  <= '0;
      bbox   <= '{xmin: CMAX, ymin: CMAX, xmax: CMIN, ymax: CMIN};
    end else if (start) begin
      active <= 1'b1;
      done   <= 1'b0;
      count  <= '0;
      bbox   <= '{xmin: CMAX, ymin: CMAX, xmax: CMIN, ymax: CMIN};
    end else if (active && vq_valid) begin
      bbox  <= nxt;
      count <= count + 1'b1;
      if (vq_last || (count == $bits(count)'(MAX_QV - 1))) begin
        active <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

endmodule
