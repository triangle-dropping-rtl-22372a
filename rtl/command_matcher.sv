// Command Matcher with its Command Buffer (Main Table + Overflow Buffer).
//
// Decides whether a draw command of the current frame is the same object as
// one seen in the previous frame, so that the previous frame's per-primitive
// visibility can be reused. A command matches a stored one when the 64-bit
// signatures are equal and every bounding-box coordinate differs by at most
// DELTA pixels, and the stored command has not already been matched in this
// frame (recently-used bit clear).
//
// Lookup (one set per cycle):
//   - the Main Table set is chosen by XOR-folding the signature into the
//     set-index width; all WAYS slots are compared in parallel;
//   - on a miss the set's overflow pointer is followed through the chain of
//     Overflow Buffer sets, one set per cycle;
//   - on a hit the slot's box is replaced by the new one, its recently-used
//     bit set, and its bitmap pointer returned (resp_hit);
//   - on a miss the command needs a slot and a visibility bitmap of
//     req_nprims entries in the Frame Visibility Buffer. If a free slot seen
//     along the chain still holds the region of the command deleted from it
//     and that region is large enough, the command takes that slot and
//     reuses the region (reused). Otherwise it takes the first free slot seen
//     along the chain, or slot 0 of a newly allocated Overflow Buffer set
//     chained to the last set visited, with a fresh region. The bitmap base
//     is returned (resp_new). If no slot or bitmap space is left, the null
//     pointer is returned and the command is treated as an ordinary one.
// End of frame (frame_end pulse): one set of each table per cycle, slots that
// were not used in the frame are deleted and recently-used bits cleared.
// Then the Overflow Buffer sets are visited from the highest index down, one
// per cycle: an allocated set that is now empty and ends its chain is
// unlinked from the set that points to it (each overflow set records that
// set when it is chained) and becomes free for any chain (unlinked).
//
// The structure, the matching rule and the end-of-frame deletion follow the
// technique's description. The hash, DELTA = 16 (one tile), the bitmap
// allocator and keeping overflow sets chained once allocated are this
// design's choices, as is the trimming of empty tail sets. Fresh regions come from a bump pointer; the space of a
// deleted command is reused only through its slot as above, and the pointer
// is rewound (releasing every held region) when the sweep leaves the Command
// Buffer empty.
//
// Interface: req_valid/req_ready handshake; resp_valid pulses once per
// accepted request, 2 cycles (hit in the Main Table) to 2 + chain length
// cycles later. new_cmd pulses on every insertion; ins_ovf when the insertion
// went to the Overflow Buffer; chained when a new overflow set was linked;
// reused when a deleted command's region was taken over; unlinked when an
// empty overflow set was freed; full when a command could not be inserted.
// The end-of-frame work takes max(MT_SETS, OB_SETS) + 1 + OB_SETS cycles.
module command_matcher
  import td_pkg::*;
#(
  parameter int unsigned MT_SETS     = 32,
  parameter int unsigned OB_SETS     = 32,
  parameter int unsigned WAYS        = 16,
  parameter int unsigned DELTA       = 16,
  parameter int unsigned FVB_ENTRIES = FVB_ENTRIES_DEF
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        req_valid,
  output logic        req_ready,
  input  sig_t        req_sig,
  input  bbox_t       req_bbox,
  input  logic [31:0] req_nprims,
  output logic        resp_valid,
  output vptr_t       resp_ptr,
  output logic        resp_hit,
  output logic        resp_new,
  input  logic        frame_end,
  output logic        busy,
  output logic        new_cmd,
  output logic        ins_ovf,
  output logic        chained,
  output logic        reused,
  output logic        unlinked,
  output logic        full
);

  localparam int unsigned MSW = (MT_SETS > 1) ? $clog2(MT_SETS) : 1;
  localparam int unsigned OSW = (OB_SETS > 1) ? $clog2(OB_SETS) : 1;
  localparam int unsigned WW  = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned CSW = (MSW > OSW) ? MSW : OSW;
  localparam int unsigned NSWEEP = (MT_SETS > OB_SETS) ? MT_SETS : OB_SETS;

  typedef enum logic [2:0] {S_IDLE, S_SEARCH, S_INSERT, S_SWEEP, S_SWEEP_END, S_TRIM} state_e;
  state_e state;

  sig_t          r_sig;
  bbox_t         r_bbox;
  logic [31:0]   r_nprims;
  logic          cur_ob;
  logic [CSW-1:0] cur_set;
  logic [OSW:0]  hops;
  logic          free_found, free_ob;
  logic [CSW-1:0] free_set;
  logic [WW-1:0] free_way;
  logic          fit_found, fit_ob;
  logic [CSW-1:0] fit_set;
  logic [WW-1:0] fit_way;
  fvb_addr_t     fit_bmp;
  logic [FVB_AW:0] fit_len;
  logic [FVB_AW:0] alloc_top;
  logic [CSW:0]  sweep_idx;
  logic          end_pending;
  logic [OB_SETS-1:0] ob_alloc;
  logic            ob_prev_ob  [OB_SETS];  // predecessor of each chained set
  logic [CSW-1:0]  ob_prev_set [OB_SETS];

  // ---------------------------------------------------------------- tables
  slot_t [WAYS-1:0] mt_slots, ob_slots, cs_slots;
  logic  [WAYS-1:0] mt_valid, ob_valid, mt_ru, ob_ru, cs_valid, cs_ru;
  logic  [WAYS-1:0] mt_held, ob_held, cs_held;
  logic             mt_ovf_v, ob_ovf_v, cs_ovf_v;
  logic  [OSW-1:0]  mt_ovf, ob_ovf, cs_ovf;
  logic             mt_any, ob_any;

  logic             mt_we, ob_we, mt_ovf_we, ob_ovf_we;
  logic [CSW-1:0]   w_set;
  logic [WW-1:0]    w_way;
  slot_t            w_slot;
  logic [OSW-1:0]   new_ob;
  logic             mt_sweep, ob_sweep;
  logic             chain_now;
  logic             rel_all;
  logic             ovf_nn;     // overflow pointer written as non-null
  logic             trim_now;

  cmd_table #(.SETS(MT_SETS), .WAYS(WAYS), .PTR_SETS(OB_SETS)) u_main (
    .clk, .rst_n,
    .rd_set(cur_set[MSW-1:0]), .rd_slots(mt_slots), .rd_valid(mt_valid), .rd_ru(mt_ru), .rd_held(mt_held),
    .rd_ovf_valid(mt_ovf_v), .rd_ovf(mt_ovf),
    .wr_en(mt_we), .wr_set(w_set[MSW-1:0]), .wr_way(w_way), .wr_slot(w_slot),
    .ovf_we(mt_ovf_we), .ovf_set(w_set[MSW-1:0]), .ovf_valid(ovf_nn), .ovf_ptr(new_ob),
    .sweep_en(mt_sweep), .sweep_set(sweep_idx[MSW-1:0]), .release_all(rel_all),
    .any_valid(mt_any));

  cmd_table #(.SETS(OB_SETS), .WAYS(WAYS), .PTR_SETS(OB_SETS)) u_ovf (
    .clk, .rst_n,
    .rd_set(cur_set[OSW-1:0]), .rd_slots(ob_slots), .rd_valid(ob_valid), .rd_ru(ob_ru), .rd_held(ob_held),
    .rd_ovf_valid(ob_ovf_v), .rd_ovf(ob_ovf),
    .wr_en(ob_we), .wr_set(chain_now ? CSW'(new_ob) : w_set), .wr_way(w_way), .wr_slot(w_slot),
    .ovf_we(ob_ovf_we), .ovf_set(w_set[OSW-1:0]), .ovf_valid(ovf_nn), .ovf_ptr(new_ob),
    .sweep_en(ob_sweep), .sweep_set(sweep_idx[OSW-1:0]), .release_all(rel_all),
    .any_valid(ob_any));

  assign chain_now = (state == S_INSERT) && !free_found;
  assign rel_all   = (state == S_SWEEP_END) && !mt_any && !ob_any;
  assign trim_now  = (state == S_TRIM) && ob_alloc[cur_set[OSW-1:0]] && !(|ob_valid) && !ob_ovf_v;

  assign cs_slots = cur_ob ? ob_slots : mt_slots;
  assign cs_valid = cur_ob ? ob_valid : mt_valid;
  assign cs_ru    = cur_ob ? ob_ru    : mt_ru;
  assign cs_held  = cur_ob ? ob_held  : mt_held;
  assign cs_ovf_v = cur_ob ? ob_ovf_v : mt_ovf_v;
  assign cs_ovf   = cur_ob ? ob_ovf   : mt_ovf;

  // ------------------------------------------------------------ matching
  function automatic logic [MSW-1:0] xor_hash(input sig_t s);
    logic [MSW-1:0] h;
    h = '0;
    for (int i = 0; i < SIG_W; i++) h[i % MSW] ^= s[i];
    return h;
  endfunction

  function automatic logic close(input logic signed [COORD_W-1:0] a,
                                 input logic signed [COORD_W-1:0] b);
    logic signed [COORD_W:0] d;
    d = {a[COORD_W-1], a} - {b[COORD_W-1], b};
    return (d <= $signed((COORD_W+1)'(DELTA))) && (d >= -$signed((COORD_W+1)'(DELTA)));
  endfunction

  logic [WAYS-1:0] hit_vec, free_vec, fit_vec;
  logic            any_hit, any_free, any_fit;
  logic [WW-1:0]   hit_way, fr_way, ft_way;

  always_comb begin
    for (int w = 0; w < WAYS; w++) begin
      hit_vec[w] = cs_valid[w] && !cs_ru[w] && (cs_slots[w].sig == r_sig) &&
                   close(cs_slots[w].bbox.xmin, r_bbox.xmin) &&
                   close(cs_slots[w].bbox.ymin, r_bbox.ymin) &&
                   close(cs_slots[w].bbox.xmax, r_bbox.xmax) &&
                   close(cs_slots[w].bbox.ymax, r_bbox.ymax);
      free_vec[w] = !cs_valid[w];
      fit_vec[w]  = !cs_valid[w] && cs_held[w] && (33'(cs_slots[w].len) >= 33'(r_nprims));
    end
    any_hit = |hit_vec;
    any_free = |free_vec;
    any_fit = |fit_vec;
    hit_way = '0;
    fr_way  = '0;
    ft_way  = '0;
    for (int w = WAYS - 1; w >= 0; w--) begin
      if (hit_vec[w])  hit_way = WW'(w);
      if (free_vec[w]) fr_way  = WW'(w);
      if (fit_vec[w])  ft_way  = WW'(w);
    end
  end

  logic [OSW-1:0] first_free_ob;
  logic           ob_avail;
  always_comb begin
    first_free_ob = '0;
    ob_avail = 1'b0;
    for (int s = OB_SETS - 1; s >= 0; s--)
      if (!ob_alloc[s]) begin
        first_free_ob = OSW'(s);
        ob_avail = 1'b1;
      end
  end

  logic bmp_fits;
  assign bmp_fits = (33'(alloc_top) + 33'(r_nprims)) <= 33'(FVB_ENTRIES);

  // ---------------------------------------------------------- write control
  always_comb begin
    mt_we = 1'b0; ob_we = 1'b0; mt_ovf_we = 1'b0; ob_ovf_we = 1'b0;
    w_set = cur_set; w_way = hit_way; new_ob = first_free_ob;
    w_slot = '{sig: r_sig, bbox: r_bbox, bmp: alloc_top[FVB_AW-1:0], len: r_nprims[FVB_AW:0]};
    mt_sweep = 1'b0; ob_sweep = 1'b0; ovf_nn = 1'b1;
    case (state)
      S_SEARCH: if (any_hit) begin
        w_slot.bmp = cs_slots[hit_way].bmp;
        w_slot.len = cs_slots[hit_way].len;
        if (cur_ob) ob_we = 1'b1; else mt_we = 1'b1;
      end
      S_INSERT: if (fit_found) begin
        // take over the region of the command deleted from this slot
        w_set = fit_set; w_way = fit_way;
        w_slot.bmp = fit_bmp; w_slot.len = fit_len;
        if (fit_ob) ob_we = 1'b1; else mt_we = 1'b1;
      end else if (bmp_fits) begin
        if (free_found) begin
          w_set = free_set; w_way = free_way;
          if (free_ob) ob_we = 1'b1; else mt_we = 1'b1;
        end else if (ob_avail) begin
          // chain a fresh overflow set behind the last set visited
          w_way = '0;
          ob_we = 1'b1;
          if (cur_ob) ob_ovf_we = 1'b1; else mt_ovf_we = 1'b1;
        end
      end
      S_SWEEP: begin
        mt_sweep = (sweep_idx < (CSW+1)'(MT_SETS));
        ob_sweep = (sweep_idx < (CSW+1)'(OB_SETS));
      end
      S_TRIM: if (trim_now) begin
        // null the pointer that leads to the empty tail set
        ovf_nn = 1'b0;
        w_set  = ob_prev_set[cur_set[OSW-1:0]];
        if (ob_prev_ob[cur_set[OSW-1:0]]) ob_ovf_we = 1'b1; else mt_ovf_we = 1'b1;
      end
      default: ;
    endcase
  end

  assign req_ready = (state == S_IDLE) && !end_pending && !frame_end;
  assign busy      = (state != S_IDLE) || end_pending;

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      r_sig <= '0; r_bbox <= '0; r_nprims <= '0;
      cur_ob <= 1'b0; cur_set <= '0; hops <= '0;
      free_found <= 1'b0; free_ob <= 1'b0; free_set <= '0; free_way <= '0;
      alloc_top <= '0; sweep_idx <= '0; end_pending <= 1'b0; ob_alloc <= '0;
      resp_valid <= 1'b0; resp_ptr <= VPTR_NULL; resp_hit <= 1'b0; resp_new <= 1'b0;
      fit_found <= 1'b0; fit_ob <= 1'b0; fit_set <= '0; fit_way <= '0;
      fit_bmp <= '0; fit_len <= '0;
      new_cmd <= 1'b0; ins_ovf <= 1'b0; chained <= 1'b0; reused <= 1'b0; full <= 1'b0;
      unlinked <= 1'b0;
      for (int s = 0; s < OB_SETS; s++) begin
        ob_prev_ob[s] <= 1'b0; ob_prev_set[s] <= '0;
      end
    end else begin
      resp_valid <= 1'b0; new_cmd <= 1'b0; ins_ovf <= 1'b0; chained <= 1'b0;
      reused <= 1'b0; full <= 1'b0; unlinked <= 1'b0;
      if (frame_end) end_pending <= 1'b1;
      case (state)
        S_IDLE: begin
          if (end_pending) begin
            state <= S_SWEEP;
            sweep_idx <= '0;
          end else if (req_valid && req_ready) begin
            r_sig <= req_sig; r_bbox <= req_bbox; r_nprims <= req_nprims;
            cur_ob <= 1'b0; cur_set <= CSW'(xor_hash(req_sig)); hops <= '0;
            free_found <= 1'b0; fit_found <= 1'b0;
            state <= S_SEARCH;
          end
        end
        S_SEARCH: begin
          if (any_hit) begin
            resp_valid <= 1'b1; resp_hit <= 1'b1; resp_new <= 1'b0;
            resp_ptr <= '{valid: 1'b1, addr: cs_slots[hit_way].bmp};
            state <= S_IDLE;
          end else begin
            if (!free_found && any_free) begin
              free_found <= 1'b1; free_ob <= cur_ob; free_set <= cur_set; free_way <= fr_way;
            end
            if (!fit_found && any_fit) begin
              fit_found <= 1'b1; fit_ob <= cur_ob; fit_set <= cur_set; fit_way <= ft_way;
              fit_bmp <= cs_slots[ft_way].bmp; fit_len <= cs_slots[ft_way].len;
            end
            if (cs_ovf_v && hops < (OSW+1)'(OB_SETS)) begin
              cur_ob <= 1'b1; cur_set <= CSW'(cs_ovf); hops <= hops + 1'b1;
            end else begin
              state <= S_INSERT;
            end
          end
        end
        S_INSERT: begin
          resp_valid <= 1'b1; resp_hit <= 1'b0;
          state <= S_IDLE;
          if (fit_found) begin
            resp_new <= 1'b1; new_cmd <= 1'b1; reused <= 1'b1;
            resp_ptr <= '{valid: 1'b1, addr: fit_bmp};
            ins_ovf <= fit_ob;
          end else if (bmp_fits && (free_found || ob_avail)) begin
            resp_new <= 1'b1; new_cmd <= 1'b1;
            resp_ptr <= '{valid: 1'b1, addr: alloc_top[FVB_AW-1:0]};
            alloc_top <= alloc_top + r_nprims[FVB_AW:0];
            ins_ovf <= free_found ? free_ob : 1'b1;
            if (!free_found) begin
              ob_alloc[first_free_ob] <= 1'b1;
              ob_prev_ob[first_free_ob] <= cur_ob;
              ob_prev_set[first_free_ob] <= cur_set;
              chained <= 1'b1;
            end
          end else begin
            resp_new <= 1'b0; full <= 1'b1;
            resp_ptr <= VPTR_NULL;
          end
        end
        S_SWEEP: begin
          end_pending <= frame_end;
          sweep_idx <= sweep_idx + 1'b1;
          if (sweep_idx == (CSW+1)'(NSWEEP - 1)) state <= S_SWEEP_END;
        end
        S_SWEEP_END: begin
          if (!mt_any && !ob_any) alloc_top <= '0;
          cur_ob <= 1'b1; cur_set <= CSW'(OB_SETS - 1);
          state <= S_TRIM;
        end
        S_TRIM: begin
          if (trim_now) begin
            ob_alloc[cur_set[OSW-1:0]] <= 1'b0;
            unlinked <= 1'b1;
          end
          if (cur_set == '0) state <= S_IDLE;
          else cur_set <= cur_set - 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
