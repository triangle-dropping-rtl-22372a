// One table of the Command Buffer: used for both the Main Table and the
// Overflow Buffer.
//
// The table has SETS sets of WAYS slots. A slot holds a command's 64-bit
// signature, its bounding box and the base pointer of its visibility bitmap,
// plus a valid bit and a recently-used bit. Each set also has an overflow
// pointer to a set of the Overflow Buffer (PTR_SETS sets), forming linked
// chains. This organisation follows the technique's description; the default
// 32 sets x 16 ways matches its 16 KiB tables.
//
// A slot also keeps the base and length of the Frame Visibility Buffer
// region it was given, and a held bit that stays set after the slot is
// deleted, so that a later command inserted in the same slot can take over
// the region (this reuse is this design's choice). release_all clears every
// held bit, when the whole visibility buffer is handed out afresh.
//
// Implementation: register file. A whole set is read combinationally
// (rd_set -> rd_*), so the matcher compares all ways of a set in one cycle.
// Writes take effect at the clock edge:
//   wr_en     writes slot (wr_set, wr_way) and sets its valid and recently-used
//             bits (insertion, and a hit that refreshes the bounding box);
//   ovf_we    writes the overflow pointer of set ovf_set;
//   sweep_en  end-of-frame step for set sweep_set: slots not used this frame
//             are invalidated and all recently-used bits cleared.
// any_valid tells whether any slot of the table is occupied.
module cmd_table
  import td_pkg::*;
#(
  parameter int unsigned SETS     = 32,
  parameter int unsigned WAYS     = 16,
  parameter int unsigned PTR_SETS = 32,
  localparam int unsigned SW = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WW = (WAYS > 1) ? $clog2(WAYS) : 1,
  localparam int unsigned PW = (PTR_SETS > 1) ? $clog2(PTR_SETS) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // whole-set read
  input  logic [SW-1:0]        rd_set,
  output slot_t [WAYS-1:0]     rd_slots,
  output logic  [WAYS-1:0]     rd_valid,
  output logic  [WAYS-1:0]     rd_ru,
  output logic  [WAYS-1:0]     rd_held,
  output logic                 rd_ovf_valid,
  output logic  [PW-1:0]       rd_ovf,
  // slot write
  input  logic                 wr_en,
  input  logic [SW-1:0]        wr_set,
  input  logic [WW-1:0]        wr_way,
  input  slot_t                wr_slot,
  // overflow pointer write
  input  logic                 ovf_we,
  input  logic [SW-1:0]        ovf_set,
  input  logic                 ovf_valid,
  input  logic [PW-1:0]        ovf_ptr,
  // end-of-frame sweep
  input  logic                 sweep_en,
  input  logic [SW-1:0]        sweep_set,
  input  logic                 release_all,
  output logic                 any_valid
);

  slot_t            slots [SETS][WAYS];
  logic [WAYS-1:0]  valid [SETS];
  logic [WAYS-1:0]  ru    [SETS];
  logic [WAYS-1:0]  held  [SETS];
  logic             ovf_v [SETS];
  logic [PW-1:0]    ovf   [SETS];

  always_comb begin
    for (int w = 0; w < WAYS; w++) rd_slots[w] = slots[rd_set][w];
    rd_valid     = valid[rd_set];
    rd_ru        = ru[rd_set];
    rd_held      = held[rd_set];
    rd_ovf_valid = ovf_v[rd_set];
    rd_ovf       = ovf[rd_set];
  end

  always_comb begin
    any_valid = 1'b0;
    for (int s = 0; s < SETS; s++) any_valid = any_valid | (|valid[s]);
  end

  // Slot payload: no reset needed, a slot is only read when valid.
  always_ff @(posedge clk) begin
    if (wr_en) slots[wr_set][wr_way] <= wr_slot;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        ru[s]    <= '0;
        held[s]  <= '0;
        ovf_v[s] <= 1'b0;
        ovf[s]   <= '0;
      end
    end else begin
      if (sweep_en) begin
        valid[sweep_set] <= valid[sweep_set] & ru[sweep_set];
        ru[sweep_set]    <= '0;
      end
      if (release_all)
        for (int s = 0; s < SETS; s++) held[s] <= '0;
      if (wr_en) begin
        valid[wr_set][wr_way] <= 1'b1;
        ru[wr_set][wr_way]    <= 1'b1;
        held[wr_set][wr_way]  <= 1'b1;
      end
      if (ovf_we) begin
        ovf_v[ovf_set] <= ovf_valid;
        ovf[ovf_set]   <= ovf_ptr;
      end
    end
  end

endmodule
