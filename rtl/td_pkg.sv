// Shared types and constants of the Triangle Dropping units.
//
// Triangle Dropping predicts, from the visibility measured while rendering
// the previous frame, which primitives of a draw command will be fully
// occluded, and removes them right after primitive assembly. The units
// exchange a small set of records, collected here:
//   - cmd_state_t : the static state of a draw command that is hashed into
//                   the 64-bit Command Signature (the list of fields follows
//                   the description of the technique; their widths are this
//                   design's choice).
//   - bbox_t      : screen-space bounding box, 16-bit signed pixel coordinates.
//   - vptr_t      : visibility pointer, an address into the Frame Visibility
//                   Buffer with a valid flag (valid = 0 is the null pointer).
//   - fvb_entry_t : one Frame Visibility Buffer entry: visible bit plus the
//                   intermittent and previous-visibility bits.
//   - slot_t      : the payload of one Command Buffer slot: signature, box,
//                   and the base and length of the slot's bitmap region.
package td_pkg;

  // 32 KiB of one-bit visibility entries.
  localparam int unsigned FVB_ENTRIES_DEF = 262144;
  localparam int unsigned FVB_AW          = 18;
  localparam int unsigned SIG_W           = 64;
  localparam int unsigned COORD_W         = 16;

  typedef logic [SIG_W-1:0] sig_t;
  typedef logic [FVB_AW-1:0] fvb_addr_t;

  typedef struct packed {
    logic [31:0] num_vertices;
    logic [31:0] num_prims;
    logic        z_enable;
    logic        z_write_mask;
    logic [2:0]  z_func;
    logic        blend_enable;
    logic [3:0]  blend_logic_op;
    logic [7:0]  blend_r;
    logic [7:0]  blend_g;
    logic [7:0]  blend_b;
    logic [7:0]  blend_a;
    logic [3:0]  color_mask;
    logic [31:0] vs_entry;
    logic [7:0]  vs_attr_locations;
    logic [31:0] fs_entry;
    logic [7:0]  fs_attr_locations;
    logic [3:0]  prim_type;
  } cmd_state_t;

  typedef struct packed {
    logic signed [COORD_W-1:0] x;
    logic signed [COORD_W-1:0] y;
  } svtx_t;

  typedef struct packed {
    logic signed [COORD_W-1:0] xmin;
    logic signed [COORD_W-1:0] ymin;
    logic signed [COORD_W-1:0] xmax;
    logic signed [COORD_W-1:0] ymax;
  } bbox_t;

  typedef struct packed {
    logic      valid;
    fvb_addr_t addr;
  } vptr_t;

  localparam vptr_t VPTR_NULL = '{valid: 1'b0, addr: '0};

  typedef struct packed {
    logic vis;   // primitive was visible when last rendered
    logic intm;  // primitive is intermittent: never dropped
    logic prev;  // visible bit saved at the start of the last key frame
  } fvb_entry_t;

  typedef struct packed {
    sig_t      sig;
    bbox_t     bbox;
    fvb_addr_t bmp;
    logic [FVB_AW:0] len;  // entries in the bitmap region held by the slot
  } slot_t;

  // Command context handed from the command matcher to the primitive dropper.
  typedef struct packed {
    vptr_t bmp;          // base of the command's visibility bitmap, or null
    logic  is_new;       // command was inserted this frame: no history yet
    logic  gs;           // uses a geometry shader or tessellation: bypass
    logic  transparent;  // blending enabled: bypass
  } cmd_ctx_t;

endpackage
