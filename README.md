# Triangle Dropping: removing occluded triangles before they reach the tiling engine

A tile-based mobile GPU runs every triangle inside the view frustum through the
geometry pipeline. It then writes each triangle into the Parameter Buffer in DRAM, bins it
into tiles and reads it back for rasterization. Only then does the depth test find
that many of those triangles are completely hidden. The
Triangle Dropping technique (Corbalán-Navarro, Aragón, Anglada, Parcerisa and
González, ACM TACO 2022) removes such triangles much earlier. It uses *frame-to-frame coherence*:
a triangle that was completely occluded in the previous frame is very likely
still occluded in this one, so it is dropped right after primitive assembly.
It is then never clipped, binned, written to DRAM or read back.

This repository is a synthesizable SystemVerilog implementation of the units
that the technique adds to a tile-based deferred-rendering (TBDR) GPU. The
baseline GPU stages around them are not included: command processor, vertex
processors, primitive assembly, clipping and culling, tiling engine,
rasterizer and depth test. They connect through the ports of the top module
`td_top`.

## The three problems the hardware solves

1. **Which object is this?** The GPU receives no object identifiers. To reuse
   last frame's visibility, each draw command must be recognised again in the
   next frame. This is done by hardware from the command's static state and
   its screen position (the *Command Matcher*).
2. **Which of its triangles were hidden?** Each recognised command owns a
   *visibility bitmap* in an on-chip *Frame Visibility Buffer*, with one entry per
   primitive. The entry is indexed by the primitive's position in the command's
   primitive stream. The bitmap is written back from the depth-test results of the
   raster phase (*Tile Visibility Buffer* and *Visibility Updater*). It is
   read by the *Primitive Dropper*.
3. **How do we avoid being wrong forever?** A dropped triangle is never drawn, so
   nothing can show that it has become visible again. Periodic *key frames* turn
   dropping off and measure every triangle afresh. Triangles whose visibility
   flickers are marked *intermittent* and never dropped again. The key-frame
   spacing adapts to how much the scene changes.

## Data flow through one frame

```
 command processor ─ cmd_* ─▶ cmd_signature (CRC-64 of static state) ─┐
 vertex processors ─ vq_*  ─▶ bbox_unit (box of first 18 quad-vertices)┤
                                                                      ▼
                        command_matcher ◀──▶ cmd_table ×2 (Main Table, Overflow Buffer)
                                │ bitmap pointer
                                ▼
 primitive assembly ─ prim_* ─▶ primitive_dropper ─ out_* (+visibility pointer) ─▶ clipping/culling
                                │  ▲                                                   │
                                ▼  │                                       cull_* (culled)
                          frame_vis_buffer ◀── visibility_updater ◀────────────────────┘
                                                   ▲
 early depth test ─ quad_* ─▶ tile_vis_buffer ─────┘
 frame_start ─▶ refresh_ctrl ─ key_frame ─▶ dropper, updater
```

**Geometry phase.** `td_top` accepts one command at a time (`cmd_valid/cmd_ready`).
When a command is accepted:

* the signature register computes a 64-bit CRC of the command's state in one cycle;
* the bounding-box register folds the screen positions of the first 18
  quad-vertices (beats of four vertices) into a partial box. Waiting for all
  vertices would stall the pipeline, and a partial box is enough to tell
  objects apart;
* the matcher looks the pair up. It returns the command's bitmap pointer, or a
  null pointer if the command cannot be tracked;
* the dropper filters the command's primitives (`prim_*`) at one per cycle. Each
  surviving primitive leaves with its *visibility pointer* (bitmap pointer +
  primitive id) in `out_vptr`. The pointer travels with the primitive through
  the Parameter Buffer and the rasterizer as one more attribute.

When the dropper has passed the command's last primitive, the next command is
accepted. After the frame's last command, `frame_end` starts the matcher's
clean-up sweep.

**Raster phase.** The depth test works tile by tile. For each tile:

1. wait for `tile_ready`, then pulse `tile_start`. This clears the Tile
   Visibility Buffer to null pointers;
2. send every depth-tested quad-fragment (`quad_*`), with a mask of the pixels
   that passed the depth test. Each passing pixel of an opaque fragment stores
   the fragment's pointer. Transparent fragments never write, because they cannot
   hide anything;
3. pulse `tile_end`. The Visibility Updater then scans the 256 pixels two per
   cycle, queues the non-null pointers (at most 8 in flight) and sets the
   *visible* bit of each one in the Frame Visibility Buffer. A full tile takes
   about 128 cycles. The scan runs alongside fragment shading of the same tile.
   The next tile's `tile_start` waits for it to finish.

Primitives removed by back-face culling or clipping are reported on `cull_*`.
They are marked visible, so the dropper leaves them alone and the ordinary
culling stage keeps discarding them.

## The visibility entry and its life cycle

This is the subtle part of the design. Each Frame Visibility Buffer entry has three bits:

| bit    | meaning |
|--------|---------|
| `vis`  | the primitive was visible when it was last rendered |
| `intm` | intermittent: its visibility has gone from hidden to visible; never drop it |
| `prev` | `vis` as it stood when the last key frame began |

The dropper decides as follows for each primitive of a command with a bitmap:

| situation                                 | action on the primitive | write to its entry |
|-------------------------------------------|-------------------------|--------------------|
| command inserted this frame (no history)  | pass                    | `vis=0 intm=0 prev=1` |
| key frame                                 | pass                    | `prev=vis`, `vis=0`, `intm` kept |
| transparent command                       | pass                    | — |
| `intm = 1`                                | pass                    | — |
| `vis = 1`                                 | pass                    | — |
| `vis = 0`, not intermittent               | **drop**                | — |

Commands with a null pointer, and commands flagged as using a geometry shader or
tessellation (`cmd_gs`), are passed without any lookup. Their primitive order is
not stable from frame to frame.

The updater does the following for each visible (or culled) primitive:
`vis = 1`, and in a key frame `intm |= ~prev`. A key frame clears `vis` before
the frame is rendered, so after it `vis` holds exactly this frame's
visibility. `prev` holds the visibility from before the key frame. A primitive that
was hidden before and is visible now is therefore flagged intermittent. New bitmaps
start with `prev = 1`. Without that, the first key frame after an insertion
would flag every visible primitive of the new command.

The update never changes the bits it reads. So a primitive that covers many pixels
(and is queued many times) needs no hazard logic: every write of its entry
carries the same value.

## Recognising commands across frames

`command_matcher` + two `cmd_table` instances form the Command Buffer.

* **Main Table**: 32 sets × 16 slots. The set is chosen by XOR-folding the 64-bit
  signature down to 5 bits. A slot holds signature, bounding box, bitmap pointer, a
  valid bit and a *recently-used* bit. It also holds the length of its bitmap
  region and a *held* bit, which outlive the slot's deletion (see Miss below).
  Each set also holds an overflow pointer.
* **Overflow Buffer**: the same shape. Its sets are linked behind a Main Table
  set when that set is full, and can be chained further.
* **Match rule**: equal signature, each of the four box coordinates within
  `DELTA` pixels (default 16, one tile), and recently-used bit clear. On a hit the
  stored box is replaced by the new one (objects drift), the recently-used bit is
  set, and the bitmap pointer is returned. Because the bit is set, two identical
  draws in one frame cannot share one history.
* **Miss**: the whole chain is searched, one set per cycle. The command needs a
  slot and a bitmap of `num_prims` entries. A deleted slot keeps the bitmap
  region its command had. If a free slot on the chain holds a region that is
  large enough, the new command takes that slot and reuses the region.
  Otherwise it gets a fresh region and the first free slot seen. If there is no
  free slot, it goes into slot 0 of a free Overflow Buffer set, which is linked
  behind the last set visited. If no slot or no bitmap space is left, the null
  pointer is returned and the command simply runs without prediction.
* **End of frame**: one set of each table per cycle. Slots whose recently-used
  bit is clear (the object has left the scene) are deleted, and all
  recently-used bits are cleared. Then the Overflow Buffer sets are visited
  from the highest index down, one per cycle. A set that is now empty and ends
  its chain is unlinked from the set pointing to it and becomes free for any
  chain. Each overflow set records its predecessor when it is chained, to make
  that possible.

Latency: 2 cycles from request to response for a Main Table hit, plus one cycle
per overflow set followed, plus one cycle for an insertion. The end-of-frame
work takes 65 cycles: 32 for the sweep, one to check whether the buffer is
empty, and 32 for the overflow-set trim.

## Key frames and the dynamic refreshing interval

`refresh_ctrl` makes the first frame after reset a key frame. After that, a key
frame comes every `interval` frames. `interval` starts at 2. At each key frame
it grows by one, up to 5, if no command was inserted since the previous key
frame. Otherwise it falls back to 2. A changing scene is re-measured every other
frame; a stable scene every fifth frame.

## Modules

| module | role | timing |
|--------|------|--------|
| `td_pkg` | shared types: `cmd_state_t`, `bbox_t`, `vptr_t`, `fvb_entry_t`, `slot_t`, `cmd_ctx_t` | — |
| `cmd_signature` | CRC-64/ECMA-182 (poly `0x42F0E1EBA9EA3693`, init 0, MSB first) over `cmd_state_t` | result 1 cycle after `start` |
| `bbox_unit` | min/max over the valid lanes of the first `MAX_QV` beats | `done` 1 cycle after beat 18 or the last beat |
| `cmd_table` | register-file set storage, whole-set combinational read | writes at the clock edge |
| `command_matcher` | lookup, insertion, chaining, bitmap allocation, sweep | see above |
| `frame_vis_buffer` | 3-bit entries; dropper port + two updater lanes; synchronous read, data held | read latency 1 |
| `primitive_dropper` | drop/pass decision and bookkeeping writes | 1 primitive/cycle |
| `tile_vis_buffer` | 64 quads × 4 per-pixel pointers; clear, quad write, 2 read ports | write 1 quad/cycle |
| `visibility_updater` | tile scan, 8-entry pointer queue, 2-lane read-modify-write | 2 pointers/cycle |
| `refresh_ctrl` | key-frame schedule | `key_frame` valid the cycle after `frame_start` |
| `td_top` | wiring and the one-command-at-a-time sequencer | — |

Every module begins with a comment giving its interface and timing in detail.

## Parameters (defaults)

| parameter | default | origin |
|-----------|---------|--------|
| `MT_SETS`, `OB_SETS`, `WAYS` | 32, 32, 16 | the technique's 16 KiB + 16 KiB tables |
| `FVB_ENTRIES` | 262144 | the technique's 32 KiB of visibility bits (sized for 190,449 primitives in the busiest frame measured) |
| `MAX_QV` | 18 | the technique's partial bounding box |
| `TILE_W`, `TILE_H` | 16, 16 | the technique's tile size |
| `DELTA` | 16 | own choice (the technique does not give the margin) |
| `PAYLOAD_W` | 32 | own choice: width of the primitive data carried through the dropper |
| `MIN_INTERVAL`, `MAX_INTERVAL` | 2, 5 | the technique |

The published configuration targets 2160×1080 screens (9,180 tiles of 16×16). It
counts at most 312 draw commands and 190,449 primitives in a frame. At the default
sizes the 1024 command slots and 262,144 bitmap entries hold such a frame.

## Choices made here, and departures

* **Entry size.** The technique budgets 32 KiB for one visibility bit per
  primitive and also asks for two more bits per entry. Here all three bits are
  kept for 262,144 entries, which is 96 KiB of storage.
* **Tile Visibility Buffer.** It is described as having one pointer per
  quad-fragment and as having the Z-Buffer's dimensions. A pointer per pixel,
  grouped by quad, meets both descriptions. It never loses a primitive that wins
  only part of a quad.
* **When visibility is written.** Visible bits are written after every tile, in
  every frame. In ordinary frames this only re-confirms primitives that were
  drawn. It also gives new commands their first bitmap. The intermittent rule is
  applied only in key frames.
* **Bitmap allocation.** The technique does not say how bitmap space is
  reclaimed. Fresh regions come from a bump pointer. A deleted command's region
  is reused only through its slot, by a command with no more primitives. The
  pointer is rewound, releasing every region, only when the end-of-frame sweep
  leaves the Command Buffer empty. With heavy command turnover, space can still
  run out. New commands then get a null pointer and are not dropped: they lose
  efficiency, never correctness.
* **Overflow sets** are freed only when they are empty and last in their
  chain. An empty set in the middle of a chain stays linked until the sets
  behind it are freed. The technique says only that a free set is chained.
* **One command in flight** between the signature register and the dropper, with
  **serialized frames** (the raster phase of a frame ends before the next
  frame's geometry starts). The technique does not describe overlapping them.
* Geometry-shader commands skip the Command Buffer entirely.
* The CRC polynomial, the XOR hash, `DELTA`, all port formats and handshakes, and
  the 16-bit signed integer screen coordinates are this design's own.
* The Command Buffer is built from flip-flops with combinational whole-set reads.
  A production version would use SRAM macros and pipeline the set read.

## Simulating

Each testbench in `tb/` checks its outputs against values it computes itself.
Each prints `TB_RESULT checks=N failures=M` and ends with a watchdog. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/td_pkg.sv tb/tb_td_top.sv \
          --top-module tb_td_top -y rtl -y tb
./obj_dir/Vtb_td_top
```

Replace `tb_td_top` with any other testbench name. Variables that are never
initialised may start at random values (`+verilator+rand+reset+2`); the design
resets or initialises everything it reads.

| testbench | what it establishes |
|-----------|---------------------|
| `tb_td_top` | the whole design at default sizes, 20 commands × 24 frames. Each primitive's fate is checked against a behavioural model of the predictor. Hits, insertions, overflow insertion and chaining, region reuse, set unlinking, drops, bypasses, intermittent marking and keeping, key frames, interval growth to 5 and reset to 2, deletion, culled reports and tile waits each occur and are counted. Runs in about 10 s. |
| `tb_td_workload` | capacity at the largest frame the evaluation reports: 312 commands carrying 190,449 primitives in total, 4 frames at default sizes. Every command finds a slot and a bitmap, every command except the geometry-shader one (which bypasses the matcher) is matched again in each later frame, and each primitive's fate matches the model. Runs in about 11 s. |
| `tb_command_matcher` | a 4+4 set, 2-way buffer against a behavioural model, including latency, region reuse, set unlinking, end-of-frame cycle count, full buffer and bitmap exhaustion |
| `tb_primitive_dropper` | every command kind, bookkeeping writes, 1 primitive/cycle |
| `tb_visibility_updater` | tile scans plus culled reports, intermittent marking, ≤136 cycles per tile |
| `tb_cmd_signature` | CRC against long division, whose own check value is verified |
| `tb_bbox_unit`, `tb_cmd_table`, `tb_frame_vis_buffer`, `tb_tile_vis_buffer`, `tb_refresh_ctrl` | unit behaviour against reference models |

The tests have not run real game traces. They also do not measure the
technique's reported energy or speed-up: those come from a full-GPU simulator
and a power model that are outside this RTL.
