// wd_pkg: types shared by the way-determination fetch front end.
//
// The front end fetches aligned 16-byte fetch blocks (four 32-bit
// instructions) from a 16 KB, 4-way instruction cache with 32-byte lines.
// The instruction width and the 32-bit address are choices of this design;
// the cache geometry and the fetch width of four instructions per cycle
// follow the processor configuration the technique was evaluated with.
package wd_pkg;

  localparam int unsigned ADDR_W      = 32;
  localparam int unsigned INSN_W      = 32;
  localparam int unsigned FETCH_WIDTH = 4;                 // instructions per cycle
  localparam int unsigned FETCH_BYTES = FETCH_WIDTH * INSN_W / 8;
  localparam int unsigned SLOT_W      = $clog2(FETCH_WIDTH);
  localparam int unsigned PHT_IDX_W   = 12;                // log2 of the 4K-entry PHT

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [INSN_W-1:0] insn_t;

  // Prediction made for one fetch block in the branch prediction stage.
  typedef struct packed {
    logic              btb_hit;     // BTB holds a branch in this block
    logic              taken;       // block predicted to end in a taken branch
    logic [SLOT_W-1:0] br_slot;     // slot of that branch within the block
    addr_t             btb_target;  // target held by the BTB (valid if btb_hit)
    logic [PHT_IDX_W-1:0] pht_idx;  // PHT entry used, returned on update
  } bp_info_t;

endpackage
