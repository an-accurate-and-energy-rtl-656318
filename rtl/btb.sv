// btb: set-associative branch target buffer.
//
// Each entry remembers, for one fetch block, the slot of a taken branch in
// the block, its target, and whether the branch is unconditional. The
// 1024-entry, 4-way size is the evaluated configuration. The entry layout,
// the index (fetch-block address bits above the block offset), the full
// upper-address tag and the replacement (an invalid way first, otherwise a
// per-set round-robin pointer) are choices of this design.
//
// Interface and timing:
//  - lk_pc -> lk_hit, lk_slot, lk_target, lk_uncond: combinational lookup.
//  - upd_valid: at the next clock edge the entry for upd_pc is rewritten if
//    present, otherwise allocated in the victim way of its set.
module btb #(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned WAYS    = 4,
  parameter int unsigned ADDR_W  = 32,
  parameter int unsigned BLK_OFF = 4,
  parameter int unsigned SLOT_W  = 2,
  localparam int unsigned SETS   = ENTRIES / WAYS,
  localparam int unsigned IDX_W  = $clog2(SETS),
  localparam int unsigned TAG_W  = ADDR_W - BLK_OFF - IDX_W,
  localparam int unsigned WAY_W  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // lookup (branch prediction stage)
  input  logic [ADDR_W-1:0] lk_pc,
  output logic              lk_hit,
  output logic [SLOT_W-1:0] lk_slot,
  output logic [ADDR_W-1:0] lk_target,
  output logic              lk_uncond,
  // update (from branch resolution)
  input  logic              upd_valid,
  input  logic [ADDR_W-1:0] upd_pc,
  input  logic [SLOT_W-1:0] upd_slot,
  input  logic [ADDR_W-1:0] upd_target,
  input  logic              upd_uncond
);

  typedef struct packed {
    logic [TAG_W-1:0]  tag;
    logic [SLOT_W-1:0] slot;
    logic [ADDR_W-1:0] target;
    logic              uncond;
  } entry_t;

  entry_t           ent   [SETS][WAYS];
  logic [WAYS-1:0]  valid [SETS];
  logic [WAY_W-1:0] rr    [SETS];

  logic [IDX_W-1:0] lk_idx, up_idx;
  logic [TAG_W-1:0] lk_tag, up_tag;

  assign lk_idx = lk_pc[BLK_OFF +: IDX_W];
  assign lk_tag = lk_pc[ADDR_W-1 -: TAG_W];
  assign up_idx = upd_pc[BLK_OFF +: IDX_W];
  assign up_tag = upd_pc[ADDR_W-1 -: TAG_W];

  always_comb begin
    lk_hit    = 1'b0;
    lk_slot   = '0;
    lk_target = '0;
    lk_uncond = 1'b0;
    for (int w = 0; w < int'(WAYS); w++) begin
      if (valid[lk_idx][w] && ent[lk_idx][w].tag == lk_tag) begin
        lk_hit    = 1'b1;
        lk_slot   = ent[lk_idx][w].slot;
        lk_target = ent[lk_idx][w].target;
        lk_uncond = ent[lk_idx][w].uncond;
      end
    end
  end

  // way written by an update: the matching way, else an invalid one, else rr
  logic             up_hit, up_free;
  logic [WAY_W-1:0] up_way;

  always_comb begin
    up_hit  = 1'b0;
    up_free = 1'b0;
    up_way  = rr[up_idx];
    for (int w = int'(WAYS) - 1; w >= 0; w--) begin
      if (!valid[up_idx][w]) begin
        up_free = 1'b1;
        up_way  = WAY_W'(w);
      end
    end
    for (int w = 0; w < int'(WAYS); w++) begin
      if (valid[up_idx][w] && ent[up_idx][w].tag == up_tag) begin
        up_hit = 1'b1;
        up_way = WAY_W'(w);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SETS); s++) begin
        valid[s] <= '0;
        rr[s]    <= '0;
      end
    end else if (upd_valid) begin
      valid[up_idx][up_way] <= 1'b1;
      if (!up_hit && !up_free) rr[up_idx] <= WAY_W'((int'(rr[up_idx]) + 1) % int'(WAYS));
    end
  end

  always_ff @(posedge clk) begin
    if (upd_valid) ent[up_idx][up_way] <= '{tag: up_tag, slot: upd_slot,
                                            target: upd_target, uncond: upd_uncond};
  end

endmodule
