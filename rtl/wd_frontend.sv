// wd_frontend: instruction fetch front end with way determination by early
// tag matching.
//
// A set-associative instruction cache normally reads every tag way and every
// data way in the same cycle and then keeps one. Here the fetch is split over
// three pipeline stages so that the way is known before the data array is
// touched:
//
//   BP  branch prediction: the gshare PHT and the BTB are read with the fetch
//       block address and give the next fetch address.
//   TL  tag lookup: all tag ways of the set are read and compared. The result
//       is the one way holding the line, or a miss.
//   F   fetch: only the data sub-bank of that way is read. On a miss no data
//       way is read at all; the miss controller refills the line and the
//       lookup is repeated.
//
// Because the tag compare is exact, the chosen way is always right: there is
// no way misprediction and no second access of all ways.
//
// Redirects from the back end (redir_valid, redir_pc, redir_target), raised
// in the cycle the mispredicted branch is resolved:
//  - direction misprediction (redir_target = 0): the correct address (the
//    fall-through, or the BTB target that was passed along with the block)
//    travels with the branch, so it enters BP in the redirect cycle. Its tag
//    lookup then overlaps the branch's address-generation cycle, and its
//    data read comes in the cycle after that, when a pipeline without the TL
//    stage would read its cache too: the TL stage adds no penalty.
//  - target misprediction (redir_target = 1): the address is the result of
//    the address generation and arrives too late in the cycle to be used; it
//    is registered and enters BP one cycle later. This one cycle is the only
//    extra penalty of the scheme.
// The new path then streams at one block per cycle without gaps.
//
// Fetch blocks are aligned 16-byte groups of four instructions; a 32-byte
// line holds two. fetch_mask marks the instructions from the fetch address
// up to and including a predicted-taken branch.
//
// What follows the technique as published: the BP -> TL -> F order, all tag
// ways read in TL, one data way read in F, no data read on a miss, the
// redirect timing above, and the sizes (16 KB 4-way cache with 32-byte lines
// and 4 KB sub-banks, 4K-entry gshare, 1024-entry 4-way BTB, four
// instructions per cycle). Choices of this design: 32-bit instructions and
// addresses, the reset address, the BTB entry format, non-speculative
// branch history, round-robin replacement, one outstanding miss, the
// valid/ready fetch and refill handshakes, and the redirect port timing.
//
// Timing: in steady state one fetch block per cycle; a block predicted in
// cycle c is looked up in c+1 and delivered (fetch_valid) in c+2.
// tag_lookup_en and data_way_en show, per cycle, when all tag ways and which
// data ways are read; they are what the array energy depends on.
module wd_frontend
  import wd_pkg::*;
#(
  parameter int unsigned ICACHE_BYTES = 16384,
  parameter int unsigned WAYS         = 4,
  parameter int unsigned LINE_BYTES   = 32,
  parameter int unsigned PHT_ENTRIES  = 4096,
  parameter int unsigned BTB_ENTRIES  = 1024,
  parameter int unsigned BTB_WAYS     = 4,
  parameter logic [31:0] RESET_PC     = 32'h0000_1000,
  localparam int unsigned SETS        = ICACHE_BYTES / (WAYS * LINE_BYTES),
  localparam int unsigned LINE_OFF    = $clog2(LINE_BYTES),
  localparam int unsigned IDX_W       = $clog2(SETS),
  localparam int unsigned BLK_OFF     = $clog2(FETCH_BYTES),
  localparam int unsigned PART_W      = (LINE_BYTES / FETCH_BYTES > 1) ? $clog2(LINE_BYTES / FETCH_BYTES) : 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  // fetch block to decode
  output logic                                  fetch_valid,
  input  logic                                  fetch_ready,
  output logic [ADDR_W-1:0]                     fetch_pc,
  output logic [FETCH_WIDTH-1:0][INSN_W-1:0]    fetch_insns,
  output logic [FETCH_WIDTH-1:0]                fetch_mask,
  output bp_info_t                              fetch_bp,
  // redirect from branch resolution
  input  logic                                  redir_valid,
  input  logic                                  redir_target,
  input  logic [ADDR_W-1:0]                     redir_pc,
  // predictor training from branch resolution
  input  logic                                  upd_valid,
  input  logic [ADDR_W-1:0]                     upd_pc,
  input  logic                                  upd_cond,
  input  logic                                  upd_taken,
  input  logic [SLOT_W-1:0]                     upd_slot,
  input  logic [ADDR_W-1:0]                     upd_target,
  input  logic [PHT_IDX_W-1:0]                  upd_pht_idx,
  // refill port to the next cache level
  output logic                                  l2_req_valid,
  output logic [ADDR_W-1:0]                     l2_req_addr,
  input  logic                                  l2_req_ready,
  input  logic                                  l2_resp_valid,
  input  logic [LINE_BYTES*8-1:0]               l2_resp_line,
  // array activity
  output logic                                  tag_lookup_en,
  output logic [WAYS-1:0]                       data_way_en
);

  // the PHT index travels in bp_info_t, whose width is fixed in wd_pkg
  if (PHT_ENTRIES != (1 << PHT_IDX_W)) begin : g_pht_size_check
    $error("PHT_ENTRIES must equal 2**wd_pkg::PHT_IDX_W");
  end

  // ---------------------------------------------------------------- state
  logic        bp_valid_q;
  addr_t       bp_pc_q;
  logic        tl_valid_q;
  addr_t       tl_pc_q;
  bp_info_t    tl_info_q;
  logic        f_valid_q;
  addr_t       f_pc_q;
  bp_info_t    f_info_q;
  logic [WAYS-1:0] f_way_q;
  logic        tgt_pend_q;
  addr_t       tgt_pc_q;

  // ------------------------------------------------------------- redirect
  logic  dir_redir, tgt_redir, restart;
  addr_t restart_pc;

  assign dir_redir  = redir_valid && !redir_target;
  assign tgt_redir  = redir_valid &&  redir_target;
  assign restart    = dir_redir || (tgt_pend_q && !redir_valid);
  assign restart_pc = dir_redir ? redir_pc : tgt_pc_q;

  // ---------------------------------------------- branch prediction stage
  addr_t             bp_pc;
  logic              bp_valid;
  logic              pht_taken;
  logic [PHT_IDX_W-1:0] pht_idx;
  logic              btb_hit, btb_uncond;
  logic [SLOT_W-1:0] btb_slot;
  addr_t             btb_target;
  bp_info_t          bp_info;
  addr_t             next_pc;

  assign bp_pc    = restart ? restart_pc : bp_pc_q;
  assign bp_valid = restart || (bp_valid_q && !redir_valid);

  gshare_pht #(.ENTRIES(PHT_ENTRIES), .ADDR_W(ADDR_W), .BLK_OFF(BLK_OFF)) u_pht (
    .clk, .rst_n,
    .pred_pc   (bp_pc),
    .pred_taken(pht_taken),
    .pred_idx  (pht_idx),
    .upd_valid (upd_valid && upd_cond),
    .upd_idx   (upd_pht_idx),
    .upd_taken (upd_taken)
  );

  btb #(.ENTRIES(BTB_ENTRIES), .WAYS(BTB_WAYS), .ADDR_W(ADDR_W),
        .BLK_OFF(BLK_OFF), .SLOT_W(SLOT_W)) u_btb (
    .clk, .rst_n,
    .lk_pc     (bp_pc),
    .lk_hit    (btb_hit),
    .lk_slot   (btb_slot),
    .lk_target (btb_target),
    .lk_uncond (btb_uncond),
    .upd_valid (upd_valid && upd_taken),
    .upd_pc    (upd_pc),
    .upd_slot  (upd_slot),
    .upd_target(upd_target),
    .upd_uncond(!upd_cond)
  );

  always_comb begin
    logic in_block;
    // a BTB branch before the entry slot is not on this path
    in_block           = btb_hit && (btb_slot >= bp_pc[2 +: SLOT_W]);
    bp_info.btb_hit    = in_block;
    bp_info.taken      = in_block && (btb_uncond || pht_taken);
    bp_info.br_slot    = btb_slot;
    bp_info.btb_target = btb_target;
    bp_info.pht_idx    = pht_idx;
    next_pc = bp_info.taken ? btb_target
                            : {bp_pc[ADDR_W-1:BLK_OFF] + 1'b1, BLK_OFF'(0)};
  end

  // ------------------------------------------------------ tag lookup stage
  logic            tl_valid;
  addr_t           tl_pc;
  bp_info_t        tl_info;
  logic            f_valid, f_free;
  logic            lookup_en, tl_hit, tl_adv, miss_start;
  logic [WAYS-1:0] tl_way, victim_way;
  logic            refill_busy;
  logic            fill_valid;
  addr_t           fill_addr;
  logic [WAYS-1:0] fill_way;
  logic [LINE_BYTES*8-1:0] fill_line;

  assign tl_valid   = tl_valid_q && !redir_valid;
  assign tl_pc      = tl_pc_q;
  assign tl_info    = tl_info_q;
  assign f_valid    = f_valid_q && !redir_valid;
  assign f_free     = !f_valid || fetch_ready;
  assign lookup_en  = tl_valid && !refill_busy && f_free;
  assign tl_adv     = lookup_en && tl_hit;
  assign miss_start = lookup_en && !tl_hit;

  itag_array #(.SETS(SETS), .WAYS(WAYS), .ADDR_W(ADDR_W), .LINE_OFF(LINE_OFF)) u_tag (
    .clk, .rst_n,
    .lk_addr   (tl_pc),
    .lk_hit    (tl_hit),
    .lk_way    (tl_way),
    .victim_way(victim_way),
    .fill_valid(fill_valid),
    .fill_addr (fill_addr),
    .fill_way  (fill_way)
  );

  icache_refill #(.ADDR_W(ADDR_W), .WAYS(WAYS), .LINE_BYTES(LINE_BYTES)) u_refill (
    .clk, .rst_n,
    .miss_valid   (miss_start),
    .miss_addr    (tl_pc),
    .miss_way     (victim_way),
    .busy         (refill_busy),
    .l2_req_valid (l2_req_valid),
    .l2_req_addr  (l2_req_addr),
    .l2_req_ready (l2_req_ready),
    .l2_resp_valid(l2_resp_valid),
    .l2_resp_line (l2_resp_line),
    .fill_valid   (fill_valid),
    .fill_addr    (fill_addr),
    .fill_way     (fill_way),
    .fill_line    (fill_line)
  );

  // ------------------------------------------------------------ fetch stage
  logic [FETCH_BYTES*8-1:0] bank_data [WAYS];

  assign data_way_en   = tl_adv ? tl_way : '0;
  assign tag_lookup_en = lookup_en;

  for (genvar w = 0; w < int'(WAYS); w++) begin : g_way
    idata_bank #(.SETS(SETS), .LINE_BYTES(LINE_BYTES), .FETCH_BYTES(FETCH_BYTES)) u_bank (
      .clk,
      .rd_en   (data_way_en[w]),
      .rd_index(tl_pc[LINE_OFF +: IDX_W]),
      .rd_half (tl_pc[BLK_OFF +: PART_W]),
      .rd_data (bank_data[w]),
      .wr_en   (fill_valid && fill_way[w]),
      .wr_index(fill_addr[LINE_OFF +: IDX_W]),
      .wr_line (fill_line)
    );
  end

  always_comb begin
    logic [FETCH_BYTES*8-1:0] blk;
    blk = '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (f_way_q[w]) blk = blk | bank_data[w];
    for (int s = 0; s < int'(FETCH_WIDTH); s++) begin
      fetch_insns[s] = blk[s*INSN_W +: INSN_W];
      fetch_mask[s]  = (SLOT_W'(s) >= f_pc_q[2 +: SLOT_W]) &&
                       (!f_info_q.taken || SLOT_W'(s) <= f_info_q.br_slot);
    end
  end

  assign fetch_valid = f_valid;
  assign fetch_pc    = f_pc_q;
  assign fetch_bp    = f_info_q;

  // -------------------------------------------------------- pipeline update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bp_valid_q <= 1'b1;
      bp_pc_q    <= RESET_PC;
      tl_valid_q <= 1'b0;
      tl_pc_q    <= '0;
      tl_info_q  <= '0;
      f_valid_q  <= 1'b0;
      f_pc_q     <= '0;
      f_info_q   <= '0;
      f_way_q    <= '0;
      tgt_pend_q <= 1'b0;
      tgt_pc_q   <= '0;
    end else if (tgt_redir) begin
      // target known only after address generation: restart next cycle
      tgt_pend_q <= 1'b1;
      tgt_pc_q   <= redir_pc;
      bp_valid_q <= 1'b0;
      tl_valid_q <= 1'b0;
      f_valid_q  <= 1'b0;
    end else begin
      tgt_pend_q <= 1'b0;
      // fetch stage
      if (tl_adv) begin
        f_valid_q <= 1'b1;
        f_pc_q    <= tl_pc;
        f_info_q  <= tl_info;
        f_way_q   <= tl_way;
      end else if (f_free) begin
        f_valid_q <= 1'b0;
      end
      // tag lookup and branch prediction stages
      // (a restart always finds the tag lookup stage empty or flushed)
      if (restart) bp_valid_q <= 1'b1;
      if (!tl_valid || tl_adv) begin
        tl_valid_q <= bp_valid;
        tl_pc_q    <= bp_pc;
        tl_info_q  <= bp_info;
        if (bp_valid) bp_pc_q <= next_pc;
      end
    end
  end

  // ------------------------------------------------------------ assertions
  // at most one data way is ever read, and never on a tag miss
  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(data_way_en));
  assert property (@(posedge clk) disable iff (!rst_n) (|data_way_en) |-> (lookup_en && tl_hit));

endmodule
