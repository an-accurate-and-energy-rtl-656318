// tb_wd_frontend: end-to-end test of the way-determination fetch front end
// at its default sizes (16 KB 4-way I-cache, 4K gshare, 1024-entry BTB).
//
// The testbench plays the back end. It holds a synthetic program: six copies
// of the same code region, 16 KB apart so that they all fall into the same
// cache sets (six lines per set against four ways). Each region has a
// counted loop, a jump whose target alternates between two nearby blocks, a
// jump into the middle of a fetch block, an alternating conditional branch
// and a jump-table branch whose target alternates between the next region
// and the one after it. The testbench follows the true path,
// checks every delivered fetch block (address, instruction words, slot
// mask), resolves each branch, trains the predictors and, some cycles after
// a wrong prediction, redirects fetch with the right address, flagged as a
// direction or a target misprediction.
//
// Timing checks: after a direction redirect the first block must arrive two
// cycles later (BP, TL, then F), after a target redirect three cycles later
// (when no refill is in progress), and the block after it in the next cycle
// when decode is ready. Every tag lookup must either read exactly one data way or
// start a refill, never both and never read more than one way.
// Each mechanism (hit, miss, conflict eviction, direction and target
// redirect, back-pressure, predicted-taken branch, mid-block entry) must
// occur. The array energy is summed with per-access energies of 28.10 pJ
// (4-way tag read), 14.51 pJ (1-way data read) and 35.55 pJ (4-way data
// read) and compared with a cache that reads all ways on every access.
module tb_wd_frontend;
  import wd_pkg::*;

  localparam int unsigned N_BLOCKS  = 4000;   // correct-path blocks to check
  localparam int unsigned RES_DELAY = 3;      // cycles from fetch to redirect
  localparam int unsigned WATCHDOG  = 200000;
  localparam logic [31:0] SALT      = 32'h5A3C_0000;
  localparam logic [31:0] BASE      = 32'h0000_1000;
  localparam int unsigned NREG      = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                             fetch_valid, fetch_ready;
  logic [31:0]                      fetch_pc;
  logic [FETCH_WIDTH-1:0][31:0]     fetch_insns;
  logic [FETCH_WIDTH-1:0]           fetch_mask;
  bp_info_t                         fetch_bp;
  logic                             redir_valid, redir_target;
  logic [31:0]                      redir_pc;
  logic                             upd_valid, upd_cond, upd_taken;
  logic [31:0]                      upd_pc, upd_target;
  logic [SLOT_W-1:0]                upd_slot;
  logic [PHT_IDX_W-1:0]             upd_pht_idx;
  logic                             l2_req_valid, l2_req_ready, l2_resp_valid, l2_busy;
  logic [31:0]                      l2_req_addr;
  logic [255:0]                     l2_resp_line;
  logic                             tag_lookup_en;
  logic [3:0]                       data_way_en;
  int unsigned                      n_l2_req;

  wd_frontend dut (
    .clk, .rst_n,
    .fetch_valid, .fetch_ready, .fetch_pc, .fetch_insns, .fetch_mask, .fetch_bp,
    .redir_valid, .redir_target, .redir_pc,
    .upd_valid, .upd_pc, .upd_cond, .upd_taken, .upd_slot, .upd_target, .upd_pht_idx,
    .l2_req_valid, .l2_req_addr, .l2_req_ready, .l2_resp_valid, .l2_resp_line,
    .tag_lookup_en, .data_way_en
  );

  l2_model #(.LATENCY(12), .LINE_BYTES(32), .SALT(SALT)) u_l2 (
    .clk, .rst_n,
    .req_valid(l2_req_valid), .req_addr(l2_req_addr), .req_ready(l2_req_ready),
    .resp_valid(l2_resp_valid), .resp_line(l2_resp_line), .busy(l2_busy), .n_req(n_l2_req)
  );

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ------------------------------------------------------------ program
  function automatic logic [31:0] word_at(input logic [31:0] a);
    return {a[31:2], 2'b11} ^ SALT;
  endfunction
  function automatic logic [31:0] region_base(input int r);
    return BASE + 32'(r) * 32'h4000;
  endfunction

  // program state, advanced only on the correct path
  int loop_cnt = 0;
  bit alt_flip = 0;
  bit jt2_flip = 0;
  int jt_visit = 0;

  // resolve the block starting at pc: branch present, slot, cond, taken, target
  task automatic resolve(input logic [31:0] pc, output bit has, output int slot,
                         output bit cond, output bit taken, output logic [31:0] target);
    logic [31:0] rel, blk;
    int          r;
    has = 0; slot = 0; cond = 0; taken = 0; target = '0;
    blk = {pc[31:4], 4'h0};
    if (blk < BASE) return;
    r   = int'((blk - BASE) >> 14);
    rel = (blk - BASE) & 32'h3FFF;
    if (r >= int'(NREG)) return;
    case (rel)
      32'h030: begin has = 1; slot = 3; cond = 1; target = region_base(r) + 32'h010;
                     taken = (loop_cnt < 5); loop_cnt = taken ? loop_cnt + 1 : 0; end
      32'h040: begin has = 1; slot = 1; cond = 0; taken = 1;
                     target = region_base(r) + (jt2_flip ? 32'h060 : 32'h050); jt2_flip = !jt2_flip; end
      32'h070: begin has = 1; slot = 1; cond = 0; taken = 1; target = region_base(r) + 32'h108; end
      32'h110: begin has = 1; slot = 2; cond = 1; target = region_base(r) + 32'h140;
                     taken = alt_flip; alt_flip = !alt_flip; end
      32'h150: begin has = 1; slot = 0; cond = 0; taken = 1;
                     target = region_base((r + ((jt_visit % 3 == 0) ? 2 : 1)) % int'(NREG)); jt_visit++; end
      default: ;
    endcase
    if (has && slot < int'(pc[3:2])) begin has = 0; taken = 0; end
  endtask

  // ----------------------------------------------------- back-end model
  logic [31:0] exp_pc;
  bit          squash;
  int          redir_wait;
  bit          redir_kind_q;
  logic [31:0] redir_pc_q;
  longint      cycle = 0;
  longint      redir_cycle = -1;
  bit          redir_kind_last;
  bit          redir_clean;      // no refill in flight since the redirect
  int unsigned n_good = 0;

  // mechanism counters
  int unsigned n_hit = 0, n_miss = 0, n_dir = 0, n_tgt = 0, n_bp_stall = 0;
  int unsigned n_pred_taken_ok = 0, n_mid_entry = 0, n_evict = 0;
  int unsigned n_dir_lat = 0, n_tgt_lat = 0, n_lookups = 0, n_data = 0;
  int unsigned n_fetched = 0, n_follow = 0;
  bit          seen_line [logic [31:0]];

  always @(posedge clk) if (rst_n) cycle <= cycle + 1;

  // activity and energy bookkeeping
  always @(posedge clk) if (rst_n) begin
    check($countones(data_way_en) <= 1, "more than one data way read");
    if (tag_lookup_en) n_lookups++;
    if (|data_way_en) begin
      n_data++;
      check(tag_lookup_en, "data way read without a tag lookup");
    end
    if (l2_req_valid && l2_req_ready) begin
      n_miss++;
      if (seen_line.exists(l2_req_addr)) n_evict++;
      seen_line[l2_req_addr] = 1;
    end
    if (tag_lookup_en && !(|data_way_en)) n_hit += 0;
    if (fetch_valid && !fetch_ready) n_bp_stall++;
    if (l2_busy) redir_clean = 0;
  end

  // back-pressure: random in some stretches
  always @(posedge clk) begin
    if ((cycle % 2000) < 700) fetch_ready <= ($urandom_range(0, 3) != 0);
    else                      fetch_ready <= 1'b1;
  end

  always @(posedge clk) begin
    bit          has, cond, taken;
    int          slot;
    logic [31:0] target, act_next, pred_next;
    logic [FETCH_WIDTH-1:0] exp_mask;

    bit          issued;
    issued = 0;
    upd_valid   <= 1'b0;
    redir_valid <= 1'b0;
    if (rst_n) begin
      if (squash) begin
        // wrong-path blocks are dropped until the redirect goes out
        redir_wait--;
        if (redir_wait == 0) begin
          redir_valid     <= 1'b1;
          redir_target    <= redir_kind_q;
          redir_pc        <= redir_pc_q;
          redir_cycle     = cycle + 1;       // cycle in which redir_valid is seen
          redir_kind_last = redir_kind_q;
          redir_clean     = !l2_busy;
          squash          = 0;
          issued          = 1;
        end
      end else if (fetch_valid) begin
        // redirect latency: first block offered after the redirect
        if (redir_cycle >= 0) begin
          if (redir_clean) begin
            // no gap behind it: the next block is already in tag lookup
            if (fetch_ready) begin
              check(tag_lookup_en, "block after the redirected one not in tag lookup");
              n_follow++;
            end
            if (!redir_kind_last) begin
              check(cycle == redir_cycle + 2, "direction redirect: first block not two cycles later");
              n_dir_lat++;
            end else begin
              check(cycle == redir_cycle + 3, "target redirect: first block not three cycles later");
              n_tgt_lat++;
            end
          end
          redir_cycle = -1;
        end
      end
      if (!squash && redir_wait == 0 && fetch_valid && fetch_ready && !issued) begin
        n_fetched++;
        check(fetch_pc == exp_pc, $sformatf("fetch pc %h, expected %h", fetch_pc, exp_pc));
        if (fetch_pc[3:2] != 0) n_mid_entry++;
        for (int s = 0; s < int'(FETCH_WIDTH); s++)
          exp_mask[s] = (s >= int'(fetch_pc[3:2])) && (!fetch_bp.taken || s <= int'(fetch_bp.br_slot));
        check(fetch_mask == exp_mask, "slot mask");
        for (int s = 0; s < int'(FETCH_WIDTH); s++)
          if (exp_mask[s])
            check(fetch_insns[s] == word_at({fetch_pc[31:4], 4'h0} + 32'(4 * s)),
                  $sformatf("instruction word, pc %h slot %0d", fetch_pc, s));
        // resolve and compare with the prediction
        resolve(fetch_pc, has, slot, cond, taken, target);
        act_next  = taken ? target : {fetch_pc[31:4] + 28'd1, 4'h0};
        pred_next = fetch_bp.taken ? fetch_bp.btb_target : {fetch_pc[31:4] + 28'd1, 4'h0};
        if (has) begin
          upd_valid   <= 1'b1;
          upd_pc      <= {fetch_pc[31:4], 4'h0};
          upd_cond    <= cond;
          upd_taken   <= taken;
          upd_slot    <= SLOT_W'(slot);
          upd_target  <= target;
          upd_pht_idx <= fetch_bp.pht_idx;
        end
        if (fetch_bp.taken && act_next == pred_next) n_pred_taken_ok++;
        if (act_next != pred_next) begin
          squash       = 1;
          redir_wait   = RES_DELAY;
          redir_pc_q   = act_next;
          redir_kind_q = taken && !(fetch_bp.btb_hit && fetch_bp.btb_target == target);
          if (redir_kind_q) n_tgt++; else n_dir++;
        end
        exp_pc = act_next;
        n_good++;
      end
    end
  end

  initial begin
    fetch_ready  = 1'b1;
    redir_valid  = 1'b0;
    redir_target = 1'b0;
    redir_pc     = '0;
    upd_valid    = 1'b0;
    upd_pc       = '0;
    upd_cond     = 1'b0;
    upd_taken    = 1'b0;
    upd_slot     = '0;
    upd_target   = '0;
    upd_pht_idx  = '0;
    exp_pc       = BASE;
    squash       = 0;
    redir_wait   = 0;
    redir_clean  = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (n_good >= N_BLOCKS);
    @(posedge clk);
    begin
      real e_prop, e_conv;
      // tag lookups that read no data way must each have started a refill
      check(n_lookups - n_data == n_miss, "lookups without a data read differ from refills");
      n_hit = n_data;
      e_prop = real'(n_lookups) * 28.10 + real'(n_data) * 14.51;
      e_conv = real'(n_lookups) * (28.10 + 35.55);
      $display("blocks=%0d lookups=%0d data_reads=%0d refills=%0d evictions=%0d",
               n_good, n_lookups, n_data, n_miss, n_evict);
      $display("redirects: direction=%0d (timed %0d) target=%0d (timed %0d); predicted-taken ok=%0d mid-block=%0d stalls=%0d",
               n_dir, n_dir_lat, n_tgt, n_tgt_lat, n_pred_taken_ok, n_mid_entry, n_bp_stall);
      $display("array energy: %0.1f pJ against %0.1f pJ reading all ways (ratio %0.3f)",
               e_prop, e_conv, e_prop / e_conv);
    end
    check(n_hit > 0,           "no cache hit");
    check(n_miss > 0,          "no cache miss");
    check(n_evict > 0,         "no conflict eviction");
    check(n_dir_lat > 0,       "no timed direction redirect");
    check(n_tgt_lat > 0,       "no timed target redirect");
    check(n_bp_stall > 0,      "no back-pressure stall");
    check(n_pred_taken_ok > 0, "no correctly predicted taken branch");
    check(n_mid_entry > 0,     "no mid-block entry");
    check(n_follow > 0,        "no gap-free restart observed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
