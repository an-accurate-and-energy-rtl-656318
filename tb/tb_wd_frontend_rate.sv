// tb_wd_frontend_rate: fetch rate and array activity of the front end on a
// loop that fits in the instruction cache, at the default sizes.
//
// The program is a 256-byte loop (sixteen fetch blocks, eight lines) closed
// by an unconditional jump in the last slot of its last block. After the
// cold misses and the first (target) misprediction of the jump, the BTB
// predicts the jump and every lookup hits. The testbench then checks, over
// a window of MEASURE cycles with decode always ready, that a block is
// delivered in every cycle (four instructions per cycle), that the blocks
// follow the loop in order with the right instruction words, that each
// cycle reads the four tag ways once and exactly one data way, and that no
// refill or redirect happens. The array energy of the window is compared
// with reading all data ways: 28.10 + 14.51 pJ against 28.10 + 35.55 pJ
// per block.
module tb_wd_frontend_rate;
  import wd_pkg::*;

  localparam logic [31:0] SALT    = 32'h5A3C_0000;
  localparam logic [31:0] BASE    = 32'h0000_1000;
  localparam int unsigned WARMUP  = 400;
  localparam int unsigned MEASURE = 2000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                         fetch_valid, fetch_ready;
  logic [31:0]                  fetch_pc;
  logic [FETCH_WIDTH-1:0][31:0] fetch_insns;
  logic [FETCH_WIDTH-1:0]       fetch_mask;
  bp_info_t                     fetch_bp;
  logic                         redir_valid, redir_target;
  logic [31:0]                  redir_pc;
  logic                         upd_valid, upd_cond, upd_taken;
  logic [31:0]                  upd_pc, upd_target;
  logic [SLOT_W-1:0]            upd_slot;
  logic [PHT_IDX_W-1:0]         upd_pht_idx;
  logic                         l2_req_valid, l2_req_ready, l2_resp_valid, l2_busy;
  logic [31:0]                  l2_req_addr;
  logic [255:0]                 l2_resp_line;
  logic                         tag_lookup_en;
  logic [3:0]                   data_way_en;
  int unsigned                  n_l2_req;

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

  function automatic logic [31:0] word_at(input logic [31:0] a);
    return {a[31:2], 2'b11} ^ SALT;
  endfunction

  // back end: follows the loop, redirects a wrong prediction two cycles later
  logic [31:0] exp_pc = BASE;
  int          wait_n = 0;
  logic [31:0] fix_pc;
  bit          fix_tgt;
  int unsigned cyc = 0, n_redir = 0;
  bit          measuring = 0;
  int unsigned m_blocks = 0, m_lookups = 0, m_data = 0, m_refill = 0, m_redir = 0;

  always @(posedge clk) begin
    logic [31:0] act_next, pred_next;
    bit          is_jump;
    upd_valid   <= 1'b0;
    redir_valid <= 1'b0;
    if (rst_n) begin
      cyc++;
      measuring = (cyc > WARMUP) && (cyc <= WARMUP + MEASURE);
      if (measuring) begin
        if (tag_lookup_en) m_lookups++;
        if (|data_way_en) m_data++;
        if (l2_req_valid) m_refill++;
        check(fetch_valid, "a block every cycle");
        check(tag_lookup_en && $countones(data_way_en) == 1, "four tag ways and one data way per cycle");
      end
      if (wait_n > 0) begin
        wait_n--;
        if (wait_n == 0) begin
          redir_valid <= 1'b1; redir_target <= fix_tgt; redir_pc <= fix_pc;
          n_redir++;
          if (measuring) m_redir++;
        end
      end else if (fetch_valid && fetch_ready) begin
        check(fetch_pc == exp_pc, $sformatf("pc %h expected %h", fetch_pc, exp_pc));
        for (int s = 0; s < int'(FETCH_WIDTH); s++)
          check(fetch_insns[s] == word_at(fetch_pc + 32'(4 * s)), "instruction word");
        is_jump   = (fetch_pc == BASE + 32'h0F0);
        act_next  = is_jump ? BASE : fetch_pc + 32'h10;
        pred_next = fetch_bp.taken ? fetch_bp.btb_target : fetch_pc + 32'h10;
        if (is_jump) begin
          upd_valid <= 1'b1; upd_pc <= fetch_pc; upd_cond <= 1'b0; upd_taken <= 1'b1;
          upd_slot <= 2'd3; upd_target <= BASE; upd_pht_idx <= fetch_bp.pht_idx;
        end
        if (measuring) m_blocks++;
        if (act_next != pred_next) begin
          wait_n  = 2;
          fix_pc  = act_next;
          fix_tgt = !(fetch_bp.btb_hit && fetch_bp.btb_target == act_next);
        end
        exp_pc = act_next;
      end
    end
  end

  initial begin
    real e_prop, e_conv;
    fetch_ready = 1'b1; redir_valid = 0; redir_target = 0; redir_pc = '0;
    upd_valid = 0; upd_pc = '0; upd_cond = 0; upd_taken = 0; upd_slot = '0;
    upd_target = '0; upd_pht_idx = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (WARMUP + MEASURE + 5) @(posedge clk);
    check(m_blocks == MEASURE, $sformatf("%0d blocks in %0d cycles", m_blocks, MEASURE));
    check(m_lookups == MEASURE && m_data == MEASURE, "one lookup and one data read per block");
    check(m_refill == 0 && m_redir == 0, "no refill or redirect in the window");
    // eight loop lines, plus at most one wrong-path line before the first redirect
    check(n_l2_req >= 8 && n_l2_req <= 9, $sformatf("cold misses: %0d refills for 8 lines", n_l2_req));
    check(n_redir >= 1, "the first jump was redirected");
    e_prop = real'(m_lookups) * 28.10 + real'(m_data) * 14.51;
    e_conv = real'(m_lookups) * (28.10 + 35.55);
    $display("window: %0d blocks in %0d cycles, energy %0.1f pJ against %0.1f pJ (ratio %0.3f)",
             m_blocks, MEASURE, e_prop, e_conv, e_prop / e_conv);
    check(e_prop / e_conv < 0.67 && e_prop / e_conv > 0.66, "energy ratio of an all-hit window");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
