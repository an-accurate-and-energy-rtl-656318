// tb_btb: self-checking test of the set-associative branch target buffer.
//
// Random updates go to a small pool of fetch-block addresses chosen so that
// more of them share a set than there are ways, forcing replacements. The
// testbench keeps its own copy of every set (valid, tag, payload and the
// round-robin pointer) and compares each lookup: hit or miss, slot, target,
// unconditional flag. Replacements are counted and must occur.
module tb_btb;
  localparam int unsigned ENTRIES = 1024, WAYS = 4, SETS = ENTRIES / WAYS;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        lk_hit, lk_uncond, upd_valid, upd_uncond;
  logic [1:0]  lk_slot, upd_slot;
  logic [31:0] lk_pc, lk_target, upd_pc, upd_target;

  btb #(.ENTRIES(ENTRIES), .WAYS(WAYS)) dut (.*);

  typedef struct { bit v; logic [31:0] blk; logic [1:0] slot; logic [31:0] tgt; bit unc; } m_ent_t;
  m_ent_t m [SETS][WAYS];
  int     m_rr [SETS];
  int     checks = 0, failures = 0, n_repl = 0, n_hits = 0;

  function automatic logic [31:0] pool(input int k);
    // 12 blocks per set for sets 3 and 77, and some spread blocks
    if (k < 12) return (32'(k) << 12) | (32'd3 << 4);
    if (k < 24) return (32'(k) << 12) | (32'd77 << 4);
    return 32'(k) << 4;
  endfunction

  initial begin
    lk_pc = '0; upd_valid = 0; upd_pc = '0; upd_slot = '0; upd_target = '0; upd_uncond = 0;
    for (int s = 0; s < int'(SETS); s++) begin
      m_rr[s] = 0;
      for (int w = 0; w < int'(WAYS); w++) m[s][w].v = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      int s, hw;
      bit ehit;
      logic [31:0] lkb;
      @(negedge clk);
      lkb   = pool($urandom_range(0, 39));
      lk_pc = lkb | 32'($urandom_range(0, 15));
      upd_valid  = ($urandom_range(0, 2) == 0);
      upd_pc     = pool($urandom_range(0, 39)) | 32'($urandom_range(0, 15));
      upd_slot   = 2'($urandom);
      upd_target = $urandom;
      upd_uncond = $urandom_range(0, 1);
      #1;
      s = int'(lkb[11:4]);
      ehit = 0; hw = 0;
      for (int w = 0; w < int'(WAYS); w++) if (m[s][w].v && m[s][w].blk == lkb) begin ehit = 1; hw = w; end
      checks++;
      if (lk_hit !== ehit || (ehit && (lk_slot !== m[s][hw].slot || lk_target !== m[s][hw].tgt
                                       || lk_uncond !== m[s][hw].unc))) begin
        failures++;
        if (failures < 10) $display("FAIL lookup %h hit %b exp %b", lk_pc, lk_hit, ehit);
      end
      if (ehit) n_hits++;
      @(posedge clk);
      if (upd_valid) begin
        logic [31:0] ub;
        int us, uw;
        bit found;
        ub = {upd_pc[31:4], 4'h0};
        us = int'(ub[11:4]);
        found = 0; uw = 0;
        for (int w = 0; w < int'(WAYS); w++) if (m[us][w].v && m[us][w].blk == ub) begin found = 1; uw = w; end
        if (!found) begin
          bit fr;
          fr = 0;
          for (int w = 0; w < int'(WAYS); w++) if (!fr && !m[us][w].v) begin fr = 1; uw = w; end
          if (!fr) begin uw = m_rr[us]; m_rr[us] = (m_rr[us] + 1) % int'(WAYS); n_repl++; end
        end
        m[us][uw] = '{1, ub, upd_slot, upd_target, upd_uncond};
      end
    end
    checks++;
    if (n_repl == 0 || n_hits == 0) failures++;
    $display("replacements=%0d hits=%0d", n_repl, n_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
