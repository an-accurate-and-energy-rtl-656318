// tb_itag_array: self-checking test of the instruction tag arrays and the
// early tag match.
//
// Lines from a pool where six tags share each of a few sets (more than the
// four ways) are looked up at random; on a miss the line is filled into the
// reported victim way, as the miss controller does. A reference copy of the
// tags, valid bits and round-robin pointers gives the expected hit, the
// expected one-hot hit way and the expected victim. Hits, misses and
// evictions must all occur.
module tb_itag_array;
  localparam int unsigned SETS = 128, WAYS = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        lk_hit, fill_valid;
  logic [31:0] lk_addr, fill_addr;
  logic [3:0]  lk_way, victim_way, fill_way;

  itag_array #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  bit          mv  [SETS][WAYS];
  logic [19:0] mt  [SETS][WAYS];
  int          mrr [SETS];
  int checks = 0, failures = 0, n_hit = 0, n_miss = 0, n_evict = 0;

  initial begin
    lk_addr = '0; fill_valid = 0; fill_addr = '0; fill_way = '0;
    for (int s = 0; s < int'(SETS); s++) begin
      mrr[s] = 0;
      for (int w = 0; w < int'(WAYS); w++) mv[s][w] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      int s;
      logic [19:0] t;
      logic [3:0] ew, ev;
      bit ev_found;
      @(negedge clk);
      fill_valid = 0;
      s = $urandom_range(0, 5) * 21;
      t = 20'($urandom_range(0, 5)) * 20'h111;
      lk_addr = {t, 7'(s), 5'($urandom)};
      #1;
      ew = '0;
      for (int w = 0; w < int'(WAYS); w++) ew[w] = mv[s][w] && mt[s][w] == t;
      ev = '0; ev_found = 0;
      for (int w = 0; w < int'(WAYS); w++) if (!ev_found && !mv[s][w]) begin ev[w] = 1; ev_found = 1; end
      if (!ev_found) ev[mrr[s]] = 1;
      checks++;
      if (lk_hit !== (|ew) || lk_way !== ew || (!lk_hit && victim_way !== ev)) begin
        failures++;
        if (failures < 10) $display("FAIL %h hit %b way %b victim %b exp %b %b", lk_addr, lk_hit, lk_way, victim_way, ew, ev);
      end
      if (|ew) n_hit++;
      else begin
        n_miss++;
        fill_valid = 1; fill_addr = lk_addr; fill_way = victim_way;
        @(posedge clk);
        for (int w = 0; w < int'(WAYS); w++) if (ev[w]) begin
          if (mv[s][w]) begin n_evict++; mrr[s] = (mrr[s] + 1) % int'(WAYS); end
          mv[s][w] = 1; mt[s][w] = t;
        end
      end
    end
    checks++;
    if (n_hit == 0 || n_miss == 0 || n_evict == 0) failures++;
    $display("hits=%0d misses=%0d evictions=%0d", n_hit, n_miss, n_evict);
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
