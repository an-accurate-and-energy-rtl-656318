// itag_array: tag arrays and comparators of the set-associative
// instruction cache, used in the tag lookup stage.
//
// A lookup reads the tag and valid bit of every way of the indexed set and
// compares them with the address tag in the same cycle. The result is the
// way that holds the line (one-hot) or a miss, so the fetch stage after it
// needs to enable only that one data way, and on a miss no data way at all.
// This early, exact way determination is the core of the technique. The
// replacement policy (an invalid way first, otherwise a per-set round-robin
// pointer) is a choice of this design; it is not specified for the L1
// instruction cache.
//
// Interface and timing:
//  - lk_addr -> lk_hit, lk_way, victim_way: combinational (array read and
//    compare inside the tag lookup cycle).
//  - fill_valid: at the next clock edge fill_addr's tag is written into way
//    fill_way (one-hot) of its set and marked valid.
module itag_array #(
  parameter int unsigned SETS     = 128,
  parameter int unsigned WAYS     = 4,
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned LINE_OFF = 5,   // log2 of the line size in bytes
  localparam int unsigned IDX_W   = $clog2(SETS),
  localparam int unsigned TAG_W   = ADDR_W - LINE_OFF - IDX_W,
  localparam int unsigned WAY_W   = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] lk_addr,
  output logic              lk_hit,
  output logic [WAYS-1:0]   lk_way,
  output logic [WAYS-1:0]   victim_way,
  input  logic              fill_valid,
  input  logic [ADDR_W-1:0] fill_addr,
  input  logic [WAYS-1:0]   fill_way
);

  logic [TAG_W-1:0] tags  [SETS][WAYS];
  logic [WAYS-1:0]  valid [SETS];
  logic [WAY_W-1:0] rr    [SETS];

  logic [IDX_W-1:0] lk_idx, fl_idx;
  logic [TAG_W-1:0] lk_tag, fl_tag;

  assign lk_idx = lk_addr[LINE_OFF +: IDX_W];
  assign lk_tag = lk_addr[ADDR_W-1 -: TAG_W];
  assign fl_idx = fill_addr[LINE_OFF +: IDX_W];
  assign fl_tag = fill_addr[ADDR_W-1 -: TAG_W];

  always_comb begin
    for (int w = 0; w < int'(WAYS); w++)
      lk_way[w] = valid[lk_idx][w] && (tags[lk_idx][w] == lk_tag);
    lk_hit = |lk_way;
  end

  // victim for the looked-up set: lowest invalid way, else the rr pointer
  always_comb begin
    logic found;
    found      = 1'b0;
    victim_way = '0;
    for (int w = 0; w < int'(WAYS); w++) begin
      if (!found && !valid[lk_idx][w]) begin
        found         = 1'b1;
        victim_way[w] = 1'b1;
      end
    end
    if (!found) victim_way[rr[lk_idx]] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SETS); s++) begin
        valid[s] <= '0;
        rr[s]    <= '0;
      end
    end else if (fill_valid) begin
      valid[fl_idx] <= valid[fl_idx] | fill_way;
      if (&valid[fl_idx]) rr[fl_idx] <= WAY_W'((int'(rr[fl_idx]) + 1) % int'(WAYS));
    end
  end

  always_ff @(posedge clk) begin
    if (fill_valid)
      for (int w = 0; w < int'(WAYS); w++)
        if (fill_way[w]) tags[fl_idx][w] <= fl_tag;
  end

endmodule
