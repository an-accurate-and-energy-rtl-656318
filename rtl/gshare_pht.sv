// gshare_pht: gshare direction predictor (pattern history table).
//
// A table of ENTRIES 2-bit saturating counters is indexed by the fetch-block
// address XOR a global history register of log2(ENTRIES) bits. A counter
// value of 2 or 3 predicts taken. The 4K-entry size is the evaluated
// configuration; the counter width, the index function, the reset value
// (weakly not-taken) and the non-speculative history update are choices of
// this design. The counters are a plain memory without reset, as in an
// SRAM; one flag per entry, cleared at reset, makes entries not yet trained
// read as weakly not-taken.
//
// Interface and timing:
//  - pred_pc -> pred_taken, pred_idx: combinational read, same cycle.
//  - upd_valid with upd_idx/upd_taken: the counter at upd_idx moves one step
//    towards the outcome and the outcome is shifted into the history at the
//    next clock edge. The index is the one given with the prediction, so the
//    same entry is trained that made the prediction.
module gshare_pht #(
  parameter int unsigned ENTRIES  = 4096,
  parameter int unsigned ADDR_W   = 32,
  parameter int unsigned BLK_OFF  = 4,   // log2 of the fetch block in bytes
  localparam int unsigned IDX_W   = $clog2(ENTRIES)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [ADDR_W-1:0] pred_pc,
  output logic              pred_taken,
  output logic [IDX_W-1:0]  pred_idx,
  input  logic              upd_valid,
  input  logic [IDX_W-1:0]  upd_idx,
  input  logic              upd_taken
);

  // The counters form a plain memory (no reset), as an SRAM would. A
  // separate bit per entry, cleared at reset, marks entries written since
  // reset; an unwritten entry reads as weakly not-taken.
  logic [1:0]       ctr     [ENTRIES];
  logic [ENTRIES-1:0] written;
  logic [IDX_W-1:0] ghr;
  logic [1:0]       upd_ctr, upd_new;

  assign pred_idx   = pred_pc[BLK_OFF +: IDX_W] ^ ghr;
  assign pred_taken = written[pred_idx] && ctr[pred_idx][1];

  always_comb begin
    upd_ctr = written[upd_idx] ? ctr[upd_idx] : 2'b01;
    upd_new = upd_ctr;
    if (upd_taken && upd_ctr != 2'b11)       upd_new = upd_ctr + 2'd1;
    else if (!upd_taken && upd_ctr != 2'b00) upd_new = upd_ctr - 2'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ghr     <= '0;
      written <= '0;
    end else if (upd_valid) begin
      ghr              <= {ghr[IDX_W-2:0], upd_taken};
      written[upd_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (upd_valid) ctr[upd_idx] <= upd_new;
  end

endmodule
