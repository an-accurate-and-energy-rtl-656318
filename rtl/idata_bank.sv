// idata_bank: one way of the instruction cache data array (one sub-bank).
//
// Holds SETS lines of LINE_BYTES bytes. A read returns one fetch block
// (half a 32-byte line, four instructions) and happens only when rd_en is
// set: the front end raises rd_en for the single way chosen by the tag
// lookup stage, so the other ways stay idle. When rd_en is low the output
// keeps its last value, as an SRAM's sense-amplifier latch would. A refill
// writes a whole line at once. The 4 KB sub-bank size per way follows the
// evaluated configuration; the half-line read and the whole-line write
// port are choices of this design.
//
// Interface and timing:
//  - rd_en, rd_index, rd_half: rd_data is valid the cycle after (synchronous
//    read, the fetch stage).
//  - wr_en, wr_index, wr_line: written at the clock edge.
module idata_bank #(
  parameter int unsigned SETS        = 128,
  parameter int unsigned LINE_BYTES  = 32,
  parameter int unsigned FETCH_BYTES = 16,
  localparam int unsigned IDX_W      = $clog2(SETS),
  localparam int unsigned PARTS      = LINE_BYTES / FETCH_BYTES,
  localparam int unsigned PART_W     = (PARTS > 1) ? $clog2(PARTS) : 1
) (
  input  logic                       clk,
  input  logic                       rd_en,
  input  logic [IDX_W-1:0]           rd_index,
  input  logic [PART_W-1:0]          rd_half,
  output logic [FETCH_BYTES*8-1:0]   rd_data,
  input  logic                       wr_en,
  input  logic [IDX_W-1:0]           wr_index,
  input  logic [LINE_BYTES*8-1:0]    wr_line
);

  logic [FETCH_BYTES*8-1:0] mem [SETS*PARTS];

  always_ff @(posedge clk) begin
    if (wr_en)
      for (int p = 0; p < int'(PARTS); p++)
        mem[int'(wr_index) * int'(PARTS) + p] <= wr_line[p*FETCH_BYTES*8 +: FETCH_BYTES*8];
    if (rd_en)
      rd_data <= mem[int'(rd_index) * int'(PARTS) + int'(rd_half)];
  end

endmodule
