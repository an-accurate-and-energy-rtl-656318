// tb_gshare_pht: self-checking test of the gshare pattern history table.
//
// A reference model (counter array and global history kept in the
// testbench) is driven with the same random predictions and updates as the
// table. Every cycle the predicted direction and index are compared; the
// index must be the address bits above the 16-byte block offset XOR the
// history. Updates are biased per entry so counters reach both ends.
module tb_gshare_pht;
  localparam int unsigned ENTRIES = 4096;
  localparam int unsigned IDX_W   = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [31:0]      pred_pc;
  logic             pred_taken, upd_valid, upd_taken;
  logic [IDX_W-1:0] pred_idx, upd_idx;

  gshare_pht #(.ENTRIES(ENTRIES)) dut (.*);

  int checks = 0, failures = 0;
  logic [1:0]       m_ctr [ENTRIES];
  logic [IDX_W-1:0] m_ghr;
  int unsigned      n_sat_hi = 0, n_sat_lo = 0;

  initial begin
    pred_pc = '0; upd_valid = 0; upd_taken = 0; upd_idx = '0;
    for (int i = 0; i < int'(ENTRIES); i++) m_ctr[i] = 2'b01;
    m_ghr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      pred_pc   = $urandom;
      upd_valid = ($urandom_range(0, 3) != 0);
      upd_idx   = IDX_W'($urandom_range(0, 15)) * 12'd17;   // a few hot entries
      upd_taken = (upd_idx[4]) ? ($urandom_range(0, 9) != 0) : ($urandom_range(0, 9) == 0);
      #1;
      checks++;
      if (pred_idx !== (pred_pc[15:4] ^ m_ghr) || pred_taken !== m_ctr[pred_pc[15:4] ^ m_ghr][1]) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d idx %h taken %b", n, pred_idx, pred_taken);
      end
      @(posedge clk);
      if (upd_valid) begin
        if (upd_taken && m_ctr[upd_idx] != 2'b11) m_ctr[upd_idx]++;
        else if (!upd_taken && m_ctr[upd_idx] != 2'b00) m_ctr[upd_idx]--;
        if (m_ctr[upd_idx] == 2'b11) n_sat_hi++;
        if (m_ctr[upd_idx] == 2'b00) n_sat_lo++;
        m_ghr = {m_ghr[IDX_W-2:0], upd_taken};
      end
    end
    checks++;
    if (n_sat_hi == 0 || n_sat_lo == 0) failures++;
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
