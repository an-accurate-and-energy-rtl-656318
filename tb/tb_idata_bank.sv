// tb_idata_bank: self-checking test of one instruction data sub-bank.
//
// Lines are written with contents computed from their index and a round
// number; reads of either half of a line must return that half in the cycle
// after rd_en (synchronous read), and the output must hold its value while
// rd_en is low, even when a write happens meanwhile.
module tb_idata_bank;
  localparam int unsigned SETS = 128;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic         rd_en, wr_en, rd_half;
  logic [6:0]   rd_index, wr_index;
  logic [127:0] rd_data;
  logic [255:0] wr_line;

  idata_bank #(.SETS(SETS)) dut (.*);

  int checks = 0, failures = 0;
  int round_of [SETS];

  function automatic logic [255:0] line_val(input int idx, input int rnd);
    logic [255:0] l;
    for (int i = 0; i < 8; i++) l[i*32 +: 32] = 32'(idx * 8 + i) ^ (32'(rnd) << 20) ^ 32'hC0DE_0000;
    return l;
  endfunction

  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    logic [127:0] held;
    rd_en = 0; wr_en = 0; rd_half = 0; rd_index = '0; wr_index = '0; wr_line = '0;
    // fill every line
    for (int s = 0; s < int'(SETS); s++) begin
      @(negedge clk);
      wr_en = 1; wr_index = 7'(s); wr_line = line_val(s, 0); round_of[s] = 0;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 3000; n++) begin
      int idx, h;
      idx = $urandom_range(0, SETS - 1);
      h   = $urandom_range(0, 1);
      @(negedge clk);
      rd_en = 1; rd_index = 7'(idx); rd_half = h[0];
      // overwrite a random line in the same cycle sometimes
      wr_en = ($urandom_range(0, 3) == 0);
      wr_index = 7'($urandom_range(0, SETS - 1));
      if (wr_index == 7'(idx)) wr_en = 0;
      wr_line = line_val(wr_index, n + 1);
      @(negedge clk);
      if (wr_en) round_of[wr_index] = n + 1;
      chk(rd_data == line_val(idx, round_of[idx])[h*128 +: 128], $sformatf("read %0d/%0d", idx, h));
      // hold: no read for two cycles, with a write to the line just read
      held = rd_data;
      rd_en = 0;
      wr_en = 1; wr_index = 7'(idx); wr_line = line_val(idx, n + 100000);
      @(negedge clk);
      round_of[idx] = n + 100000;
      wr_en = 0;
      @(negedge clk);
      chk(rd_data == held, "output held while rd_en low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
