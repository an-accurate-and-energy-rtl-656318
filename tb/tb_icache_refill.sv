// tb_icache_refill: self-checking test of the instruction cache miss
// controller.
//
// Misses with random addresses and victim ways are handed to the controller
// while a next-level model answers LATENCY cycles after accepting the
// request; the request is sometimes held off by a random req_ready. Checks:
// the request address is the line-aligned miss address, busy covers the
// whole refill, new misses are ignored while busy, the fill strobe comes in
// the response cycle with the victim way, the address and the line, and the
// time from miss to fill is LATENCY + 2 cycles plus the cycles req_ready
// was held low.
module tb_icache_refill;
  localparam int unsigned LATENCY = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic         miss_valid, busy, l2_req_valid, l2_req_ready, l2_resp_valid, fill_valid;
  logic [31:0]  miss_addr, l2_req_addr, fill_addr;
  logic [3:0]   miss_way, fill_way;
  logic [255:0] l2_resp_line, fill_line;

  icache_refill dut (.*);

  int checks = 0, failures = 0;
  task automatic chk(input logic ok, input string s);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL @%0t %s", $time, s); end
  endtask

  // next level: accept when ready, answer LATENCY cycles later
  int          cnt;
  logic        pend;
  logic [31:0] raddr;
  logic        hold_ready;
  assign l2_req_ready  = !pend && !hold_ready;
  assign l2_resp_valid = pend && cnt == int'(LATENCY);
  always_comb for (int i = 0; i < 8; i++) l2_resp_line[i*32 +: 32] = (raddr + 32'(4 * i)) ^ 32'hA5A5_0000;
  always @(posedge clk) begin
    if (!rst_n) begin pend <= 0; cnt <= 0; raddr <= '0; end
    else if (!pend && l2_req_valid && l2_req_ready) begin pend <= 1; cnt <= 1; raddr <= l2_req_addr; end
    else if (l2_resp_valid) pend <= 0;
    else if (pend) cnt <= cnt + 1;
  end

  initial begin
    hold_ready = 0; miss_valid = 0; miss_addr = '0; miss_way = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      logic [31:0] a;
      logic [3:0]  w;
      int          held, t;
      @(negedge clk);
      a = $urandom; w = 4'b0001 << $urandom_range(0, 3);
      held = $urandom_range(0, 3);
      hold_ready = (held != 0);
      miss_valid = 1; miss_addr = a; miss_way = w;
      chk(!busy, "idle before miss");
      @(negedge clk);
      miss_valid = 1; miss_addr = ~a; miss_way = ~w;    // must be ignored
      t = 1;
      chk(busy && l2_req_valid && l2_req_addr == {a[31:5], 5'h0}, "request of the aligned line");
      repeat (held) begin @(negedge clk); t++; end
      hold_ready = 0;
      miss_valid = 0;
      while (!fill_valid && t < 100) begin
        chk(busy, "busy during refill");
        @(negedge clk); t++;
      end
      chk(t == int'(LATENCY) + 1 + held, $sformatf("fill after %0d cycles, held %0d", t, held));
      chk(fill_valid && l2_resp_valid && fill_addr == {a[31:5], 5'h0} && fill_way == w
          && fill_line == l2_resp_line, "fill strobe, address, way and line");
      @(negedge clk);
      chk(!busy && !fill_valid, "idle after fill");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
