// l2_model: behavioural model of the next cache level, for testbenches only.
//
// Accepts one line request at a time (req_ready is low while a request is
// outstanding) and answers LATENCY cycles after the request was accepted
// with the line's contents. The contents are computed, not stored: the
// 32-bit word at byte address a is insn_word(a) = {a[31:2], 2'b11} ^ SALT,
// so every word of memory is known to the checker without a table.
// busy is high from the accepted request up to and including the response.
module l2_model #(
  parameter int unsigned LATENCY    = 12,
  parameter int unsigned LINE_BYTES = 32,
  parameter logic [31:0] SALT       = 32'h5A3C_0000
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    req_valid,
  input  logic [31:0]             req_addr,
  output logic                    req_ready,
  output logic                    resp_valid,
  output logic [LINE_BYTES*8-1:0] resp_line,
  output logic                    busy,
  output int unsigned             n_req
);

  logic        pend;
  logic [31:0] addr_q;
  int unsigned cnt;

  assign req_ready = !pend;
  assign busy      = pend;

  function automatic logic [31:0] insn_word(input logic [31:0] a);
    return {a[31:2], 2'b11} ^ SALT;
  endfunction

  always_comb begin
    for (int i = 0; i < int'(LINE_BYTES / 4); i++)
      resp_line[i*32 +: 32] = insn_word(addr_q + 32'(4 * i));
  end

  assign resp_valid = pend && (cnt == LATENCY);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend   <= 1'b0;
      addr_q <= '0;
      cnt    <= 0;
      n_req  <= 0;
    end else if (!pend) begin
      if (req_valid) begin
        pend   <= 1'b1;
        addr_q <= req_addr;
        cnt    <= 1;
        n_req  <= n_req + 1;
      end
    end else if (resp_valid) begin
      pend <= 1'b0;
    end else begin
      cnt <= cnt + 1;
    end
  end

endmodule
