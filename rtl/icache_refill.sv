// icache_refill: miss controller of the instruction cache.
//
// The tag lookup stage detects a miss before any data way is read and hands
// the missing address and the victim way to this controller. It requests the
// line from the next cache level, waits for the answer and, in the cycle the
// line arrives, writes it into the victim data way and its tag into the tag
// array. The front end holds its tag lookup stage while the controller is
// busy and repeats the lookup afterwards, which then hits. The request /
// response handshake and the one-miss-at-a-time organisation are choices of
// this design.
//
// Interface and timing:
//  - miss_valid (accepted only when busy is low), miss_addr, miss_way.
//  - l2_req_valid/l2_req_ready: valid-ready request of the line address.
//  - l2_resp_valid/l2_resp_line: the line, one cycle, any time after the
//    request was accepted.
//  - fill_valid/fill_addr/fill_way/fill_line: write strobe, the same cycle
//    as l2_resp_valid.
module icache_refill #(
  parameter int unsigned ADDR_W     = 32,
  parameter int unsigned WAYS       = 4,
  parameter int unsigned LINE_BYTES = 32,
  localparam int unsigned LINE_OFF  = $clog2(LINE_BYTES)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    miss_valid,
  input  logic [ADDR_W-1:0]       miss_addr,
  input  logic [WAYS-1:0]         miss_way,
  output logic                    busy,
  output logic                    l2_req_valid,
  output logic [ADDR_W-1:0]       l2_req_addr,
  input  logic                    l2_req_ready,
  input  logic                    l2_resp_valid,
  input  logic [LINE_BYTES*8-1:0] l2_resp_line,
  output logic                    fill_valid,
  output logic [ADDR_W-1:0]       fill_addr,
  output logic [WAYS-1:0]         fill_way,
  output logic [LINE_BYTES*8-1:0] fill_line
);

  typedef enum logic [1:0] {IDLE, REQ, WAIT} state_e;

  state_e            state;
  logic [ADDR_W-1:0] addr_q;
  logic [WAYS-1:0]   way_q;

  assign busy         = (state != IDLE);
  assign l2_req_valid = (state == REQ);
  assign l2_req_addr  = addr_q;
  assign fill_valid   = (state == WAIT) && l2_resp_valid;
  assign fill_addr    = addr_q;
  assign fill_way     = way_q;
  assign fill_line    = l2_resp_line;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= IDLE;
      addr_q <= '0;
      way_q  <= '0;
    end else begin
      unique case (state)
        IDLE: if (miss_valid) begin
          state  <= REQ;
          addr_q <= {miss_addr[ADDR_W-1:LINE_OFF], LINE_OFF'(0)};
          way_q  <= miss_way;
        end
        REQ:  if (l2_req_ready)  state <= WAIT;
        WAIT: if (l2_resp_valid) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  // the victim way must be a single way
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == IDLE && miss_valid) |-> $onehot(miss_way));

endmodule
