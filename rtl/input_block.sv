// input_block: one router input: routing table, request to an output, flit forwarding.
//
// The upstream node raises `in_req` with the header flit, whose low address bits name
// the destination IP. In that first cycle the routing table turns the address into an
// output port, which is registered (one cycle of routing). From the next cycle on the
// block requests that output's arbiter; in the cycle the grant is seen it acknowledges
// the sender, and from then on one flit per cycle moves on to the crossbar
// (`xb_valid`/`xb_data`/`xb_last`) until the flit marked last. Then the request is dropped
// and the block is free for the next packet, even if the previous one is still waiting
// in the output queue.
//
// Timing: header at the input in cycle t, routed at t, arbiter request at t+1, grant and
// acknowledge at t+2 at the earliest. The routing-then-arbitration sequence follows the
// router description; the exact cycle split and the signal names are this design's own.
module input_block #(
  parameter int unsigned NO     = 5,
  parameter int unsigned DATA_W = 16,
  parameter int unsigned NIP    = 9,
  localparam int unsigned AW = (NIP > 1) ? $clog2(NIP) : 1,
  localparam int unsigned PW = (NO  > 1) ? $clog2(NO)  : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // input link
  input  logic              in_req,
  output logic              in_ack,
  input  logic [DATA_W-1:0] in_data,
  input  logic              in_last,
  // routing table write port
  input  logic              rt_we,
  input  logic [AW-1:0]     rt_addr,
  input  logic [PW-1:0]     rt_port,
  // arbitration
  output logic [NO-1:0]     arb_req,
  input  logic [NO-1:0]     arb_gnt,
  // towards the crossbar
  output logic              xb_valid,
  output logic [DATA_W-1:0] xb_data,
  output logic              xb_last
);
  typedef enum logic [1:0] {S_IDLE, S_ARB, S_FWD} state_e;
  state_e        state_q;
  logic [PW-1:0] sel_q;
  logic [PW-1:0] route;
  logic          xfer;

  routing_table #(.NIP(NIP), .NO(NO)) u_rt (
    .clk, .rst_n,
    .we    (rt_we),
    .waddr (rt_addr),
    .wdata (rt_port),
    .raddr (in_data[AW-1:0]),
    .rdata (route)
  );

  always_comb begin
    arb_req = '0;
    if (state_q != S_IDLE) arb_req[sel_q] = 1'b1;
    case (state_q)
      S_ARB:   in_ack = arb_gnt[sel_q];
      S_FWD:   in_ack = 1'b1;
      default: in_ack = 1'b0;
    endcase
  end

  assign xfer     = in_req && in_ack;
  assign xb_valid = xfer;
  assign xb_data  = in_data;
  assign xb_last  = in_last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      sel_q   <= '0;
    end else begin
      case (state_q)
        S_IDLE: if (in_req) begin
          sel_q   <= (32'(route) < NO) ? route : '0;
          state_q <= S_ARB;
        end
        S_ARB: if (xfer) state_q <= in_last ? S_IDLE : S_FWD;
        S_FWD: if (xfer && in_last) state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end

  // once acknowledged the sender must deliver one flit per cycle until the last
  a_gapless: assert property (@(posedge clk) disable iff (!rst_n) (state_q == S_FWD) |-> in_req);
endmodule
