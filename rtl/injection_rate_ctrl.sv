// injection_rate_ctrl: limits how many messages the IP may inject per unit of time.
//
// Time is cut into windows of `window` network cycles. Within a window at most `limit`
// packets may start; `allow` drops once that many have started and rises again when the
// next window begins. `limit` = 0 means no limit. Both values come from the OS through
// the control NIC and take effect at once. The window-counter mechanism is this design's
// own; only the purpose (OS-set injection rate, a coarse quality of service) is given.
module injection_rate_ctrl #(
  parameter int unsigned CW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [CW-1:0] limit,
  input  logic [CW-1:0] window,
  input  logic          pkt_start,   // a packet starts injecting this cycle
  output logic          allow
);
  logic [CW-1:0] tick_q;   // cycles elapsed in this window
  logic [CW-1:0] sent_q;   // packets started in this window

  wire new_window = (tick_q + 1'b1 >= window);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tick_q <= '0;
      sent_q <= '0;
    end else if (new_window) begin
      tick_q <= '0;
      sent_q <= pkt_start ? CW'(1) : '0;
    end else begin
      tick_q <= tick_q + 1'b1;
      if (pkt_start && !(&sent_q)) sent_q <= sent_q + 1'b1;
    end
  end

  assign allow = (limit == '0) || (sent_q < limit);
endmodule
