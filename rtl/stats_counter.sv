// stats_counter: message statistics counter of the data NIC.
//
// Counts one event per cycle in which `inc` is high, saturating at all ones, and is
// cleared by `clr` (clear wins). The data NIC uses one for messages sent (output stats
// collector) and two for messages received and blocked (input stats collector). The
// counter width and the saturation are this design's own choices.
module stats_counter #(
  parameter int unsigned CW = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          inc,
  output logic [CW-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 count <= '0;
    else if (clr)               count <= '0;
    else if (inc && !(&count))  count <= count + 1'b1;
  end
endmodule
