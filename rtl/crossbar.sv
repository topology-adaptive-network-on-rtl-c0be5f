// crossbar: single-stage, non-blocking crossbar switch of a router.
//
// Every output has one wide multiplexer over all inputs; its one-hot select comes from
// that output's arbiter grant. Any input can reach any output and different outputs
// never wait on one another. An output whose select is all zero carries zero.
// Purely combinational. Structure (one stage of large multiplexers) follows the router
// description.
module crossbar #(
  parameter int unsigned NI = 5,
  parameter int unsigned NO = 5,
  parameter int unsigned W  = 18
) (
  input  logic [NI-1:0][W-1:0]  in_flit,
  input  logic [NO-1:0][NI-1:0] sel,
  output logic [NO-1:0][W-1:0]  out_flit
);
  always_comb begin
    for (int o = 0; o < NO; o++) begin
      out_flit[o] = '0;
      for (int i = 0; i < NI; i++)
        if (sel[o][i]) out_flit[o] = out_flit[o] | in_flit[i];
    end
  end
endmodule
