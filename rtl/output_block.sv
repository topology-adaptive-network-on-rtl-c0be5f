// output_block: one router output: arbiter, output queue and link sender.
//
// The arbiter chooses among the input blocks that request this output, and only while
// the queue can take a whole maximum-size packet. Flits of the granted input arrive
// through the crossbar (`wr_en`, one per cycle) and are queued. The link sender raises
// `out_req` whenever the queue is not empty, with the queue head on `out_data`/`out_last`,
// and pops a flit in every cycle in which `out_ack` is high. Because a packet is written
// without gaps and read at most one flit per cycle, starting one cycle after its header
// was written, the queue never runs dry in the middle of a packet, so the sender can keep
// `out_req` high for the whole packet. A packet that enters in cycle t leaves at t+1 at
// the earliest. Structure (arbiter + queue per output) follows the router description.
module output_block #(
  parameter int unsigned NI            = 5,
  parameter int unsigned DATA_W        = 16,
  parameter int unsigned DEPTH         = 1024,
  parameter int unsigned MAX_PKT_FLITS = 273
) (
  input  logic              clk,
  input  logic              rst_n,
  // arbitration
  input  logic [NI-1:0]     arb_req,
  output logic [NI-1:0]     arb_gnt,
  // flit from the crossbar
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              wr_last,
  // output link
  output logic              out_req,
  input  logic              out_ack,
  output logic [DATA_W-1:0] out_data,
  output logic              out_last
);
  logic empty, space_ok;

  rr_arbiter #(.N(NI)) u_arb (
    .clk, .rst_n,
    .req      (arb_req),
    .space_ok (space_ok),
    .accept   (wr_en),
    .grant    (arb_gnt)
  );

  output_queue #(.DATA_W(DATA_W), .DEPTH(DEPTH), .MAX_PKT_FLITS(MAX_PKT_FLITS)) u_q (
    .clk, .rst_n,
    .wr_en, .wr_data, .wr_last,
    .rd_en   (out_req && out_ack),
    .rd_data (out_data),
    .rd_last (out_last),
    .empty   (empty),
    .space_ok(space_ok)
  );

  assign out_req = !empty;
endmodule
