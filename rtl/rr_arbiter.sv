// rr_arbiter: acceptance-dependent round-robin arbiter of one router output.
//
// Inputs that want this output raise their bit of `req`. When no input holds the
// output and the output queue has room for a maximum-size packet (`space_ok`), the
// arbiter picks the first requester at or after its priority pointer and registers a
// one-hot `grant`. The grant stays with that input for as long as it keeps its request
// up, i.e. for the whole packet. The priority pointer moves to the input after the
// winner only when the winner accepts the grant (`accept`, the first flit moved); a
// grant that is never taken up does not cost the others their turn.
//
// Timing: a request seen in cycle t gives a grant visible in cycle t+1 at the earliest.
// The round-robin policy and the check on the queue follow the router description; how
// "acceptance-dependent" is realised is this design's reading.
module rr_arbiter #(
  parameter int unsigned N = 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         space_ok,
  input  logic         accept,
  output logic [N-1:0] grant
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  logic [IW-1:0] ptr_q;        // highest-priority input
  logic [IW-1:0] holder_idx;   // index of the current grant
  logic          hold;         // current holder still requests
  logic          found;
  logic [IW-1:0] pick;

  always_comb begin
    holder_idx = '0;
    for (int i = 0; i < N; i++) if (grant[i]) holder_idx = IW'(i);
    hold = |(grant & req);
  end

  // first requester at or after the pointer
  always_comb begin
    found = 1'b0;
    pick  = '0;
    for (int k = 0; k < N; k++) begin
      automatic int idx = (int'(ptr_q) + k) % N;
      if (!found && req[idx]) begin
        found = 1'b1;
        pick  = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant <= '0;
      ptr_q <= '0;
    end else begin
      if (hold) begin
        grant <= grant;
      end else if (found && space_ok) begin
        grant       <= '0;
        grant[pick] <= 1'b1;
      end else begin
        grant <= '0;
      end
      if (accept && |grant)
        ptr_q <= IW'((int'(holder_idx) + 1) % N);
    end
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
