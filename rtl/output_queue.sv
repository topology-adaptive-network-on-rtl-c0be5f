// output_queue: packet buffer of one router output (output queuing).
//
// A FIFO of DEPTH words, each a flit plus its last-flit bit. With the defaults it is
// one 2 kbyte block RAM (1024 x 16 bit) and holds three maximum-size packets. Its head
// is read combinationally, so a flit written in cycle t can leave in cycle t+1: packets
// cut through the queue when the output is free and are stored whole when it is not.
// `space_ok` tells the arbiter that a whole maximum-size packet still fits, which is the
// condition for starting a new packet under virtual cut-through. The buffer per output
// and its size follow the router description; the head-read style is this design's own.
module output_queue #(
  parameter int unsigned DATA_W        = 16,
  parameter int unsigned DEPTH         = 1024,
  parameter int unsigned MAX_PKT_FLITS = 273
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              wr_en,
  input  logic [DATA_W-1:0] wr_data,
  input  logic              wr_last,
  input  logic              rd_en,
  output logic [DATA_W-1:0] rd_data,
  output logic              rd_last,
  output logic              empty,
  output logic              space_ok
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [DATA_W:0] mem [DEPTH];
  logic [AW-1:0]   wptr_q, rptr_q;
  logic [AW:0]     count_q;

  wire do_wr = wr_en && (32'(count_q) < DEPTH);
  wire do_rd = rd_en && (count_q != '0);

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr_q] <= {wr_last, wr_data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr_q  <= '0;
      rptr_q  <= '0;
      count_q <= '0;
    end else begin
      if (do_wr) wptr_q <= (32'(wptr_q) == DEPTH - 1) ? '0 : wptr_q + 1'b1;
      if (do_rd) rptr_q <= (32'(rptr_q) == DEPTH - 1) ? '0 : rptr_q + 1'b1;
      count_q <= count_q + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  assign {rd_last, rd_data} = mem[rptr_q];
  assign empty    = (count_q == '0);
  assign space_ok = (DEPTH - 32'(count_q)) >= MAX_PKT_FLITS;

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> (32'(count_q) < DEPTH));
endmodule
