// routing_table: per-input-block look-up table that maps a destination IP address to an
// output port of the router.
//
// There is one entry per IP in the network, so every router can route every IP's
// packets its own way, and the OS may rewrite the entries at run time. The read port is
// asynchronous so that the address decoding of a header takes one cycle (as a dual-port
// distributed RAM would); the write port is synchronous. Entries reset to port 0, which
// is this design's own choice: the tables are meant to be written before traffic starts.
//
// Interface: write (we, waddr, wdata) on clk; read raddr -> rdata combinationally.
module routing_table #(
  parameter int unsigned NIP = 9,   // number of IPs = number of entries
  parameter int unsigned NO  = 5,   // number of router outputs
  localparam int unsigned AW = (NIP > 1) ? $clog2(NIP) : 1,
  localparam int unsigned PW = (NO  > 1) ? $clog2(NO)  : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [PW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [PW-1:0] rdata
);
  logic [PW-1:0] table_q [NIP];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NIP; i++) table_q[i] <= '0;
    end else if (we && (32'(waddr) < NIP)) begin
      table_q[waddr] <= wdata;
    end
  end

  assign rdata = (32'(raddr) < NIP) ? table_q[raddr] : '0;
endmodule
