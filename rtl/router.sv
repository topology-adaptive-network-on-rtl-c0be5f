// router: data-network router with NI input blocks and NO output blocks.
//
// Input blocks (each with its own routing table) feed a single-stage crossbar; every
// output block has an arbiter and a packet queue. The numbers of inputs and outputs are
// independent parameters, so routers for irregular topologies and for several attached
// IPs can be built from the same module; ports to routers and ports to IPs are identical.
// Switching is virtual cut-through with packet-level flow control over request/acknowledge
// links (see noc_pkg). A header takes three cycles per hop when nothing blocks it: one to
// route, one to be granted, one through the output queue.
//
// Routing tables are written through the cfg port: cfg_all writes the entry cfg_ip of
// every input's table, otherwise only that of input cfg_in. The structure follows the
// router description and its figure of a router with input blocks, crossbar and output
// blocks; the configuration port layout is this design's own.
module router #(
  parameter int unsigned NI            = 5,
  parameter int unsigned NO            = 5,
  parameter int unsigned DATA_W        = 16,
  parameter int unsigned NIP           = 9,
  parameter int unsigned DEPTH         = 1024,
  parameter int unsigned MAX_PKT_FLITS = 273,
  localparam int unsigned AW  = (NIP > 1) ? $clog2(NIP) : 1,
  localparam int unsigned PW  = (NO  > 1) ? $clog2(NO)  : 1,
  localparam int unsigned IW  = (NI  > 1) ? $clog2(NI)  : 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // input links
  input  logic [NI-1:0]              in_req,
  output logic [NI-1:0]              in_ack,
  input  logic [NI-1:0][DATA_W-1:0]  in_data,
  input  logic [NI-1:0]              in_last,
  // output links
  output logic [NO-1:0]              out_req,
  input  logic [NO-1:0]              out_ack,
  output logic [NO-1:0][DATA_W-1:0]  out_data,
  output logic [NO-1:0]              out_last,
  // routing table configuration
  input  logic                   cfg_we,
  input  logic                   cfg_all,
  input  logic [IW-1:0]          cfg_in,
  input  logic [AW-1:0]          cfg_ip,
  input  logic [PW-1:0]          cfg_port
);
  localparam int unsigned XW = DATA_W + 2;   // valid, last, data

  logic [NI-1:0][NO-1:0] req_by_in;
  logic [NO-1:0][NI-1:0] req_by_out, gnt_by_out;
  logic [NI-1:0][NO-1:0] gnt_by_in;
  logic [NI-1:0][XW-1:0] xb_in;
  logic [NO-1:0][XW-1:0] xb_out;

  always_comb begin
    for (int i = 0; i < NI; i++)
      for (int o = 0; o < NO; o++) begin
        req_by_out[o][i] = req_by_in[i][o];
        gnt_by_in[i][o]  = gnt_by_out[o][i];
      end
  end

  for (genvar i = 0; i < NI; i++) begin : g_in
    logic xv, xl;
    logic [DATA_W-1:0] xd;
    input_block #(.NO(NO), .DATA_W(DATA_W), .NIP(NIP)) u_in (
      .clk, .rst_n,
      .in_req  (in_req[i]),
      .in_ack  (in_ack[i]),
      .in_data (in_data[i]),
      .in_last (in_last[i]),
      .rt_we   (cfg_we && (cfg_all || (32'(cfg_in) == i))),
      .rt_addr (cfg_ip),
      .rt_port (cfg_port),
      .arb_req (req_by_in[i]),
      .arb_gnt (gnt_by_in[i]),
      .xb_valid(xv),
      .xb_data (xd),
      .xb_last (xl)
    );
    assign xb_in[i] = {xv, xl, xd};
  end

  crossbar #(.NI(NI), .NO(NO), .W(XW)) u_xbar (
    .in_flit (xb_in),
    .sel     (gnt_by_out),
    .out_flit(xb_out)
  );

  for (genvar o = 0; o < NO; o++) begin : g_out
    output_block #(.NI(NI), .DATA_W(DATA_W), .DEPTH(DEPTH), .MAX_PKT_FLITS(MAX_PKT_FLITS)) u_out (
      .clk, .rst_n,
      .arb_req (req_by_out[o]),
      .arb_gnt (gnt_by_out[o]),
      .wr_en   (xb_out[o][XW-1]),
      .wr_last (xb_out[o][XW-2]),
      .wr_data (xb_out[o][DATA_W-1:0]),
      .out_req (out_req[o]),
      .out_ack (out_ack[o]),
      .out_data(out_data[o]),
      .out_last(out_last[o])
    );
  end
endmodule
