// noc_network: a data network of routers built from a topology table.
//
// NR routers and NIP IPs are joined as the parameters say: R_NPORTS[r] gives the number
// of inputs and R_NOUT[r] the number of outputs of router r, TOPO[r][o] names what output
// o of router r drives (an input port of another router, an IP, or nothing), and IP k
// enters the network at input port IP_PORT[k] of router IP_RTR[k]. Any topology, regular
// or not, with any number of IPs per router, is described this way; the defaults give the
// 3 x 3 mesh of the reference platform (see noc_pkg for the port order). Every link is a
// request/acknowledge link as described in noc_pkg; an unconnected output is never
// acknowledged, and every router input must be fed by exactly one router output or IP.
//
// Each router has its own routing-table configuration port (cfg_*[r]). A packet's header
// needs three cycles per router when nothing blocks it. Passing the topology as a
// two-dimensional table follows the network description; the table format is this
// design's own.
module noc_network
  import noc_pkg::*;
#(
  parameter int unsigned NR            = 9,
  parameter int unsigned NIP           = 9,
  parameter int unsigned MAXP          = 5,
  parameter int unsigned DATA_W        = 16,
  parameter int unsigned DEPTH         = 1024,
  parameter int unsigned MAX_PKT_FLITS = 273,
  parameter byte_arr_t   R_NIN         = mesh_nports(3, 3),
  parameter byte_arr_t   R_NOUT        = mesh_nports(3, 3),
  parameter topo_t       TOPO          = mesh_topo(3, 3),
  parameter byte_arr_t   IP_RTR        = mesh_ip_router(3, 3),
  parameter byte_arr_t   IP_PORT       = '0,
  localparam int unsigned AW = (NIP  > 1) ? $clog2(NIP)  : 1,
  localparam int unsigned PW = (MAXP > 1) ? $clog2(MAXP) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // links from the IPs into the network
  input  logic [NIP-1:0]              ip_in_req,
  output logic [NIP-1:0]              ip_in_ack,
  input  logic [NIP-1:0][DATA_W-1:0]  ip_in_data,
  input  logic [NIP-1:0]              ip_in_last,
  // links from the network to the IPs
  output logic [NIP-1:0]              ip_out_req,
  input  logic [NIP-1:0]              ip_out_ack,
  output logic [NIP-1:0][DATA_W-1:0]  ip_out_data,
  output logic [NIP-1:0]              ip_out_last,
  // routing-table configuration, one port per router
  input  logic [NR-1:0]               cfg_we,
  input  logic [NR-1:0]               cfg_all,
  input  logic [NR-1:0][PW-1:0]       cfg_in,
  input  logic [NR-1:0][AW-1:0]       cfg_ip,
  input  logic [NR-1:0][PW-1:0]       cfg_port
);
  // router-side link arrays, MAXP wide; routers with fewer ports use the low slots
  logic [NR-1:0][MAXP-1:0]             rin_req, rin_ack, rin_last;
  logic [NR-1:0][MAXP-1:0][DATA_W-1:0] rin_data;
  logic [NR-1:0][MAXP-1:0]             rout_req, rout_ack, rout_last;
  logic [NR-1:0][MAXP-1:0][DATA_W-1:0] rout_data;

  for (genvar r = 0; r < NR; r++) begin : g_rtr
    localparam int unsigned NI = int'(R_NIN[r]);
    localparam int unsigned NO = int'(R_NOUT[r]);
    localparam int unsigned IW = (NI > 1) ? $clog2(NI) : 1;
    localparam int unsigned OW = (NO > 1) ? $clog2(NO) : 1;
    router #(.NI(NI), .NO(NO), .DATA_W(DATA_W), .NIP(NIP), .DEPTH(DEPTH),
             .MAX_PKT_FLITS(MAX_PKT_FLITS)) u_router (
      .clk, .rst_n,
      .in_req   (rin_req  [r][NI-1:0]),
      .in_ack   (rin_ack  [r][NI-1:0]),
      .in_data  (rin_data [r][NI-1:0]),
      .in_last  (rin_last [r][NI-1:0]),
      .out_req  (rout_req [r][NO-1:0]),
      .out_ack  (rout_ack [r][NO-1:0]),
      .out_data (rout_data[r][NO-1:0]),
      .out_last (rout_last[r][NO-1:0]),
      .cfg_we   (cfg_we[r]),
      .cfg_all  (cfg_all[r]),
      .cfg_in   (IW'(cfg_in[r])),
      .cfg_ip   (cfg_ip[r]),
      .cfg_port (OW'(cfg_port[r]))
    );
    if (NI < MAXP) begin : g_pad_in
      assign rin_ack[r][MAXP-1:NI] = '0;
    end
    if (NO < MAXP) begin : g_pad_out
      assign rout_req [r][MAXP-1:NO] = '0;
      assign rout_data[r][MAXP-1:NO] = '0;
      assign rout_last[r][MAXP-1:NO] = '0;
    end
  end

  // forward direction: requests, flits, last marks
  always_comb begin
    rin_req     = '0;
    rin_data    = '0;
    rin_last    = '0;
    ip_out_req  = '0;
    ip_out_data = '0;
    ip_out_last = '0;
    for (int r = 0; r < NR; r++)
      for (int o = 0; o < MAXP; o++)
        if (o < int'(R_NOUT[r])) begin
          if (TOPO[r][o].kind == DST_ROUTER) begin
            rin_req [int'(TOPO[r][o].idx)][int'(TOPO[r][o].port)] = rout_req [r][o];
            rin_data[int'(TOPO[r][o].idx)][int'(TOPO[r][o].port)] = rout_data[r][o];
            rin_last[int'(TOPO[r][o].idx)][int'(TOPO[r][o].port)] = rout_last[r][o];
          end else if (TOPO[r][o].kind == DST_IP) begin
            ip_out_req [int'(TOPO[r][o].idx)] = rout_req [r][o];
            ip_out_data[int'(TOPO[r][o].idx)] = rout_data[r][o];
            ip_out_last[int'(TOPO[r][o].idx)] = rout_last[r][o];
          end
        end
    for (int k = 0; k < NIP; k++) begin
      rin_req [int'(IP_RTR[k])][int'(IP_PORT[k])] = ip_in_req[k];
      rin_data[int'(IP_RTR[k])][int'(IP_PORT[k])] = ip_in_data[k];
      rin_last[int'(IP_RTR[k])][int'(IP_PORT[k])] = ip_in_last[k];
    end
  end

  // backward direction: acknowledges
  always_comb begin
    rout_ack  = '0;
    ip_in_ack = '0;
    for (int r = 0; r < NR; r++)
      for (int o = 0; o < MAXP; o++)
        if (o < int'(R_NOUT[r])) begin
          if (TOPO[r][o].kind == DST_ROUTER)
            rout_ack[r][o] = rin_ack[int'(TOPO[r][o].idx)][int'(TOPO[r][o].port)];
          else if (TOPO[r][o].kind == DST_IP)
            rout_ack[r][o] = ip_out_ack[int'(TOPO[r][o].idx)];
        end
    for (int k = 0; k < NIP; k++)
      ip_in_ack[k] = rin_ack[int'(IP_RTR[k])][int'(IP_PORT[k])];
  end
endmodule
