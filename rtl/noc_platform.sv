// noc_platform: the reference platform's network: a MESH_W x MESH_H mesh of data
// routers, each tile with a data NIC and a control NIC.
//
// Tiles are numbered row by row from the top left (tile 3, left of the middle row, is the
// one through which the main processor reaches the network; it is an ordinary tile here).
// Every tile's IP sees a flit-stream send port and a flit-stream receive port in its own
// clock (ip_clk[t]), through the data NIC's dual-clock buffers; the data NIC also limits
// the IP's injection rate and counts messages sent, received and blocked. The control
// network is not part of this design: each tile's control NIC register port (ctl_*[t],
// network clock) is brought out, and through it the OS programs the routing tables of
// the tile's router, sets the injection rate and reads the statistics.
//
// A packet is a header flit whose low bits hold the destination tile, followed by payload
// flits, the final one marked by *_last. Routing tables reset to port 0 and must be
// written before traffic flows. With nothing blocking, the header needs three network
// cycles per router. The 3 x 3 mesh, the NIC/router pairing and the parameters follow the
// platform description; the IP and control port layouts are this design's own.
module noc_platform
  import noc_pkg::*;
#(
  parameter int unsigned MESH_W        = 3,
  parameter int unsigned MESH_H        = 3,
  parameter int unsigned DATA_W        = DEF_DATA_W,
  parameter int unsigned DEPTH         = DEF_QUEUE_DEPTH,   // router output queue, flits
  parameter int unsigned NIC_DEPTH     = 1024,   // NIC buffers, flits (power of two)
  parameter int unsigned MAX_PKT_FLITS = DEF_MAX_PKT_FLITS,
  localparam int unsigned NT = MESH_W * MESH_H
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic [NT-1:0]             ip_clk,
  input  logic [NT-1:0]             ip_rst_n,
  // IP send ports
  input  logic [NT-1:0]             ip_tx_valid,
  output logic [NT-1:0]             ip_tx_ready,
  input  logic [NT-1:0][DATA_W-1:0] ip_tx_data,
  input  logic [NT-1:0]             ip_tx_last,
  // IP receive ports
  output logic [NT-1:0]             ip_rx_valid,
  input  logic [NT-1:0]             ip_rx_ready,
  output logic [NT-1:0][DATA_W-1:0] ip_rx_data,
  output logic [NT-1:0]             ip_rx_last,
  // control-network register ports
  input  logic [NT-1:0]             ctl_we,
  input  logic [NT-1:0][3:0]        ctl_addr,
  input  logic [NT-1:0][31:0]       ctl_wdata,
  output logic [NT-1:0][31:0]       ctl_rdata
);
  localparam int unsigned MAXP = 5;
  localparam int unsigned AW   = (NT > 1) ? $clog2(NT) : 1;
  localparam int unsigned PW   = $clog2(MAXP);

  logic [NT-1:0]             n_in_req, n_in_ack, n_in_last, n_out_req, n_out_ack, n_out_last;
  logic [NT-1:0][DATA_W-1:0] n_in_data, n_out_data;
  logic [NT-1:0]             cfg_we, cfg_all;
  logic [NT-1:0][PW-1:0]     cfg_in, cfg_port;
  logic [NT-1:0][AW-1:0]     cfg_ip;

  noc_network #(
    .NR(NT), .NIP(NT), .MAXP(MAXP), .DATA_W(DATA_W), .DEPTH(DEPTH),
    .MAX_PKT_FLITS(MAX_PKT_FLITS),
    .R_NIN (mesh_nports(MESH_W, MESH_H)),
    .R_NOUT(mesh_nports(MESH_W, MESH_H)),
    .TOPO  (mesh_topo(MESH_W, MESH_H)),
    .IP_RTR(mesh_ip_router(MESH_W, MESH_H)),
    .IP_PORT('0)
  ) u_net (
    .clk, .rst_n,
    .ip_in_req (n_in_req),  .ip_in_ack (n_in_ack),  .ip_in_data (n_in_data),  .ip_in_last (n_in_last),
    .ip_out_req(n_out_req), .ip_out_ack(n_out_ack), .ip_out_data(n_out_data), .ip_out_last(n_out_last),
    .cfg_we, .cfg_all, .cfg_in, .cfg_ip, .cfg_port
  );

  for (genvar t = 0; t < NT; t++) begin : g_tile
    logic [15:0] inj_limit, inj_window;
    logic        stats_clr;
    logic [31:0] cnt_sent, cnt_recv, cnt_blocked;

    data_nic #(.DATA_W(DATA_W), .DEPTH(NIC_DEPTH), .MAX_PKT_FLITS(MAX_PKT_FLITS)) u_dnic (
      .clk, .rst_n,
      .ip_clk     (ip_clk[t]),
      .ip_rst_n   (ip_rst_n[t]),
      .ip_tx_valid(ip_tx_valid[t]), .ip_tx_ready(ip_tx_ready[t]),
      .ip_tx_data (ip_tx_data[t]),  .ip_tx_last (ip_tx_last[t]),
      .ip_rx_valid(ip_rx_valid[t]), .ip_rx_ready(ip_rx_ready[t]),
      .ip_rx_data (ip_rx_data[t]),  .ip_rx_last (ip_rx_last[t]),
      .net_tx_req (n_in_req[t]),  .net_tx_ack (n_in_ack[t]),
      .net_tx_data(n_in_data[t]), .net_tx_last(n_in_last[t]),
      .net_rx_req (n_out_req[t]),  .net_rx_ack (n_out_ack[t]),
      .net_rx_data(n_out_data[t]), .net_rx_last(n_out_last[t]),
      .inj_limit, .inj_window, .stats_clr,
      .cnt_sent, .cnt_recv, .cnt_blocked
    );

    control_nic #(.AW(AW), .PW(PW), .IW(PW)) u_cnic (
      .clk, .rst_n,
      .ctl_we   (ctl_we[t]),
      .ctl_addr (ctl_addr[t]),
      .ctl_wdata(ctl_wdata[t]),
      .ctl_rdata(ctl_rdata[t]),
      .cfg_we   (cfg_we[t]),
      .cfg_all  (cfg_all[t]),
      .cfg_in   (cfg_in[t]),
      .cfg_ip   (cfg_ip[t]),
      .cfg_port (cfg_port[t]),
      .inj_limit, .inj_window, .stats_clr,
      .cnt_sent, .cnt_recv, .cnt_blocked
    );
  end
endmodule
