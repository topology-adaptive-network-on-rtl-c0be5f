// data_nic: data network interface between an IP and its data router.
//
// Send path (IP clock -> network clock): the IP writes flits with a last-flit mark into
// the write-router buffer, a dual-clock FIFO. When a whole packet is stored and the
// injection rate controller allows it, the NIC raises `net_tx_req` with the header and,
// once the router acknowledges, sends one flit per cycle up to the last. The output stats
// collector counts the packets sent.
//
// Receive path (network clock -> IP clock): when the router raises `net_rx_req` the NIC
// acknowledges at once (same cycle) if the read-router buffer has room for a maximum-size
// packet; the flits are then written one per cycle and the IP reads them in its own clock
// as soon as they arrive. The input stats collector counts packets received and packets
// blocked, a packet being blocked when its request meets a buffer without room and so
// has to wait in the router.
//
// The OS sets the injection rate (inj_limit packets per inj_window cycles) and reads and
// clears the counters through the control NIC. The parts and their roles follow the
// interface description and its figure; the exact counting points and the rate mechanism
// are this design's own.
module data_nic #(
  parameter int unsigned DATA_W        = 16,
  parameter int unsigned DEPTH         = 1024,
  parameter int unsigned MAX_PKT_FLITS = 273
) (
  input  logic              clk,        // network clock
  input  logic              rst_n,
  input  logic              ip_clk,
  input  logic              ip_rst_n,
  // IP send side (ip_clk)
  input  logic              ip_tx_valid,
  output logic              ip_tx_ready,
  input  logic [DATA_W-1:0] ip_tx_data,
  input  logic              ip_tx_last,
  // IP receive side (ip_clk)
  output logic              ip_rx_valid,
  input  logic              ip_rx_ready,
  output logic [DATA_W-1:0] ip_rx_data,
  output logic              ip_rx_last,
  // link to the router input
  output logic              net_tx_req,
  input  logic              net_tx_ack,
  output logic [DATA_W-1:0] net_tx_data,
  output logic              net_tx_last,
  // link from the router output
  input  logic              net_rx_req,
  output logic              net_rx_ack,
  input  logic [DATA_W-1:0] net_rx_data,
  input  logic              net_rx_last,
  // control (network clock)
  input  logic [15:0]       inj_limit,
  input  logic [15:0]       inj_window,
  input  logic              stats_clr,
  output logic [31:0]       cnt_sent,
  output logic [31:0]       cnt_recv,
  output logic [31:0]       cnt_blocked
);
  localparam int unsigned AW = $clog2(DEPTH);

  // ---------------- write router, injection rate control ----------------
  logic tx_empty, tx_pkt, tx_full, tx_busy_q, allow, tx_start, tx_xfer;
  logic [AW:0] tx_free_unused;

  async_fifo #(.W(DATA_W + 1), .DEPTH(DEPTH)) u_wr_buf (
    .wclk(ip_clk), .wrst_n(ip_rst_n),
    .wr_en(ip_tx_valid), .wdata({ip_tx_last, ip_tx_data}), .wfull(tx_full), .wr_free(tx_free_unused),
    .rclk(clk), .rrst_n(rst_n),
    .rd_en(tx_xfer), .rdata({net_tx_last, net_tx_data}), .rempty(tx_empty), .rpkt_avail(tx_pkt)
  );
  assign ip_tx_ready = !tx_full;

  injection_rate_ctrl #(.CW(16)) u_irc (
    .clk, .rst_n,
    .limit(inj_limit), .window(inj_window),
    .pkt_start(tx_start), .allow(allow)
  );

  // The packet count and the write pointer cross the clock boundary on separate
  // synchronisers and may arrive a cycle apart; requiring !tx_empty as well means even a
  // one-flit packet is visible before it is offered.
  assign tx_start   = !tx_busy_q && tx_pkt && !tx_empty && allow;
  assign net_tx_req = tx_busy_q || tx_start;
  assign tx_xfer    = net_tx_req && net_tx_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                        tx_busy_q <= 1'b0;
    else if (tx_xfer && net_tx_last)   tx_busy_q <= 1'b0;
    else if (tx_start)                 tx_busy_q <= 1'b1;
  end

  // Packet-level flow control: once offered, a packet must never find the buffer dry.
  a_tx_gapless: assert property (@(posedge clk) disable iff (!rst_n) net_tx_req |-> !tx_empty)
    else $error("data_nic: write router ran dry inside a packet");

  stats_counter #(.CW(32)) u_out_stats (
    .clk, .rst_n, .clr(stats_clr), .inc(tx_xfer && net_tx_last), .count(cnt_sent));

  // ---------------- read router, input stats ----------------
  logic rx_busy_q, rx_blk_q, rx_empty, rx_full_unused, rx_pkt_unused, rx_space, rx_xfer;
  logic [AW:0] rx_free;

  async_fifo #(.W(DATA_W + 1), .DEPTH(DEPTH)) u_rd_buf (
    .wclk(clk), .wrst_n(rst_n),
    .wr_en(rx_xfer), .wdata({net_rx_last, net_rx_data}), .wfull(rx_full_unused), .wr_free(rx_free),
    .rclk(ip_clk), .rrst_n(ip_rst_n),
    .rd_en(ip_rx_ready), .rdata({ip_rx_last, ip_rx_data}), .rempty(rx_empty), .rpkt_avail(rx_pkt_unused)
  );
  assign ip_rx_valid = !rx_empty;

  assign rx_space   = 32'(rx_free) >= MAX_PKT_FLITS;
  assign net_rx_ack = net_rx_req && (rx_busy_q || rx_space);
  assign rx_xfer    = net_rx_req && net_rx_ack;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_busy_q <= 1'b0;
      rx_blk_q  <= 1'b0;
    end else begin
      if (rx_xfer && net_rx_last) rx_busy_q <= 1'b0;
      else if (rx_xfer)           rx_busy_q <= 1'b1;
      // remember that the waiting packet has been counted as blocked
      if (rx_xfer)                               rx_blk_q <= 1'b0;
      else if (net_rx_req && !rx_busy_q)         rx_blk_q <= 1'b1;
    end
  end

  stats_counter #(.CW(32)) u_in_recv (
    .clk, .rst_n, .clr(stats_clr), .inc(rx_xfer && net_rx_last), .count(cnt_recv));
  stats_counter #(.CW(32)) u_in_blocked (
    .clk, .rst_n, .clr(stats_clr), .inc(net_rx_req && !rx_busy_q && !rx_space && !rx_blk_q),
    .count(cnt_blocked));
endmodule
