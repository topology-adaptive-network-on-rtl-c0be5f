// topo_runner: testbench helper that builds one noc_network from a topology table and
// runs random traffic through it.
//
// Routing tables are filled with shortest-path routes worked out here from the topology
// table (distances to each destination router by repeated relaxation, then for every
// router the first output leading one step closer). Every IP then sends NPKT random
// packets to random IPs; receivers acknowledge after random delays and check every flit,
// per source, in order. The number of unidirectional links (router-router and
// router-IP) is counted from the table; at 16 bits x 50 MHz each carries 100 Mbyte/s.
// `finished` rises when all packets arrived or after a time-out; checks and failures
// are reported on the ports.
module topo_runner
  import noc_pkg::*;
#(
  parameter string       NAME    = "mesh",
  parameter int unsigned NR      = 16,
  parameter int unsigned NIP     = 16,
  parameter int unsigned MAXP    = 5,
  parameter byte_arr_t   R_NIN   = mesh_nports(4, 4),
  parameter byte_arr_t   R_NOUT  = mesh_nports(4, 4),
  parameter topo_t       TOPO    = mesh_topo(4, 4),
  parameter byte_arr_t   IP_RTR  = ident_arr(16),
  parameter byte_arr_t   IP_PORT = '0,
  parameter int unsigned NPKT    = 12
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output bit   finished
);
  localparam int DW = 16, DEPTH = 64, MAXF = 12;
  localparam int AW = (NIP > 1) ? $clog2(NIP) : 1;
  localparam int PW = (MAXP > 1) ? $clog2(MAXP) : 1;

  logic [NIP-1:0] ip_in_req = '0, ip_in_ack, ip_in_last = '0;
  logic [NIP-1:0][DW-1:0] ip_in_data = '0;
  logic [NIP-1:0] ip_out_req, ip_out_ack = '0, ip_out_last;
  logic [NIP-1:0][DW-1:0] ip_out_data;
  logic [NR-1:0] cfg_we = '0, cfg_all = '0;
  logic [NR-1:0][PW-1:0] cfg_in = '0, cfg_port = '0;
  logic [NR-1:0][AW-1:0] cfg_ip = '0;
  logic [DW:0] expq [NIP][NIP][$];
  int pkts_rx = 0, hops_total = 0;
  bit go = 0;

  noc_network #(.NR(NR), .NIP(NIP), .MAXP(MAXP), .DATA_W(DW), .DEPTH(DEPTH), .MAX_PKT_FLITS(MAXF),
                .R_NIN(R_NIN), .R_NOUT(R_NOUT), .TOPO(TOPO), .IP_RTR(IP_RTR), .IP_PORT(IP_PORT)) dut (.*);

  // distance in routers from router r to router t
  function automatic int rdist(int r, int t);
    int d [NR];
    for (int k = 0; k < NR; k++) d[k] = (k == t) ? 0 : 1000;
    for (int it = 0; it < NR; it++)
      for (int k = 0; k < NR; k++)
        for (int o = 0; o < int'(R_NOUT[k]); o++)
          if (TOPO[k][o].kind == DST_ROUTER && d[TOPO[k][o].idx] + 1 < d[k]) d[k] = d[TOPO[k][o].idx] + 1;
    return d[r];
  endfunction

  function automatic int next_port(int r, int ip);
    int t = int'(IP_RTR[ip]);
    if (r == t) begin
      for (int o = 0; o < int'(R_NOUT[r]); o++)
        if (TOPO[r][o].kind == DST_IP && int'(TOPO[r][o].idx) == ip) return o;
    end else begin
      for (int o = 0; o < int'(R_NOUT[r]); o++)
        if (TOPO[r][o].kind == DST_ROUTER && rdist(int'(TOPO[r][o].idx), t) == rdist(r, t) - 1) return o;
    end
    return 0;
  endfunction

  int links;
  initial begin
    links = 2 * NIP;
    for (int r = 0; r < NR; r++)
      for (int o = 0; o < int'(R_NOUT[r]); o++)
        if (TOPO[r][o].kind == DST_ROUTER) links++;
  end

  for (genvar s = 0; s < NIP; s++) begin : g_src
    task automatic send_pkt(input int dst, input int len);
      logic [DW:0] pkt [$];
      pkt.push_back({(len == 0), DW'(s << 8 | dst)});
      for (int f = 1; f <= len; f++) pkt.push_back({(f == len), DW'($urandom)});
      for (int e = 0; e < pkt.size(); e++) expq[dst][s].push_back(pkt[e]);
      for (int f = 0; f < pkt.size(); ) begin
        bit x;
        ip_in_req[s] = 1; {ip_in_last[s], ip_in_data[s]} = pkt[f];
        @(negedge clk); x = ip_in_ack[s];
        @(posedge clk); #1;
        if (x) f++;
      end
      ip_in_req[s] = 0; ip_in_last[s] = 0;
    endtask
    initial begin
      wait (go);
      for (int n = 0; n < NPKT; n++) begin
        automatic int d = $urandom_range(0, NIP - 1);
        hops_total += rdist(int'(IP_RTR[s]), int'(IP_RTR[d])) + 1;
        send_pkt(d, $urandom_range(0, MAXF - 1));
        repeat ($urandom_range(0, 6)) @(posedge clk);
        #1;
      end
    end
  end

  for (genvar d = 0; d < NIP; d++) begin : g_dst
    initial begin
      int src; bit busy, x; logic [DW:0] flit, e; int delay;
      busy = 0; src = 0; delay = 0;
      forever begin
        @(negedge clk);
        x = ip_out_req[d] && ip_out_ack[d];
        flit = {ip_out_last[d], ip_out_data[d]};
        @(posedge clk); #1;
        if (x) begin
          if (!busy) src = int'(flit[DW-1:8]);
          busy = 1;
          checks++;
          if (src >= NIP || expq[d][src].size() == 0) begin
            failures++; $display("%s IP %0d: unexpected flit %h", NAME, d, flit);
          end else begin
            e = expq[d][src].pop_front();
            if (flit !== e) begin failures++; $display("%s IP %0d from %0d: flit %h exp %h", NAME, d, src, flit, e); end
          end
          if (flit[DW]) begin busy = 0; ip_out_ack[d] = 0; pkts_rx++; end
        end else if (ip_out_req[d] && !ip_out_ack[d]) begin
          if (delay == 0) delay = $urandom_range(1, 4);
          delay--;
          if (delay == 0) ip_out_ack[d] = 1;
        end
      end
    end
  end

  initial begin
    int t0;
    checks = 0; failures = 0; finished = 0;
    wait (rst_n);
    for (int ip = 0; ip < NIP; ip++) begin
      @(negedge clk);
      for (int r = 0; r < NR; r++) begin
        cfg_we[r] = 1; cfg_all[r] = 1; cfg_ip[r] = AW'(ip); cfg_port[r] = PW'(next_port(r, ip));
      end
      @(negedge clk);
      cfg_we = '0; cfg_all = '0;
    end
    t0 = $time;
    go = 1;
    fork
      wait (pkts_rx == NIP * NPKT);
      #2000000;
    join_any
    checks++;
    if (pkts_rx != NIP * NPKT) begin failures++; $display("%s: %0d of %0d packets arrived", NAME, pkts_rx, NIP * NPKT); end
    $display("%-8s routers %2d, links %3d (%0d Mbyte/s at 100 Mbyte/s each), mean routers per packet %0.2f, %0d packets in %0d cycles",
             NAME, NR, links, links * 100, real'(hops_total) / (NIP * NPKT), pkts_rx, ($time - t0) / 10);
    finished = 1;
  end
endmodule
