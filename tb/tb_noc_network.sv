// tb_noc_network: the default 3 x 3 mesh network with short queues (depth 64, packets of
// at most 12 flits), driven directly at its IP links.
// Phase 1: routing tables are written with XY routes. Single packets on an idle network
//   measure the base latency from the cycle the source raises its request to the cycle
//   after the last flit reaches the destination (which acknowledges at once); it must
//   be 3 cycles per router passed plus the number of flits, for every source/destination
//   pair (1 to 5 routers).
// Phase 2: every IP sends random packets to random IPs while receivers acknowledge after
//   random delays; halfway through, the tables of all routers are rewritten to YX routes
//   while traffic flows (packets then take other paths). Every flit is checked, per
//   source, in order. Output contention and run-time table updates must both happen.
module tb_noc_network;
  import noc_pkg::*;
  localparam int W = 3, H = 3, NT = 9, DW = 16, DEPTH = 64, MAXP = 12, NPKT = 30, MAXPORT = 5;
  logic clk = 0, rst_n = 0;
  logic [NT-1:0] ip_in_req = '0, ip_in_ack, ip_in_last = '0;
  logic [NT-1:0][DW-1:0] ip_in_data = '0;
  logic [NT-1:0] ip_out_req, ip_out_ack, ip_out_last;
  logic [NT-1:0][DW-1:0] ip_out_data;
  logic [NT-1:0] cfg_we = '0, cfg_all = '0;
  logic [NT-1:0][2:0] cfg_in = '0, cfg_port = '0;
  logic [NT-1:0][3:0] cfg_ip = '0;
  logic [NT-1:0] ack_q = '0;
  bit comb_ack = 1;
  int checks = 0, failures = 0, cycle = 0, contention = 0, table_updates = 0, pkts_rx = 0;
  logic [DW:0] expq [NT][NT][$];
  bit done [NT];
  bit phase2 = 0;

  noc_network #(.DATA_W(DW), .DEPTH(DEPTH), .MAX_PKT_FLITS(MAXP)) dut (.*);
  assign ip_out_ack = comb_ack ? ip_out_req : ack_q;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int route(int r, int d, bit yx);
    int x = r % W, y = r / W, dx = d % W, dy = d / W;
    if (!yx || dy == y) begin
      if (dx > x) return mesh_dir_port(W, H, x, y, DIR_E);
      if (dx < x) return mesh_dir_port(W, H, x, y, DIR_W);
    end
    if (dy > y) return mesh_dir_port(W, H, x, y, DIR_S);
    if (dy < y) return mesh_dir_port(W, H, x, y, DIR_N);
    if (dx > x) return mesh_dir_port(W, H, x, y, DIR_E);
    if (dx < x) return mesh_dir_port(W, H, x, y, DIR_W);
    return 0;
  endfunction

  task automatic load_tables(input bit yx);
    for (int d = 0; d < NT; d++) begin
      @(negedge clk);
      for (int r = 0; r < NT; r++) begin
        cfg_we[r] = 1; cfg_all[r] = 1; cfg_ip[r] = 4'(d); cfg_port[r] = 3'(route(r, d, yx));
      end
      @(negedge clk);
      cfg_we = '0; cfg_all = '0;
    end
  endtask

  for (genvar s = 0; s < NT; s++) begin : g_src
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
      wait (phase2);
      for (int n = 0; n < NPKT; n++) begin
        send_pkt($urandom_range(0, NT - 1), $urandom_range(0, MAXP - 1));
        repeat ($urandom_range(0, 6)) @(posedge clk);
        #1;
      end
      done[s] = 1;
    end
  end

  // receivers
  int last_rx_cycle [NT];
  for (genvar d = 0; d < NT; d++) begin : g_dst
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
          if (src >= NT || expq[d][src].size() == 0) begin
            failures++; $display("IP %0d: unexpected flit %h", d, flit);
          end else begin
            e = expq[d][src].pop_front();
            if (flit !== e) begin failures++; $display("IP %0d from %0d: flit %h exp %h", d, src, flit, e); end
          end
          if (flit[DW]) begin busy = 0; ack_q[d] = 0; pkts_rx++; last_rx_cycle[d] = cycle; end
        end else if (ip_out_req[d] && !ack_q[d]) begin
          if (delay == 0) delay = $urandom_range(1, 8);
          delay--;
          if (delay == 0) ack_q[d] = 1;
        end
      end
    end
  end

  always @(posedge clk)
    for (int r = 0; r < NT; r++)
      for (int o = 0; o < MAXPORT; o++)
        if (phase2 && dut.rout_req[r][o] && !dut.rout_ack[r][o] && dut.rin_ack != '0) contention++;

  initial begin
    int t0, nrouters, len, lat, n_before;
    repeat (3) @(posedge clk);
    rst_n = 1;
    load_tables(0);
    // phase 1: base latency for every pair
    for (int s = 0; s < NT; s++)
      for (int d = 0; d < NT; d++) begin
        len = $urandom_range(0, MAXP - 1);
        nrouters = 1 + ((s % W > d % W) ? s % W - d % W : d % W - s % W)
                     + ((s / W > d / W) ? s / W - d / W : d / W - s / W);
        @(negedge clk);
        t0 = cycle;
        n_before = pkts_rx;
        case (s)
          0: g_src[0].send_pkt(d, len);  1: g_src[1].send_pkt(d, len);
          2: g_src[2].send_pkt(d, len);  3: g_src[3].send_pkt(d, len);
          4: g_src[4].send_pkt(d, len);  5: g_src[5].send_pkt(d, len);
          6: g_src[6].send_pkt(d, len);  7: g_src[7].send_pkt(d, len);
          default: g_src[8].send_pkt(d, len);
        endcase
        wait (pkts_rx == n_before + 1);
        lat = last_rx_cycle[d] - t0;
        checks++;
        if (lat != 3 * nrouters + len + 1) begin
          failures++; $display("%0d->%0d: latency %0d, exp %0d", s, d, lat, 3 * nrouters + len + 1);
        end
        repeat (3) @(posedge clk);
      end
    $display("base latency = 3 x routers + flits checked for all %0d pairs", NT * NT);
    // phase 2: random traffic, run-time table rewrite
    comb_ack = 0;
    phase2 = 1;
    repeat (1500) @(posedge clk);
    load_tables(1);
    table_updates++;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6] && done[7] && done[8]);
    repeat (1000) @(posedge clk);
    for (int d = 0; d < NT; d++) for (int s = 0; s < NT; s++) begin
      checks++;
      if (expq[d][s].size() != 0) begin failures++; $display("%0d->%0d: %0d flits missing", s, d, expq[d][s].size()); end
    end
    checks++; if (pkts_rx != NT * NT + NT * NPKT) begin failures++; $display("received %0d packets", pkts_rx); end
    checks++; if (contention == 0) begin failures++; $display("no contention"); end
    checks++; if (table_updates == 0) begin failures++; $display("no table update"); end
    $display("packets %0d, contention cycles %0d", pkts_rx, contention);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
