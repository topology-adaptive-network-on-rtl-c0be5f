// tb_router_fig4: the router shape of the structure figure - three inputs (north
// neighbour, IP1, IP2) and four outputs (north, south, IP1, IP2) - with small queues, so
// with unequal numbers of inputs and outputs; otherwise the same checks as tb_router.
// Phase 1: one packet into an idle router; its header must leave three cycles after it
//          arrived (one cycle routing, one arbitration, one through the output queue)
//          and the whole packet must arrive intact.
// Phase 2: every input sends random packets to random IPs; the routing table sends IP k
//          to output k % NO; receivers acknowledge after random delays. Each output
//          checks every flit against the packets expected from that source, in order.
//          Counts output contention (several inputs want one output) and packets that
//          had to wait in a queue; both must happen.
module tb_router_fig4;
  localparam int NI = 3, NO = 4, DW = 16, NIP = 8, DEPTH = 32, MAXP = 9, NPKT = 40;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0] in_req = '0, in_ack, in_last = '0;
  logic [NI-1:0][DW-1:0] in_data = '0;
  logic [NO-1:0] out_req, out_ack = '0, out_last;
  logic [NO-1:0][DW-1:0] out_data;
  logic cfg_we = 0, cfg_all = 0;
  logic [2:0] cfg_in = '0, cfg_port = '0;
  logic [2:0] cfg_ip = '0;
  int checks = 0, failures = 0, cycle = 0;
  int contention = 0, waited = 0, pkts_rx = 0;
  logic [DW:0] expq [NO][NI][$];
  bit src_done [NI];
  bit phase2 = 0;

  router #(.NI(NI), .NO(NO), .DATA_W(DW), .NIP(NIP), .DEPTH(DEPTH), .MAX_PKT_FLITS(MAXP)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  function automatic int route_of(int ip); return ip % NO; endfunction

  // sources
  for (genvar i = 0; i < NI; i++) begin : g_src
    task automatic send_pkt(input int dst, input int len);
      logic [DW:0] pkt [$];
      pkt.push_back({(len == 0), DW'(i << 8 | dst)});
      for (int f = 1; f <= len; f++) pkt.push_back({(f == len), DW'($urandom)});
      for (int e = 0; e < pkt.size(); e++) expq[route_of(dst)][i].push_back(pkt[e]);
      for (int f = 0; f < pkt.size(); ) begin
        bit x;
        in_req[i] = 1; {in_last[i], in_data[i]} = pkt[f];
        @(negedge clk); x = in_ack[i];
        @(posedge clk); #1;
        if (x) f++;
      end
      in_req[i] = 0; in_last[i] = 0;
    endtask
    initial begin
      wait (phase2);
      for (int n = 0; n < NPKT; n++) begin
        send_pkt($urandom_range(0, NIP - 1), $urandom_range(0, MAXP - 1));
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1;
      end
      src_done[i] = 1;
    end
  end

  // receivers and checkers
  for (genvar o = 0; o < NO; o++) begin : g_dst
    initial begin
      int src; bit busy; bit x; logic [DW:0] flit, exp;
      int delay;
      busy = 0; src = 0; delay = 0;
      forever begin
        @(negedge clk);
        x = out_req[o] && out_ack[o];
        flit = {out_last[o], out_data[o]};
        @(posedge clk); #1;
        if (x) begin
          if (!busy) src = int'(flit[DW-1:8]);
          busy = 1;
          checks++;
          if (src >= NI || expq[o][src].size() == 0) begin
            failures++; $display("out %0d: unexpected flit %h", o, flit);
          end else begin
            exp = expq[o][src].pop_front();
            if (flit !== exp) begin failures++; $display("out %0d src %0d: flit %h exp %h", o, src, flit, exp); end
          end
          if (flit[DW]) begin busy = 0; out_ack[o] = 0; pkts_rx++; end
        end else if (out_req[o] && !out_ack[o]) begin
          if (delay == 0) delay = phase2 ? $urandom_range(1, 6) : 1;
          delay--;
          if (delay == 0) out_ack[o] = 1;
        end
      end
    end
    always @(posedge clk) begin
      if ($countones(dut.g_out[o].u_out.arb_req) > 1) contention++;
    end
  end

  // packets that wait in an output queue: a header present but not yet acknowledged
  always @(posedge clk) if (phase2) for (int o = 0; o < NO; o++) if (out_req[o] && !out_ack[o]) waited++;

  task automatic cfg(input int ip, input int port);
    @(negedge clk); cfg_we = 1; cfg_all = 1; cfg_ip = 3'(ip); cfg_port = 3'(port);
    @(negedge clk); cfg_we = 0; cfg_all = 0;
  endtask

  int t_in = -1, t_out = -1;
  always @(posedge clk) begin
    if (rst_n && !phase2 && in_req[0]  && t_in  < 0) t_in  = cycle;
    if (rst_n && !phase2 && out_req[route_of(7)] && t_out < 0) t_out = cycle;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NIP; k++) cfg(k, route_of(k));
    // phase 1: latency through an idle router
    g_src[0].send_pkt(7, 4);         // IP 7 -> output 7 % NO
    wait (t_out >= 0);
    checks++;
    if (t_out - t_in != 3) begin failures++; $display("hop latency %0d, exp 3", t_out - t_in); end
    else $display("hop latency %0d cycles", t_out - t_in);
    repeat (20) @(posedge clk);
    phase2 = 1;
    wait (src_done.and() == 1);
    repeat (200) @(posedge clk);
    for (int o = 0; o < NO; o++) for (int i = 0; i < NI; i++) begin
      checks++;
      if (expq[o][i].size() != 0) begin failures++; $display("out %0d src %0d: %0d flits missing", o, i, expq[o][i].size()); end
    end
    checks++; if (pkts_rx != NI * NPKT + 1) begin failures++; $display("received %0d packets", pkts_rx); end
    checks++; if (contention == 0) begin failures++; $display("no output contention happened"); end
    checks++; if (waited == 0) begin failures++; $display("no packet waited in a queue"); end
    $display("contention cycles %0d, waiting cycles %0d, packets %0d", contention, waited, pkts_rx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
