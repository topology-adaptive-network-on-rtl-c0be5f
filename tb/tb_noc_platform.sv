// tb_noc_platform: end-to-end test of the platform at its default size: 3 x 3 mesh,
// 16-bit flits, 1024-flit router queues and NIC buffers, packets of up to 273 flits.
// Every IP runs in its own clock (periods 7 to 15 ns against a 10 ns network clock).
//  1. Through the control NICs the OS model writes XY routing tables into every router.
//  2. Every IP sends random packets (1 to 273 flits) to random IPs; receiving IPs read
//     with random pauses; every IP's first packet is a 273-flit one to IP 4, which
//     stops reading for a while, so its buffer fills, packets
//     for it are blocked in the network and queues in the routers fill up.
//  3. IP 0 gets an injection limit of 1 packet per 1000 cycles through its control NIC.
//  4. Halfway, all routing tables are rewritten to YX routes while traffic flows.
//  5. Every flit is checked at its destination (per source, in order); the sent,
//     received and blocked counters of every tile are read through the control NICs
//     and compared with the testbench's own counts.
// Each mechanism must happen at least once: arbitration between inputs for one output,
// a packet stored in an output queue while its next hop is busy, a message blocked at a
// receiving NIC, injection limiting, a run-time routing-table update.
module tb_noc_platform;
  import noc_pkg::*;
  localparam int W = 3, H = 3, NT = 9, DW = 16, MAXP = 273, NPKT = 8;
  logic clk = 0, rst_n = 0;
  logic [NT-1:0] ip_clk = '0, ip_rst_n = '0;
  logic [NT-1:0] ip_tx_valid = '0, ip_tx_ready, ip_tx_last = '0;
  logic [NT-1:0][DW-1:0] ip_tx_data = '0;
  logic [NT-1:0] ip_rx_valid, ip_rx_ready = '0, ip_rx_last;
  logic [NT-1:0][DW-1:0] ip_rx_data;
  logic [NT-1:0] ctl_we = '0;
  logic [NT-1:0][3:0] ctl_addr = '0;
  logic [NT-1:0][31:0] ctl_wdata = '0, ctl_rdata;

  int checks = 0, failures = 0, cycle = 0;
  int n_arb = 0, n_queued = 0, n_table_updates = 0, n_limited = 0;
  int sent [NT], recv [NT];
  logic [DW:0] expq [NT][NT][$];
  bit done [NT];
  bit pause4 = 0, go = 0;

  noc_platform dut (.*);

  always #5 clk = ~clk;
  for (genvar t = 0; t < NT; t++) begin : g_clk
    always #(3.5 + 0.5 * t) ip_clk[t] = ~ip_clk[t];
  end
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog at cycle %0d", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  // ---------------- OS model: control-port accesses ----------------
  task automatic ctl_write(input int t, input int a, input logic [31:0] d);
    @(negedge clk); ctl_we[t] = 1; ctl_addr[t] = 4'(a); ctl_wdata[t] = d;
    @(negedge clk); ctl_we[t] = 0;
  endtask
  task automatic ctl_read(input int t, input int a, output logic [31:0] d);
    @(negedge clk); ctl_addr[t] = 4'(a); #1 d = ctl_rdata[t];
  endtask

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
        ctl_we[r] = 1; ctl_addr[r] = 4'd0;
        ctl_wdata[r] = {1'b1, 7'd0, 8'd0, 8'(d), 8'(route(r, d, yx))};
      end
      @(negedge clk);
      ctl_we = '0;
    end
  endtask

  // ---------------- IPs ----------------
  for (genvar s = 0; s < NT; s++) begin : g_ip
    // sender
    initial begin
      wait (go);
      for (int n = 0; n < NPKT; n++) begin
        automatic int dst = (n == 0) ? 4 : $urandom_range(0, NT - 1);
        automatic int len = (n == 0) ? MAXP : $urandom_range(1, MAXP);
        automatic logic [DW:0] pkt [$];
        pkt.push_back({(len == 1), DW'(s << 8 | dst)});
        for (int f = 1; f < len; f++) pkt.push_back({(f == len - 1), DW'($urandom)});
        for (int e = 0; e < pkt.size(); e++) expq[dst][s].push_back(pkt[e]);
        for (int f = 0; f < len; f++) begin
          @(negedge ip_clk[s]);
          ip_tx_valid[s] = 1; {ip_tx_last[s], ip_tx_data[s]} = pkt[f];
          #0.1;
          while (!ip_tx_ready[s]) begin @(negedge ip_clk[s]); #0.1; end
          @(posedge ip_clk[s]);
        end
        #0.1 ip_tx_valid[s] = 0; ip_tx_last[s] = 0;
        sent[s]++;
        repeat ($urandom_range(0, 50)) @(posedge ip_clk[s]);
      end
      done[s] = 1;
    end
    // receiver
    initial begin
      int src; bit busy; logic [DW:0] e;
      busy = 0; src = 0;
      forever begin
        @(negedge ip_clk[s]);
        ip_rx_ready[s] = !(s == 4 && pause4) && ($urandom_range(0, 99) < 80);
        #0.1;
        if (ip_rx_ready[s] && ip_rx_valid[s]) begin
          if (!busy) src = int'(ip_rx_data[s][DW-1:8]);
          busy = 1;
          if (src >= NT || expq[s][src].size() == 0) begin
            chk(0, $sformatf("IP %0d: unexpected flit %h", s, {ip_rx_last[s], ip_rx_data[s]}));
          end else begin
            e = expq[s][src].pop_front();
            chk({ip_rx_last[s], ip_rx_data[s]} === e,
                $sformatf("IP %0d from %0d: flit %h exp %h", s, src, {ip_rx_last[s], ip_rx_data[s]}, e));
          end
          if (ip_rx_last[s]) begin busy = 0; recv[s]++; end
        end
      end
    end
  end

  // ---------------- mechanism monitors ----------------
  always @(posedge clk) if (rst_n) begin
    // a header held in an output queue because the next hop does not acknowledge
    for (int r = 0; r < NT; r++)
      for (int o = 0; o < 5; o++)
        if (dut.u_net.rout_req[r][o] && !dut.u_net.rout_ack[r][o]) n_queued++;
    // injection limit of tile 0 holding back a stored packet
    if (dut.g_tile[0].u_dnic.tx_pkt && !dut.g_tile[0].u_dnic.tx_busy_q && !dut.g_tile[0].u_dnic.allow)
      n_limited++;
  end
  // several inputs competing for one router output (router 4, the centre, has 5 outputs)
  for (genvar o = 0; o < 5; o++) begin : g_arbmon
    always @(posedge clk) if ($countones(dut.u_net.g_rtr[4].u_router.g_out[o].u_out.arb_req) > 1) n_arb++;
  end
  int tx0_starts [$];
  always @(posedge clk) if (dut.g_tile[0].u_dnic.tx_start) tx0_starts.push_back(cycle);

  initial begin
    logic [31:0] v;
    int tot_sent, tot_recv;
    repeat (3) @(posedge clk);
    rst_n = 1; ip_rst_n = '1;
    load_tables(0);
    ctl_write(0, 2, 32'd1000);        // window
    ctl_write(0, 1, 32'd1);           // 1 packet per window
    ctl_read(0, 1, v); chk(v == 1, "injection limit read-back");
    go = 1;
    pause4 = 1;
    repeat (6000) @(posedge clk);
    pause4 = 0;
    load_tables(1);                   // run-time rerouting, XY -> YX
    n_table_updates++;
    wait (done[0] && done[1] && done[2] && done[3] && done[4] && done[5] && done[6] && done[7] && done[8]);
    wait (recv.sum() == NT * NPKT);
    repeat (200) @(posedge clk);
    for (int d = 0; d < NT; d++) for (int s = 0; s < NT; s++)
      chk(expq[d][s].size() == 0, $sformatf("%0d->%0d: %0d flits never arrived", s, d, expq[d][s].size()));
    tot_sent = 0; tot_recv = 0;
    for (int t = 0; t < NT; t++) begin
      ctl_read(t, 3, v); chk(int'(v) == sent[t], $sformatf("tile %0d sent counter %0d exp %0d", t, v, sent[t]));
      tot_sent += int'(v);
      ctl_read(t, 4, v); chk(int'(v) == recv[t], $sformatf("tile %0d recv counter %0d exp %0d", t, v, recv[t]));
      tot_recv += int'(v);
    end
    ctl_read(4, 5, v);
    chk(v > 0, "no message counted as blocked at tile 4");
    $display("tile 4 blocked messages: %0d", v);
    for (int k = 1; k < tx0_starts.size(); k++)
      chk(tx0_starts[k] - tx0_starts[k-1] >= 1, "tile 0 started twice in a cycle");
    // 1 packet per 1000-cycle window: no two windows' worth of starts closer than that
    for (int k = 2; k < tx0_starts.size(); k++)
      chk(tx0_starts[k] - tx0_starts[k-2] > 1000, $sformatf("tile 0: 3 starts within %0d cycles", tx0_starts[k] - tx0_starts[k-2]));
    chk(tot_sent == NT * NPKT && tot_recv == NT * NPKT, $sformatf("sent %0d received %0d", tot_sent, tot_recv));
    chk(n_arb > 0, "no arbitration between inputs happened");
    chk(n_queued > 0, "no packet waited in an output queue");
    chk(n_limited > 0, "injection limiting never held a packet back");
    chk(n_table_updates > 0, "no run-time table update");
    $display("cycles %0d: arbitration %0d, queued-header cycles %0d, limited cycles %0d, table updates %0d",
             cycle, n_arb, n_queued, n_limited, n_table_updates);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
