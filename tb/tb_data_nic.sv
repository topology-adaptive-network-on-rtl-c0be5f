// tb_data_nic: data NIC with a 13 ns IP clock and a 10 ns network clock, 32-flit
// buffers and packets of at most 8 flits.
// Send path: the IP writes random packets; the testbench, playing the router input,
//   acknowledges after a random delay. Checks every flit, that a packet once acknowledged
//   comes one flit per cycle without gaps, the sent counter, and (second phase) that with
//   an injection limit of 2 packets per 200 cycles no 5 consecutive starts fall within 200 cycles.
// Receive path: the testbench, playing the router output, sends random packets; the IP
//   reads with random pauses, and for a while not at all so the buffer fills. Checks
//   every flit, the received counter, and that blocked packets were counted.
module tb_data_nic;
  localparam int DW = 16, DEPTH = 32, MAXP = 8, NTX = 60, NRX = 60;
  logic clk = 0, rst_n = 0, ip_clk = 0, ip_rst_n = 0;
  logic ip_tx_valid = 0, ip_tx_ready, ip_tx_last = 0;
  logic [DW-1:0] ip_tx_data = '0;
  logic ip_rx_valid, ip_rx_ready = 0, ip_rx_last;
  logic [DW-1:0] ip_rx_data;
  logic net_tx_req, net_tx_ack = 0, net_tx_last;
  logic [DW-1:0] net_tx_data;
  logic net_rx_req = 0, net_rx_ack, net_rx_last = 0;
  logic [DW-1:0] net_rx_data = '0;
  logic [15:0] inj_limit = 0, inj_window = 16'd200;
  logic stats_clr = 0;
  logic [31:0] cnt_sent, cnt_recv, cnt_blocked;
  int checks = 0, failures = 0, cycle = 0;
  logic [DW:0] txq [$], rxq [$];
  int tx_pkts = 0, rx_pkts = 0, gaps = 0;
  int starts [$];
  bit ip_pause = 0, limit_on = 0;

  data_nic #(.DATA_W(DW), .DEPTH(DEPTH), .MAX_PKT_FLITS(MAXP)) dut (.*);
  always #5 clk = ~clk;
  always #6.5 ip_clk = ~ip_clk;
  always @(posedge clk) cycle <= cycle + 1;
  initial begin
    #2000000;
    failures++; $display("watchdog tx %0d rx %0d txq %0d rxq %0d starts %0d sent %0d", tx_pkts, rx_pkts, txq.size(), rxq.size(), starts.size(), cnt_sent); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  // IP sender
  initial begin
    wait (ip_rst_n);
    for (int n = 0; n < NTX; n++) begin
      automatic int len = $urandom_range(1, MAXP);
      if (n == NTX / 2) wait (limit_on);
      for (int f = 0; f < len; f++) begin
        automatic logic [DW:0] w = {(f == len - 1), DW'((n << 8) | f)};
        @(negedge ip_clk);
        ip_tx_valid = 1; {ip_tx_last, ip_tx_data} = w;
        while (!ip_tx_ready) @(negedge ip_clk);
        @(posedge ip_clk);
        txq.push_back(w);
      end
      @(negedge ip_clk); ip_tx_valid = 0;
      repeat ($urandom_range(0, 4)) @(negedge ip_clk);
    end
  end

  // router input model (receives from the NIC)
  initial begin
    bit x, busy; logic [DW:0] fl, e;
    busy = 0;
    forever begin
      @(negedge clk);
      x = net_tx_req && net_tx_ack;
      fl = {net_tx_last, net_tx_data};
      if (busy && !net_tx_req) gaps++;
      @(posedge clk); #1;
      if (x) begin
        if (!busy) starts.push_back(cycle);
        busy = 1;
        e = txq.size() ? txq.pop_front() : '0;
        chk(fl === e, $sformatf("tx flit %h exp %h", fl, e));
        if (fl[DW]) begin busy = 0; net_tx_ack = 0; tx_pkts++; end
      end else if (net_tx_req && !net_tx_ack) begin
        repeat ($urandom_range(0, 3)) @(posedge clk);
        #1 net_tx_ack = 1;
      end
    end
  end

  // router output model (sends to the NIC)
  initial begin
    wait (rst_n);
    for (int n = 0; n < NRX; n++) begin
      automatic int len = $urandom_range(1, MAXP);
      automatic logic [DW:0] pkt [$];
      for (int f = 0; f < len; f++) pkt.push_back({(f == len - 1), DW'($urandom)});
      for (int f = 0; f < len; ) begin
        bit x;
        @(negedge clk);
        net_rx_req = 1; {net_rx_last, net_rx_data} = pkt[f];
        #1 x = net_rx_ack;
        @(posedge clk); #1;
        if (x) begin rxq.push_back(pkt[f]); f++; end
      end
      @(negedge clk); net_rx_req = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
  end

  // IP receiver
  initial begin
    logic [DW:0] e;
    forever begin
      @(negedge ip_clk);
      ip_rx_ready = !ip_pause && ($urandom_range(0, 99) < 70);
      if (ip_rx_ready && ip_rx_valid) begin
        e = rxq.size() ? rxq.pop_front() : '0;
        chk({ip_rx_last, ip_rx_data} === e, $sformatf("rx flit %h exp %h", {ip_rx_last, ip_rx_data}, e));
        if (ip_rx_last) rx_pkts++;
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    ip_pause = 1;
    rst_n = 1; ip_rst_n = 1;
    repeat (400) @(posedge clk);
    ip_pause = 0;
    wait (tx_pkts == NTX / 2);
    inj_limit = 16'd2;                      // 2 packets per 200 cycles from here on
    starts.delete();
    limit_on = 1;
    wait (tx_pkts == NTX && rx_pkts == NRX);
    repeat (50) @(posedge clk);
    chk(gaps == 0, $sformatf("%0d gaps inside sent packets", gaps));
    chk(cnt_sent == NTX, $sformatf("cnt_sent %0d", cnt_sent));
    chk(cnt_recv == NRX, $sformatf("cnt_recv %0d", cnt_recv));
    chk(cnt_blocked > 0, "no packet counted as blocked");
    // at most 2 starts per 200-cycle window: 5 consecutive starts span 3 windows
    for (int k = 4; k < starts.size(); k++)
      chk(starts[k] - starts[k-4] >= 195, $sformatf("5 starts within %0d cycles", starts[k] - starts[k-4]));
    chk(starts.size() > 10, "too few limited starts");
    $display("sent %0d recv %0d blocked %0d", cnt_sent, cnt_recv, cnt_blocked);
    stats_clr = 1; @(negedge clk); @(negedge clk); stats_clr = 0;
    chk(cnt_sent == 0 && cnt_recv == 0 && cnt_blocked == 0, "counters not cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
