// tb_output_block: an output block with three requesters and an 8-packet queue.
// The testbench plays the input blocks: each requests, waits for its grant, then writes
// its packet one flit per cycle through the crossbar port and drops its request. A
// receiver acknowledges each packet after a random delay and holds the acknowledge to the
// last flit. Checks: only one grant at a time; grants rotate among waiting requesters;
// packets leave whole and in the order they were written; a packet written into an empty
// queue shows its header on the link in the next cycle; when the receiver stalls, the
// queue fills and grants stop until a packet leaves (blocking counted).
module tb_output_block;
  localparam int NI = 3, DW = 16, DEPTH = 32, MAXP = 8;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0] arb_req = '0, arb_gnt;
  logic wr_en = 0, wr_last = 0;
  logic [DW-1:0] wr_data = '0;
  logic out_req, out_ack = 0, out_data_last;
  logic [DW-1:0] out_data;
  logic out_last;
  int checks = 0, failures = 0, blocked = 0, rx_pkts = 0, cut_through = 0;
  logic [DW:0] expq [$];
  bit stall = 0;
  bit wr_busy = 0;

  output_block #(.NI(NI), .DATA_W(DW), .DEPTH(DEPTH), .MAX_PKT_FLITS(MAXP)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  always @(negedge clk) if (rst_n) begin
    checks++;
    if ($countones(arb_gnt) > 1) begin failures++; $display("several grants %b", arb_gnt); end
    if (arb_req != 0 && arb_gnt == 0 && !dut.space_ok) blocked++;
  end

  // requesters
  for (genvar i = 0; i < NI; i++) begin : g_req
    initial begin
      wait (rst_n);
      for (int n = 0; n < 30; n++) begin
        int len;
        logic [DW:0] pkt [$];
        len = $urandom_range(1, MAXP);
        pkt.delete();
        for (int f = 0; f < len; f++) pkt.push_back({(f == len - 1), DW'(i << 12 | n << 4 | f)});
        @(negedge clk);
        arb_req[i] = 1;
        do @(negedge clk); while (!arb_gnt[i]);
        // this requester now owns the crossbar port
        checks++; if (wr_busy) begin failures++; $display("grant to %0d while another writes", i); end
        wr_busy = 1;
        for (int f = 0; f < len; f++) begin
          wr_en = 1; {wr_last, wr_data} = pkt[f];
          if (f == 0 && !out_req) begin
            @(negedge clk);
            cut_through++;
            checks++; if (!out_req || {out_last, out_data} !== pkt[0]) begin failures++; $display("header not on link one cycle after write"); end
            expq.push_back(pkt[0]);
            continue;
          end
          expq.push_back(pkt[f]);
          @(negedge clk);
        end
        wr_en = 0; wr_last = 0; wr_busy = 0;
        arb_req[i] = 0;
        repeat ($urandom_range(0, 5)) @(negedge clk);
      end
    end
  end

  // receiver
  initial begin
    bit x; logic [DW:0] flit, e; int delay;
    forever begin
      @(negedge clk);
      x = out_req && out_ack;
      flit = {out_last, out_data};
      @(posedge clk); #1;
      if (x) begin
        checks++;
        e = (expq.size() > 0) ? expq.pop_front() : '0;
        if (flit !== e) begin failures++; $display("flit %h exp %h", flit, e); end
        if (flit[DW]) begin out_ack = 0; rx_pkts++; end
      end else if (out_req && !out_ack && !stall) begin
        delay = $urandom_range(0, 3);
        repeat (delay) @(posedge clk);
        #1 out_ack = 1;
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    repeat (150) @(posedge clk);
    stall = 1;                 // receiver stops: queue must fill up and block grants
    repeat (300) @(posedge clk);
    stall = 0;
    wait (rx_pkts == 90);
    repeat (10) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("%0d flits never left", expq.size()); end
    checks++; if (blocked == 0) begin failures++; $display("queue never blocked the arbiter"); end
    checks++; if (cut_through == 0) begin failures++; $display("no packet cut through"); end
    $display("packets %0d, blocked cycles %0d, cut-through %0d", rx_pkts, blocked, cut_through);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
