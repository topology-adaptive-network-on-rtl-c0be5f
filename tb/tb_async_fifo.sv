// tb_async_fifo: writer at a 7 ns clock, reader at a 10 ns clock, random enables. Every word must come out once, in order; wr_free must never
// exceed the true free space; rpkt_avail must only be high when a whole packet (a word
// with the last bit) is stored beyond the read pointer; the FIFO must fill up (full
// seen) and drain.
module tb_async_fifo;
  localparam int W = 9, DEPTH = 16;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_en = 0, rd_en = 0, wfull, rempty, rpkt_avail;
  logic [W-1:0] wdata = '0, rdata;
  logic [$clog2(DEPTH):0] wr_free;
  int checks = 0, failures = 0, full_seen = 0, nread = 0, nwritten = 0;
  logic [W-1:0] model [$];
  int wper = 7, rper = 10;

  async_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);
  always #(wper / 2.0) wclk = ~wclk;
  always #(rper / 2.0) rclk = ~rclk;
  initial begin
    #400000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // writer
  initial begin
    repeat (3) @(posedge wclk);
    wrst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge wclk);
      wr_en = ($urandom_range(0, 99) < ((n % 400) < 200 ? 90 : 30));
      wdata = W'($urandom);
      if (wfull) full_seen++;
      checks++;
      if (int'(wr_free) > DEPTH - model.size()) begin failures++; $display("wr_free %0d > %0d", wr_free, DEPTH - model.size()); end
      @(posedge wclk);
      if (wr_en && !wfull) begin model.push_back(wdata); nwritten++; end
    end
    wr_en = 0;
  end

  // reader
  initial begin
    bit pkt;
    repeat (3) @(posedge rclk);
    rrst_n = 1;
    forever begin
      @(negedge rclk);
      rd_en = ($urandom_range(0, 99) < 60);
      if (rpkt_avail) begin
        pkt = 0;
        foreach (model[k]) if (model[k][W-1]) pkt = 1;
        checks++;
        if (!pkt) begin failures++; $display("rpkt_avail without a whole packet"); end
      end
      if (!rempty) begin
        checks++;
        if (model.size() == 0 || rdata !== model[0]) begin failures++; $display("read %h exp %h", rdata, model.size() ? model[0] : '0); end
      end
      @(posedge rclk);
      if (rd_en && !rempty && model.size() > 0) begin void'(model.pop_front()); nread++; end
    end
  end

  initial begin
    wait (nwritten > 0);
    #200000;
    checks++; if (nread != nwritten) begin failures++; $display("read %0d of %0d", nread, nwritten); end
    checks++; if (full_seen == 0) begin failures++; $display("never full"); end
    $display("written %0d read %0d full cycles %0d", nwritten, nread, full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
