// tb_injection_rate_ctrl: a source that starts a packet whenever allowed must get
// exactly `limit` starts in every window of `window` cycles; limit 0 lets it start in
// every cycle; a source that never starts is always allowed.
module tb_injection_rate_ctrl;
  logic clk = 0, rst_n = 0, pkt_start, allow;
  logic [15:0] limit = 16'd3, window = 16'd20;
  int checks = 0, failures = 0;

  injection_rate_ctrl #(.CW(16)) dut (.*);
  assign pkt_start = allow && go;
  logic go = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic count_window(input int len, output int n);
    n = 0;
    for (int c = 0; c < len; c++) begin
      @(negedge clk);
      if (pkt_start) n++;
    end
  endtask

  initial begin
    int n;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // align with a window start: window restarts every 20 cycles from reset
    @(negedge clk);
    checks++; if (!allow) begin failures++; $display("not allowed when idle"); end
    go = 1;
    count_window(20, n);   // first, partial window
    for (int w = 0; w < 6; w++) begin
      count_window(20, n);
      checks++;
      if (n != 3) begin failures++; $display("window %0d: %0d starts, exp 3", w, n); end
    end
    limit = 16'd7; window = 16'd50;
    count_window(50, n);   // transition window
    for (int w = 0; w < 3; w++) begin
      count_window(50, n);
      checks++;
      if (n != 7) begin failures++; $display("window %0d: %0d starts, exp 7", w, n); end
    end
    limit = 16'd0;
    count_window(40, n);
    checks++;
    if (n != 40) begin failures++; $display("unlimited: %0d starts, exp 40", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
