// tb_stats_counter: counts random events, clears, and checks saturation with a narrow
// counter, comparing with an integer kept by the testbench.
module tb_stats_counter;
  logic clk = 0, rst_n = 0, clr = 0, inc = 0;
  logic [31:0] count;
  logic [3:0]  count4;
  logic        clr4 = 0;
  int checks = 0, failures = 0, model = 0, model4 = 0;

  stats_counter #(.CW(32)) dut  (.clk, .rst_n, .clr, .inc, .count);
  stats_counter #(.CW(4))  dut4 (.clk, .rst_n, .clr(clr4), .inc, .count(count4));
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      checks++;
      if (int'(count) != model)  begin failures++; $display("count %0d exp %0d", count, model); end
      checks++;
      if (int'(count4) != model4) begin failures++; $display("count4 %0d exp %0d", count4, model4); end
      inc = ($urandom_range(0, 2) != 0);
      clr = (n == 150);
      clr4 = (n == 40);
      @(posedge clk);
      if (clr) model = 0; else if (inc) model++;
      if (clr4) model4 = 0; else if (inc && model4 < 15) model4++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
