// tb_rr_arbiter: checks the acceptance-dependent round robin.
// 1) all four inputs request, every grant is accepted: grants go 0,1,2,3,0,...
// 2) a grant that is not accepted leaves the pointer where it was.
// 3) no grant while space_ok is low; the grant is held while the holder requests.
// 4) grant appears one cycle after the request.
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 0, rst_n = 0, space_ok = 1, accept = 0;
  logic [N-1:0] req = '0, grant;
  int checks = 0, failures = 0;

  rr_arbiter #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic expect_grant(input logic [N-1:0] exp, input string what);
    checks++;
    if (grant !== exp) begin failures++; $display("%s: grant %b exp %b", what, grant, exp); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    // 4) latency
    req = 4'b0100;
    #1 expect_grant(4'b0000, "same cycle");
    @(negedge clk) expect_grant(4'b0100, "next cycle");
    accept = 1; @(negedge clk); accept = 0;
    req = 4'b0000; @(negedge clk);
    // pointer now at 3
    // 1) rotation with acceptance
    req = 4'b1111;
    for (int k = 0; k < 8; k++) begin
      @(negedge clk);
      expect_grant(N'(1 << ((3 + k) % N)), "rotation");
      accept = 1;
      @(negedge clk);
      accept = 0;
      expect_grant(N'(1 << ((3 + k) % N)), "held");
      req[(3 + k) % N] = 0;              // holder releases
      @(negedge clk);
      req[(3 + k) % N] = 1;              // and asks again later
    end
    // pointer is at 3 again; 2) grant without acceptance
    req = 4'b1000; @(negedge clk);
    expect_grant(4'b1000, "offer to 3");
    req = 4'b0000; @(negedge clk);       // withdrawn without acceptance
    req = 4'b1010; @(negedge clk);
    expect_grant(4'b1000, "pointer unchanged");
    req = 4'b0000; @(negedge clk);
    // 3) space_ok low blocks new grants
    space_ok = 0; req = 4'b0001;
    repeat (3) begin @(negedge clk); expect_grant(4'b0000, "no space"); end
    space_ok = 1; @(negedge clk);
    expect_grant(4'b0001, "space back");
    space_ok = 0; @(negedge clk);
    expect_grant(4'b0001, "holder keeps grant when queue fills");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
