// tb_routing_table: writes random entries into a routing table and checks every read
// against a shadow copy kept by the testbench; also checks the reset value.
module tb_routing_table;
  localparam int NIP = 9, NO = 5, AW = 4, PW = 3;
  logic clk = 0, rst_n = 0, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [PW-1:0] wdata = '0, rdata;
  int checks = 0, failures = 0;
  int shadow [NIP];

  routing_table #(.NIP(NIP), .NO(NO)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int i = 0; i < NIP; i++) shadow[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NIP; i++) begin
      raddr = AW'(i); #1;
      checks++; if (rdata !== 0) begin failures++; $display("reset entry %0d = %0d", i, rdata); end
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 1) == 1);
      waddr = AW'($urandom_range(0, NIP - 1));
      wdata = PW'($urandom_range(0, NO - 1));
      raddr = AW'($urandom_range(0, NIP - 1));
      #1;
      checks++;
      if (int'(rdata) != shadow[raddr]) begin
        failures++; $display("read %0d: got %0d exp %0d", raddr, rdata, shadow[raddr]);
      end
      @(posedge clk);
      if (we) shadow[waddr] = int'(wdata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
