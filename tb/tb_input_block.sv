// tb_input_block: an input block with a 4-output routing table.
// For random destinations and packet lengths, and a grant that the testbench (acting as
// the arbiter) gives after a random delay, checks: the arbiter request goes to the output
// the table names, one cycle after the header arrived; no acknowledge before the grant;
// the acknowledge comes in the cycle the grant is seen; every flit reaches the crossbar
// unchanged and in order; the block is idle again after the last flit. With an immediate
// grant the header is acknowledged two cycles after it arrived.
module tb_input_block;
  localparam int NO = 4, DW = 16, NIP = 8;
  logic clk = 0, rst_n = 0;
  logic in_req = 0, in_ack, in_last = 0;
  logic [DW-1:0] in_data = '0;
  logic rt_we = 0;
  logic [2:0] rt_addr = '0;
  logic [1:0] rt_port = '0;
  logic [NO-1:0] arb_req, arb_gnt = '0;
  logic xb_valid, xb_last;
  logic [DW-1:0] xb_data;
  int checks = 0, failures = 0;
  int table_m [NIP];

  input_block #(.NO(NO), .DATA_W(DW), .NIP(NIP)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NIP; k++) begin
      table_m[k] = $urandom_range(0, NO - 1);
      @(negedge clk); rt_we = 1; rt_addr = 3'(k); rt_port = 2'(table_m[k]);
    end
    @(negedge clk); rt_we = 0;
    for (int n = 0; n < 60; n++) begin
      int dst, len, gdelay, waited;
      logic [DW:0] pkt [$];
      dst = $urandom_range(0, NIP - 1);
      len = $urandom_range(0, 6);
      gdelay = (n == 0) ? 0 : $urandom_range(0, 4);
      pkt.delete();
      pkt.push_back({(len == 0), DW'($urandom_range(0, 255) << 8 | dst)});
      for (int f = 1; f <= len; f++) pkt.push_back({(f == len), DW'($urandom)});
      // cycle 0: header arrives
      @(negedge clk);
      in_req = 1; {in_last, in_data} = pkt[0];
      #1 chk(!in_ack && arb_req == 0, "ack or request in the header cycle");
      // cycle 1: request to the routed output
      @(negedge clk);
      chk(arb_req == NO'(1 << table_m[dst]), $sformatf("arb_req %b for dst %0d exp port %0d", arb_req, dst, table_m[dst]));
      chk(!in_ack, "ack before grant");
      // grant after gdelay more cycles; registered-grant arbiter seen one cycle later
      waited = 0;
      while (waited < gdelay) begin
        @(negedge clk); waited++;
        chk(!in_ack, "ack before grant");
      end
      // a registered-grant arbiter answers at the earliest in cycle 2
      @(negedge clk);
      arb_gnt = NO'(1 << table_m[dst]);
      #1;
      for (int f = 0; f < pkt.size(); f++) begin
        {in_last, in_data} = pkt[f];
        #1;
        chk(in_ack, "no ack while granted");
        chk(xb_valid && {xb_last, xb_data} == pkt[f], $sformatf("flit %0d to crossbar %h exp %h", f, {xb_last, xb_data}, pkt[f]));
        @(negedge clk);
      end
      in_req = 0; in_last = 0; arb_gnt = '0;
      #1 chk(arb_req == 0 && !xb_valid, "not idle after last flit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
