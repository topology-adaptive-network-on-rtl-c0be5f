// tb_control_nic: writes every register through the control port and checks the
// outputs towards router and data NIC, the read-back values and the one-cycle pulses of
// the routing-table write and the statistics clear.
module tb_control_nic;
  logic clk = 0, rst_n = 0, ctl_we = 0;
  logic [3:0] ctl_addr = '0;
  logic [31:0] ctl_wdata = '0, ctl_rdata;
  logic cfg_we, cfg_all, stats_clr;
  logic [2:0] cfg_in, cfg_port;
  logic [3:0] cfg_ip;
  logic [15:0] inj_limit, inj_window;
  logic [31:0] cnt_sent = 32'd11, cnt_recv = 32'd22, cnt_blocked = 32'd33;
  int checks = 0, failures = 0;

  control_nic #(.AW(4), .PW(3), .IW(3)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("%s", what); end
  endtask
  task automatic wr(input int a, input logic [31:0] d);
    @(negedge clk); ctl_we = 1; ctl_addr = 4'(a); ctl_wdata = d;
    @(negedge clk); ctl_we = 0;
  endtask
  // read data is combinational from the address
  task automatic rd_chk(input int a, input logic [31:0] exp);
    ctl_addr = 4'(a); #1;
    chk(ctl_rdata == exp, $sformatf("read %0d: %h exp %h", a, ctl_rdata, exp));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    rd_chk(1, 0); rd_chk(2, 1024);
    chk(!cfg_we && !stats_clr, "pulses idle after reset");
    for (int n = 0; n < 50; n++) begin
      logic [31:0] v;
      int a, b, c;
      a = $urandom_range(0, 7); b = $urandom_range(0, 8); c = $urandom_range(0, 4);
      v = {n[0], 7'd0, 8'(a), 8'(b), 8'(c)};
      @(negedge clk); ctl_we = 1; ctl_addr = 0; ctl_wdata = v;
      @(negedge clk); ctl_we = 0;
      chk(cfg_we && cfg_all == n[0] && cfg_in == 3'(a) && cfg_ip == 4'(b) && cfg_port == 3'(c),
          $sformatf("route write %h -> we %b all %b in %0d ip %0d port %0d", v, cfg_we, cfg_all, cfg_in, cfg_ip, cfg_port));
      @(negedge clk);
      chk(!cfg_we, "route write pulse longer than a cycle");
    end
    wr(1, 32'h0000_0005); wr(2, 32'h0001_0040);
    chk(inj_limit == 5 && inj_window == 16'h0040, "rate registers");
    rd_chk(1, 5); rd_chk(2, 32'h40);
    rd_chk(3, 11); rd_chk(4, 22); rd_chk(5, 33); rd_chk(7, 0);
    @(negedge clk); ctl_we = 1; ctl_addr = 6;
    @(negedge clk); ctl_we = 0;
    chk(stats_clr, "clear pulse");
    @(negedge clk);
    chk(!stats_clr, "clear pulse longer than a cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
