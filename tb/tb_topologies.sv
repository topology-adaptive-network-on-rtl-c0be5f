// tb_topologies: the five 16-IP networks that the network sizes and bandwidths are
// compared on - four-dimensional hypercube, 4 x 4 mesh, 4 x 4 torus, balanced binary
// tree and a single 16 x 16 crossbar router - each built from the same noc_network and
// router modules by its topology table, with shortest-path routing tables and random
// traffic from every IP (see topo_runner). All packets must arrive intact.
module tb_topologies;
  import noc_pkg::*;
  logic clk = 0, rst_n = 0;
  int c [5], f [5];
  bit fin [5];
  int checks, failures;

  always #5 clk = ~clk;

  topo_runner #(.NAME("hyper4"), .NR(16), .NIP(16), .MAXP(5),
    .R_NIN(fill_arr(16, 5)), .R_NOUT(fill_arr(16, 5)), .TOPO(cube_topo(4)),
    .IP_RTR(ident_arr(16)), .IP_PORT('0)) u_cube (.clk, .rst_n, .checks(c[0]), .failures(f[0]), .finished(fin[0]));
  topo_runner #(.NAME("mesh44"), .NR(16), .NIP(16), .MAXP(5),
    .R_NIN(mesh_nports(4, 4)), .R_NOUT(mesh_nports(4, 4)), .TOPO(mesh_topo(4, 4)),
    .IP_RTR(ident_arr(16)), .IP_PORT('0)) u_mesh (.clk, .rst_n, .checks(c[1]), .failures(f[1]), .finished(fin[1]));
  topo_runner #(.NAME("torus44"), .NR(16), .NIP(16), .MAXP(5),
    .R_NIN(fill_arr(16, 5)), .R_NOUT(fill_arr(16, 5)), .TOPO(torus_topo(4, 4)),
    .IP_RTR(ident_arr(16)), .IP_PORT('0)) u_torus (.clk, .rst_n, .checks(c[2]), .failures(f[2]), .finished(fin[2]));
  topo_runner #(.NAME("treebb"), .NR(16), .NIP(16), .MAXP(4),
    .R_NIN(tree_nports(16)), .R_NOUT(tree_nports(16)), .TOPO(tree_topo(16)),
    .IP_RTR(ident_arr(16)), .IP_PORT('0)) u_tree (.clk, .rst_n, .checks(c[3]), .failures(f[3]), .finished(fin[3]));
  topo_runner #(.NAME("xbar16"), .NR(1), .NIP(16), .MAXP(16),
    .R_NIN(fill_arr(1, 16)), .R_NOUT(fill_arr(1, 16)), .TOPO(xbar_topo(16)),
    .IP_RTR('0), .IP_PORT(ident_arr(16))) u_xbar (.clk, .rst_n, .checks(c[4]), .failures(f[4]), .finished(fin[4]));

  initial begin
    repeat (500000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", c.sum(), f.sum() + 1); $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2] && fin[3] && fin[4]);
    checks = c.sum(); failures = f.sum();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
