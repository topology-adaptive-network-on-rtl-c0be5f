// tb_crossbar: random flits and random one-hot (or empty) selects; every output must
// carry exactly the selected input's flit, or zero when nothing is selected.
module tb_crossbar;
  localparam int NI = 5, NO = 5, W = 18;
  logic [NI-1:0][W-1:0]  in_flit;
  logic [NO-1:0][NI-1:0] sel;
  logic [NO-1:0][W-1:0]  out_flit;
  int checks = 0, failures = 0;
  int pick [NO];

  crossbar #(.NI(NI), .NO(NO), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      for (int i = 0; i < NI; i++) in_flit[i] = W'($urandom);
      for (int o = 0; o < NO; o++) begin
        pick[o] = $urandom_range(0, NI);        // NI means "none"
        sel[o]  = (pick[o] < NI) ? NI'(1 << pick[o]) : '0;
      end
      #1;
      for (int o = 0; o < NO; o++) begin
        checks++;
        if (out_flit[o] !== ((pick[o] < NI) ? in_flit[pick[o]] : W'(0))) begin
          failures++; $display("out %0d sel %0d: got %h", o, pick[o], out_flit[o]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
