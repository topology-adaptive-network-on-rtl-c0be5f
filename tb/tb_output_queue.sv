// tb_output_queue: random pushes and pops against a queue model; checks head data, last
// bit, empty and space_ok (room for a maximum-size packet), also when full.
module tb_output_queue;
  localparam int DW = 16, DEPTH = 32, MAXP = 10;
  logic clk = 0, rst_n = 0, wr_en = 0, wr_last = 0, rd_en = 0;
  logic [DW-1:0] wr_data = '0, rd_data;
  logic rd_last, empty, space_ok;
  int checks = 0, failures = 0;
  logic [DW:0] model [$];

  output_queue #(.DATA_W(DW), .DEPTH(DEPTH), .MAX_PKT_FLITS(MAXP)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // phases: fill-biased, then drain-biased
      wr_en   = ($urandom_range(0, 99) < (((n / 300) % 2 == 0) ? 80 : 20)) && (model.size() < DEPTH);
      rd_en   = ($urandom_range(0, 99) < (((n / 300) % 2 == 0) ? 20 : 80));
      wr_data = DW'($urandom);
      wr_last = ($urandom_range(0, 3) == 0);
      #1;
      checks++;
      if (empty !== (model.size() == 0)) begin failures++; $display("empty %b size %0d", empty, model.size()); end
      checks++;
      if (space_ok !== ((DEPTH - model.size()) >= MAXP)) begin failures++; $display("space_ok %b size %0d", space_ok, model.size()); end
      if (model.size() > 0) begin
        checks++;
        if ({rd_last, rd_data} !== model[0]) begin failures++; $display("head %h exp %h", {rd_last, rd_data}, model[0]); end
      end
      @(posedge clk);
      if (rd_en && model.size() > 0) void'(model.pop_front());
      if (wr_en) model.push_back({wr_last, wr_data});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
