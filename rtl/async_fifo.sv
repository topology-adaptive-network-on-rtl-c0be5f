// async_fifo: double-port buffer with a clock per port, for the data NIC.
//
// Write and read pointers are kept in binary in their own clock domain and cross to the
// other one in Gray code through two-flop synchronisers, so each crossing value changes
// by one bit at a time. The storage is read combinationally at the read pointer. The top
// bit of a word is the last-flit bit: the writer also counts completed packets (Gray
// coded, across to the read side), and `rpkt_avail` tells the reader that at least one
// whole packet is stored. The write router uses this so that a packet, once started,
// goes out one flit per cycle. `wr_free` is the writer's (pessimistic) count of free
// words. DEPTH must be a power of two. The use of double-port buffers with one clock per
// port follows the interface description; the pointer scheme and the packet count are
// this design's own.
module async_fifo #(
  parameter int unsigned W     = 17,
  parameter int unsigned DEPTH = 1024,
  localparam int unsigned AW = $clog2(DEPTH),
  localparam int unsigned CW = 8                 // packet counter width
) (
  input  logic         wclk,
  input  logic         wrst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wdata,
  output logic         wfull,
  output logic [AW:0]  wr_free,
  input  logic         rclk,
  input  logic         rrst_n,
  input  logic         rd_en,
  output logic [W-1:0] rdata,
  output logic         rempty,
  output logic         rpkt_avail
);
  logic [W-1:0] mem [DEPTH];

  function automatic logic [AW:0] gray2bin(logic [AW:0] g);
    logic [AW:0] b;
    b[AW] = g[AW];
    for (int i = AW - 1; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic [AW:0]   wptr_q, wgray_q, rgray_s1, rgray_s2;
  logic [CW-1:0] wpkt_q, wpkt_gray_q;
  logic [AW:0]   rptr_gray_q;
  logic [CW-1:0] rpkt_gray_q;
  wire do_wr = wr_en && !wfull;
  wire [AW:0]   wptr_n = wptr_q + 1'b1;
  wire [CW-1:0] wpkt_n = wpkt_q + 1'b1;

  always_ff @(posedge wclk) if (do_wr) mem[wptr_q[AW-1:0]] <= wdata;

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wptr_q      <= '0;
      wgray_q     <= '0;
      wpkt_q      <= '0;
      wpkt_gray_q <= '0;
      rgray_s1    <= '0;
      rgray_s2    <= '0;
    end else begin
      rgray_s1 <= rptr_gray_q;
      rgray_s2 <= rgray_s1;
      if (do_wr) begin
        wptr_q  <= wptr_n;
        wgray_q <= wptr_n ^ (wptr_n >> 1);
        if (wdata[W-1]) begin
          wpkt_q      <= wpkt_n;
          wpkt_gray_q <= wpkt_n ^ (wpkt_n >> 1);
        end
      end
    end
  end
  assign wr_free = (AW+1)'(DEPTH) - (wptr_q - gray2bin(rgray_s2));
  assign wfull   = (wr_free == '0);

  // ---------------- read domain ----------------
  logic [AW:0]   rptr_q, wgray_s1, wgray_s2;
  logic [CW-1:0] rpkt_q, wpkt_s1, wpkt_s2;
  wire do_rd = rd_en && !rempty;
  wire [AW:0]   rptr_n = rptr_q + 1'b1;
  wire [CW-1:0] rpkt_n = rpkt_q + 1'b1;

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rptr_q      <= '0;
      rptr_gray_q <= '0;
      rpkt_q      <= '0;
      rpkt_gray_q <= '0;
      wgray_s1    <= '0;
      wgray_s2    <= '0;
      wpkt_s1     <= '0;
      wpkt_s2     <= '0;
    end else begin
      wgray_s1 <= wgray_q;
      wgray_s2 <= wgray_s1;
      wpkt_s1  <= wpkt_gray_q;
      wpkt_s2  <= wpkt_s1;
      if (do_rd) begin
        rptr_q      <= rptr_n;
        rptr_gray_q <= rptr_n ^ (rptr_n >> 1);
        if (rdata[W-1]) begin
          rpkt_q      <= rpkt_n;
          rpkt_gray_q <= rpkt_n ^ (rpkt_n >> 1);
        end
      end
    end
  end
  assign rempty     = (rptr_gray_q == wgray_s2);
  assign rpkt_avail = (rpkt_gray_q != wpkt_s2);
  assign rdata      = mem[rptr_q[AW-1:0]];
endmodule
