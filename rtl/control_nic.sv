// control_nic: the OS's register window onto one tile's communication resources.
//
// The control network reaches each tile through a simple synchronous register port
// (ctl_we/ctl_addr/ctl_wdata, read data ctl_rdata combinationally from ctl_addr). Through
// it the OS writes routing-table entries of the tile's data router, sets the injection
// rate of the data NIC, and reads and clears the message statistics. Register map (word
// addresses):
//   0  ROUTE    write: [31] all inputs, [23:16] input port, [15:8] IP address,
//               [7:0] output port -> one routing-table write in the next cycle
//   1  INJ_LIMIT   read/write, packets per window (0 = no limit), reset 0
//   2  INJ_WINDOW  read/write, window length in network cycles, reset 1024
//   3  SENT     read, 4 RECV read, 5 BLOCKED read
//   6  CLEAR    write: clears the three counters
// The roles (routing-table update, injection-rate control, statistics) follow the
// interface description; the port and the register map are this design's own, since
// the control network itself is not specified.
module control_nic #(
  parameter int unsigned AW = 4,   // routing-table address width
  parameter int unsigned PW = 3,   // output-port width
  parameter int unsigned IW = 3    // input-port width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ctl_we,
  input  logic [3:0]    ctl_addr,
  input  logic [31:0]   ctl_wdata,
  output logic [31:0]   ctl_rdata,
  // to the data router
  output logic          cfg_we,
  output logic          cfg_all,
  output logic [IW-1:0] cfg_in,
  output logic [AW-1:0] cfg_ip,
  output logic [PW-1:0] cfg_port,
  // to / from the data NIC
  output logic [15:0]   inj_limit,
  output logic [15:0]   inj_window,
  output logic          stats_clr,
  input  logic [31:0]   cnt_sent,
  input  logic [31:0]   cnt_recv,
  input  logic [31:0]   cnt_blocked
);
  typedef enum logic [3:0] {
    R_ROUTE = 4'd0, R_LIMIT = 4'd1, R_WINDOW = 4'd2,
    R_SENT  = 4'd3, R_RECV  = 4'd4, R_BLOCKED = 4'd5, R_CLEAR = 4'd6
  } reg_e;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_we     <= 1'b0;
      cfg_all    <= 1'b0;
      cfg_in     <= '0;
      cfg_ip     <= '0;
      cfg_port   <= '0;
      inj_limit  <= '0;
      inj_window <= 16'd1024;
      stats_clr  <= 1'b0;
    end else begin
      cfg_we    <= 1'b0;
      stats_clr <= 1'b0;
      if (ctl_we) begin
        case (reg_e'(ctl_addr))
          R_ROUTE: begin
            cfg_we   <= 1'b1;
            cfg_all  <= ctl_wdata[31];
            cfg_in   <= IW'(ctl_wdata[23:16]);
            cfg_ip   <= AW'(ctl_wdata[15:8]);
            cfg_port <= PW'(ctl_wdata[7:0]);
          end
          R_LIMIT:  inj_limit  <= ctl_wdata[15:0];
          R_WINDOW: inj_window <= ctl_wdata[15:0];
          R_CLEAR:  stats_clr  <= 1'b1;
          default: ;
        endcase
      end
    end
  end

  always_comb begin
    case (reg_e'(ctl_addr))
      R_LIMIT:   ctl_rdata = {16'd0, inj_limit};
      R_WINDOW:  ctl_rdata = {16'd0, inj_window};
      R_SENT:    ctl_rdata = cnt_sent;
      R_RECV:    ctl_rdata = cnt_recv;
      R_BLOCKED: ctl_rdata = cnt_blocked;
      default:   ctl_rdata = '0;
    endcase
  end
endmodule
