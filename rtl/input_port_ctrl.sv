// input_port_ctrl: receive side and channel control of one router port.
//
// A port has two bidirectional channels; each has a multi-synchronous FIFO
// as its flit buffer.  The FIFO is written in the clock of the far end that
// drives the channel (nbr_clk, forwarded with the data) and read in this
// router's clock, so each port is a clock-domain boundary.  The FIFO's
// out_ready goes back over the link to the sender.  For each FIFO the port
// decodes the front flit (head, tail, destination) and computes its route.
// The port's dynamic channel control turns the two channels around on
// demand; its direction_control outputs tell the output side when it may
// drive a channel.  A flit written into a FIFO is visible at its read side
// two router clock edges (plus the phase between the clocks) after its
// write edge at the earliest.  The block boundary
// (FIFOs, route compute and channel control in the input port controller)
// follows the design's description.  The design's port drawing also gates
// the receive path with the inverse of this end's direction control.  That
// is left out on purpose: the write side runs in the neighbour's clock, and
// this end's direction signal would reach the write pointer logic
// unsynchronized.  The far end gates its valid with its own direction, and
// while it sends this end never points outward, so nothing is lost.
module input_port_ctrl
  import mbinoc_pkg::*;
#(
  parameter logic [COORD_W-1:0] X_COORD   = '0,
  parameter logic [COORD_W-1:0] Y_COORD   = '0,
  parameter int unsigned        BUF_DEPTH = 32,
  parameter int unsigned        PRI_DELAY  = 4,
  parameter int unsigned        NORM_DELAY = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       nbr_clk,
  input  logic       nbr_rst_n,
  input  logic [1:0] priority_mode,
  // link side (write side of the FIFOs, nbr_clk domain)
  input  flit_t      link_data  [2],
  input  logic [1:0] link_valid,
  output logic [1:0] link_ready,
  input  logic [1:0] ip_req,
  output logic [1:0] op_req,
  // router side (clk domain)
  input  logic [1:0] pop,
  output flit_t      flit       [2],
  output logic [1:0] flit_valid,
  output logic [1:0] flit_head,
  output logic [1:0] flit_tail,
  output port_e      route      [2],
  input  logic [1:0] req_channel,
  output logic [1:0] direction_control,
  output logic [1:0] arbitration_request,
  output logic [1:0] in_delay
);
  for (genvar c = 0; c < 2; c++) begin : g_vc
    logic full_unused, empty_unused;

    ms_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_fifo (
      .wclk(nbr_clk), .w_rst_n(nbr_rst_n), .in_valid(link_valid[c]),
      .wdata(link_data[c]), .out_ready(link_ready[c]), .full(full_unused),
      .rclk(clk), .r_rst_n(rst_n), .in_ready(pop[c]), .rdata(flit[c]),
      .out_valid(flit_valid[c]), .empty(empty_unused)
    );

    assign flit_head[c] = flit[c][HEAD_BIT];
    assign flit_tail[c] = flit[c][TAIL_BIT];

    route_compute #(.X_COORD(X_COORD), .Y_COORD(Y_COORD)) u_rc (
      .dst_x(flit_dx(flit[c])), .dst_y(flit_dy(flit[c])), .out_port(route[c])
    );
  end

  dyn_channel_ctrl #(.PRI_DELAY(PRI_DELAY), .NORM_DELAY(NORM_DELAY)) u_dcc (
    .clk(clk), .rst_n(rst_n), .priority_mode(priority_mode),
    .req_channel(req_channel), .ip_req(ip_req), .op_req(op_req),
    .direction_control(direction_control),
    .arbitration_request(arbitration_request), .in_delay(in_delay)
  );
endmodule
