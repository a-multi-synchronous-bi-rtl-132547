// output_port_ctrl: output side of one router port (both channels).
//
// For each of the port's two bidirectional channels it plays the part of
// the tri-state driver of the bidirectional port: while the channel control
// says the channel points outward (direction_control = 1) it drives the
// crossbar's flit and valid onto the link and raises oe; otherwise it keeps
// off the link.  It also tracks the far end's buffer through that FIFO's
// ready flag, which is produced in this router's clock because the far FIFO
// is written with this router's clock: ds_ready tells the switch allocator
// that a flit can be taken now.  A flit crosses when valid and ready are both
// high (valid/ready flow control).  Combinational.  The split between this
// block and the channel control is this design's choice.
module output_port_ctrl
  import mbinoc_pkg::*;
(
  input  logic [1:0] direction_control,
  input  flit_t      xbar_flit  [2],
  input  logic [1:0] xbar_valid,
  input  logic [1:0] far_ready,      // far end FIFO out_ready
  output flit_t      link_data  [2],
  output logic [1:0] link_valid,
  output logic [1:0] link_oe,
  output logic [1:0] ds_ready
);
  always_comb begin
    for (int c = 0; c < 2; c++) begin
      link_oe[c]    = direction_control[c];
      link_valid[c] = direction_control[c] && xbar_valid[c];
      link_data[c]  = direction_control[c] ? xbar_flit[c] : '0;
      ds_ready[c]   = direction_control[c] && far_ready[c];
    end
  end
endmodule
