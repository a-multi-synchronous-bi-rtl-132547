// bidir_channel: one bidirectional data channel between two channel ends.
//
// Models the shared wires of a bidirectional link as two-state logic: where
// the hardware would have tri-state drivers at both ends on one set of
// wires, this module resolves the wires from the two ends' output enables.
// The end with oe high drives the flit and valid; the other end sees them.
// Each end's FIFO ready and registered channel request are passed to the
// other end unchanged.  If neither end drives, the wires read as idle.  The
// direction protocol must never let both ends drive at once; an assertion
// checks that.  Combinational.  The tri-state arrangement it replaces is the
// design's bidirectional port; the two-state resolution is this design's
// choice for simulation and synthesis without internal tri-states.
module bidir_channel
  import mbinoc_pkg::*;
(
  input  ch_out_t a_out,
  input  ch_out_t b_out,
  output ch_in_t  a_in,
  output ch_in_t  b_in,
  output logic    conflict   // both ends drive (must never happen)
);
  flit_t wire_data;
  logic  wire_valid_a, wire_valid_b;

  always_comb begin
    if (a_out.oe)      wire_data = a_out.data;
    else if (b_out.oe) wire_data = b_out.data;
    else               wire_data = '0;
  end
  assign wire_valid_a = a_out.oe && a_out.valid;
  assign wire_valid_b = b_out.oe && b_out.valid;

  assign b_in.data   = wire_data;
  assign b_in.valid  = wire_valid_a;
  assign b_in.ready  = a_out.ready;
  assign b_in.op_req = a_out.op_req;

  assign a_in.data   = wire_data;
  assign a_in.valid  = wire_valid_b;
  assign a_in.ready  = b_out.ready;
  assign a_in.op_req = b_out.op_req;

  assign conflict = a_out.oe && b_out.oe;
endmodule
