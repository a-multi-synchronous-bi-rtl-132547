// crossbar: switch fabric of the router.
//
// Connects NI input flits (the front flits of the input FIFOs) to NO output
// channels.  Each output channel has its own multiplexer driven by the
// index sel from the switch allocator; out_valid passes the allocator's
// valid through with it.  Purely combinational.  The design only names the
// cross-connect; a multiplexer per output is this design's choice.
module crossbar
  import mbinoc_pkg::*;
#(
  parameter int unsigned NI = NPORTS * NCH,
  parameter int unsigned NO = NPORTS * NCH,
  localparam int unsigned IW = $clog2(NI)
) (
  input  flit_t          in_flit [NI],
  input  logic [IW-1:0]  sel     [NO],
  input  logic [NO-1:0]  in_valid,
  output flit_t          out_flit [NO],
  output logic [NO-1:0]  out_valid
);
  always_comb begin
    for (int unsigned o = 0; o < NO; o++)
      out_flit[o] = in_valid[o] ? in_flit[sel[o]] : '0;
  end
  assign out_valid = in_valid;
endmodule
