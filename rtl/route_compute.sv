// route_compute: dimension-ordered (XY) route computation.
//
// Looks at the destination coordinates carried in a head flit and picks the
// output port of this router at (X_COORD, Y_COORD): first along X (east for
// a larger X, west for a smaller one), then along Y (north for a larger Y,
// south for a smaller one), and the local port once both match.  Purely
// combinational.  The design names a route computation stage but not its
// algorithm; XY routing on a 2-D mesh is this design's choice, being the
// usual deadlock-free choice for the mesh the router is drawn in.
// Lint: at X_COORD or Y_COORD = 0 the "smaller than" comparisons can never
// be true and verilator reports them as constant (UNSIGNED); they are kept
// so the same code serves every router position.
module route_compute
  import mbinoc_pkg::*;
#(
  parameter logic [COORD_W-1:0] X_COORD = '0,
  parameter logic [COORD_W-1:0] Y_COORD = '0
) (
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  output port_e              out_port
);
  always_comb begin
    if      (dst_x > X_COORD) out_port = PORT_E;
    else if (dst_x < X_COORD) out_port = PORT_W;
    else if (dst_y > Y_COORD) out_port = PORT_N;
    else if (dst_y < Y_COORD) out_port = PORT_S;
    else                      out_port = PORT_L;
  end
endmodule
