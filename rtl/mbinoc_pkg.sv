// mbinoc_pkg: shared types and constants of the multi-synchronous
// bidirectional NoC (MBiNoC).
//
// Each router has five bidirectional ports (north, east, south, west and
// local).  Every port carries two bidirectional data channels; at one end of
// a channel the direction ASM runs in priority mode, at the other end in
// normal mode.  Channel 0 of a port is the one this router owns with
// priority, channel 1 the one it owns in normal mode, so a link between two
// routers joins channel 0 of one side with channel 1 of the other.
//
// Flit layout (64 bits): bit 63 marks a head flit, bit 62 a tail flit,
// bits 61:58 hold the destination X and bits 57:54 the destination Y
// coordinate; the rest is payload.  The 64-bit flit width follows the 64-bit
// buffers of the synthesis reports; the field layout is this design's own.
// The Binary/Gray conversion functions follow the XOR equations of the FIFO
// pointer scheme.  flit_dx/flit_dy take a whole flit and use only its
// coordinate bits, which verilator reports as unused bits (UNUSEDSIGNAL).
package mbinoc_pkg;

  localparam int unsigned FLIT_W  = 64;
  localparam int unsigned NPORTS  = 5;
  localparam int unsigned NCH     = 2;   // bidirectional channels per port
  localparam int unsigned COORD_W = 4;

  typedef enum logic [2:0] {
    PORT_N = 3'd0,
    PORT_E = 3'd1,
    PORT_S = 3'd2,
    PORT_W = 3'd3,
    PORT_L = 3'd4
  } port_e;

  typedef logic [FLIT_W-1:0] flit_t;

  localparam int unsigned HEAD_BIT = FLIT_W - 1;
  localparam int unsigned TAIL_BIT = FLIT_W - 2;
  localparam int unsigned DX_LSB   = FLIT_W - 2 - COORD_W;
  localparam int unsigned DY_LSB   = DX_LSB - COORD_W;

  // Signals one end of a bidirectional channel drives toward the link.
  typedef struct packed {
    flit_t data;    // flit on the link while this end owns the channel
    logic  valid;   // flit valid (only meaningful while oe = 1)
    logic  oe;      // this end drives the link (channel points outward)
    logic  ready;   // this end's FIFO can accept a flit (write domain)
    logic  op_req;  // registered channel request toward the far end
  } ch_out_t;

  // Signals one end of a channel receives from the link.
  typedef struct packed {
    flit_t data;    // flit driven by the far end
    logic  valid;   // far end owns the channel and sends a flit
    logic  ready;   // far end's FIFO can accept a flit
    logic  op_req;  // far end's registered channel request (unsynchronised)
  } ch_in_t;

  function automatic logic [COORD_W-1:0] flit_dx(flit_t f);
    return f[DX_LSB +: COORD_W];
  endfunction

  function automatic logic [COORD_W-1:0] flit_dy(flit_t f);
    return f[DY_LSB +: COORD_W];
  endfunction

  // G(n-1) = B(n-1), G(i) = B(i+1) xor B(i)
  function automatic logic [15:0] bin2gray(logic [15:0] b);
    return b ^ (b >> 1);
  endfunction

  // B(n-1) = G(n-1), B(i) = B(i+1) xor G(i)
  function automatic logic [15:0] gray2bin(logic [15:0] g);
    logic [15:0] b;
    b[15] = g[15];
    for (int i = 14; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
