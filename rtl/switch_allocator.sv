// switch_allocator: switch allocation for the crossbar.
//
// An input VC may send its front flit when it holds an output channel, its
// FIFO has a flit, the channel control raises arbitration_request for that
// output channel (channel points outward and has data) and the far end's
// FIFO is ready.  The two VCs of an input port share one crossbar input, so
// a round-robin arbiter per input port picks one of them; output channels
// need no arbitration because the VC allocator gives each to one packet
// only.  The grant pops the FIFO (pop), drives the crossbar select of the
// output channel (sel, valid) and, for a tail flit, releases the output
// channel.  Combinational except for the arbiter pointers.  The design
// describes the allocator's task, not its insides; this structure is this
// design's own.
module switch_allocator
  import mbinoc_pkg::*;
#(
  parameter int unsigned NP = NPORTS,
  localparam int unsigned NI = NP * NCH,
  localparam int unsigned NO = NP * NCH,
  localparam int unsigned OW = $clog2(NO),
  localparam int unsigned IW = $clog2(NI)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [NI-1:0]  alloc_valid,
  input  logic [OW-1:0]  alloc_oc [NI],
  input  logic [NI-1:0]  flit_valid,
  input  logic [NI-1:0]  flit_tail,
  input  logic [NO-1:0]  arbitration_request,
  input  logic [NO-1:0]  ds_ready,
  output logic [NI-1:0]  pop,
  output logic [NI-1:0]  release_vc,
  output logic [IW-1:0]  sel [NO],
  output logic [NO-1:0]  xbar_valid
);
  logic [NI-1:0] eligible;

  always_comb begin
    for (int unsigned i = 0; i < NI; i++)
      eligible[i] = alloc_valid[i] && flit_valid[i]
                 && arbitration_request[alloc_oc[i]] && ds_ready[alloc_oc[i]];
  end

  for (genvar p = 0; p < NP; p++) begin : g_in
    rr_arbiter #(.N(NCH)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(eligible[p*NCH +: NCH]), .update(1'b1),
      .gnt(pop[p*NCH +: NCH])
    );
  end

  assign release_vc = pop & flit_tail;

  always_comb begin
    xbar_valid = '0;
    for (int unsigned o = 0; o < NO; o++) sel[o] = '0;
    for (int unsigned i = 0; i < NI; i++)
      if (pop[i]) begin
        xbar_valid[alloc_oc[i]] = 1'b1;
        sel[alloc_oc[i]]        = IW'(i);
      end
  end
endmodule
