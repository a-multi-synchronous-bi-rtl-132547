// vc_allocator_wf: virtual channel allocation with a wavefront allocator.
//
// Same job and interface as vc_allocator (the input-first version): a
// packet's head flit must secure an output channel of the port its route
// names, and keeps it until its tail flit has crossed (release_vc).
// The request matrix has a cell (i, o) for every unallocated input VC i
// and every free output channel o of its routed port.  A wavefront
// allocator visits the diagonals of that matrix (cells (i, (i+d) mod NO)),
// starting at the priority diagonal; the cells of one diagonal share no row
// or column, so each cell whose row and column are both still unclaimed is
// granted and claims them.  That gives a maximal matching in one cycle.
// Two passes are made: the first offers only channels that already point
// outward (own), the second the rest, so an outward channel is preferred.
// The priority diagonal advances by one after every cycle with a grant.
// Allocation takes effect at the next clock edge.  demand marks the held
// output channels whose holder has a flit waiting.  The design lists
// wavefront allocation as one of three allocator styles it implemented,
// without giving its insides; the sequential loop over diagonals here is
// the unrolled form of the usual array of wavefront cells.
module vc_allocator_wf
  import mbinoc_pkg::*;
#(
  parameter int unsigned NI = NPORTS * NCH,
  parameter int unsigned NO = NPORTS * NCH,
  localparam int unsigned OW = $clog2(NO)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [NI-1:0]       head_req,   // head flit at FIFO front, unallocated
  input  port_e               req_port [NI],
  input  logic [NI-1:0]       flit_valid, // FIFO front holds a flit
  input  logic [NO-1:0]       own,        // output channel points outward
  input  logic [NI-1:0]       release_vc, // tail flit of the VC crossed now
  output logic [NI-1:0]       alloc_valid,
  output logic [OW-1:0]       alloc_oc [NI],
  output logic [NO-1:0]       oc_busy,
  output logic [NO-1:0]       demand
);
  logic [NI-1:0] gnt [NO];
  logic [OW-1:0] prio;

  always_comb begin
    logic [NI-1:0] row_free;
    logic [NO-1:0] col_free;
    int unsigned   d, o;
    row_free = ~alloc_valid & head_req;
    col_free = ~oc_busy;
    for (int unsigned c = 0; c < NO; c++) gnt[c] = '0;
    for (int unsigned pass = 0; pass < 2; pass++)
      for (int unsigned k = 0; k < NO; k++) begin
        d = (int'(prio) + k) % NO;
        for (int unsigned i = 0; i < NI; i++) begin
          o = (i + d) % NO;
          if (row_free[i] && col_free[o] && (int'(req_port[i]) == int'(o) / NCH)
              && (pass == 1 || own[o])) begin
            gnt[o][i]   = 1'b1;
            row_free[i] = 1'b0;
            col_free[o] = 1'b0;
          end
        end
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alloc_valid <= '0;
      oc_busy     <= '0;
      prio        <= '0;
      for (int unsigned i = 0; i < NI; i++) alloc_oc[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < NI; i++) begin
        if (release_vc[i] && alloc_valid[i]) begin
          alloc_valid[i]       <= 1'b0;
          oc_busy[alloc_oc[i]] <= 1'b0;
        end
      end
      for (int unsigned o = 0; o < NO; o++)
        for (int unsigned i = 0; i < NI; i++)
          if (gnt[o][i]) begin
            alloc_valid[i] <= 1'b1;
            alloc_oc[i]    <= OW'(o);
            oc_busy[o]     <= 1'b1;
          end
      for (int unsigned o = 0; o < NO; o++)
        if (gnt[o] != '0) prio <= (prio == OW'(NO - 1)) ? '0 : prio + 1'b1;
    end
  end

  always_comb begin
    demand = '0;
    for (int unsigned i = 0; i < NI; i++)
      if (alloc_valid[i] && flit_valid[i]) demand[alloc_oc[i]] = 1'b1;
  end

  // An output channel is granted to at most one input VC.
  for (genvar o = 0; o < NO; o++) begin : g_chk
    a_onehot_owner: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(gnt[o]));
  end
endmodule
