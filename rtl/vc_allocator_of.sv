// vc_allocator_of: virtual channel allocation, separable output-first.
//
// Same job and interface as vc_allocator (the input-first version): a
// packet's head flit must secure an output channel of the port its route
// names, and keeps it until its tail flit has crossed (release_vc).  Here
// the two arbitration stages run the other way round:
//   Output stage: every free output channel grants, with a round-robin
//   arbiter, one of the unallocated input VCs whose route names its port
//   (each such VC asks for both channels of the port).
//   Input stage: an input VC granted by both channels of its port takes the
//   one that points outward (own), else the lower-numbered one; the other
//   grant is dropped for this cycle.
// An output arbiter's pointer moves only when its grant is taken.
// Allocation takes effect at the next clock edge.  demand marks the held
// output channels whose holder has a flit waiting.  The design lists
// output-first allocation as one of three allocator styles it implemented,
// without giving its insides; this is the simplest form of it.
module vc_allocator_of
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
  logic [NI-1:0] req  [NO];
  logic [NI-1:0] ogn  [NO];
  logic [NI-1:0] take [NO];
  logic [NO-1:0] used;

  // output stage requests: every free channel of the routed port
  always_comb begin
    for (int unsigned o = 0; o < NO; o++)
      for (int unsigned i = 0; i < NI; i++)
        req[o][i] = head_req[i] && !alloc_valid[i] && !oc_busy[o]
                 && (int'(req_port[i]) == int'(o) / NCH);
  end

  for (genvar o = 0; o < NO; o++) begin : g_out
    rr_arbiter #(.N(NI)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(req[o]), .update(used[o]), .gnt(ogn[o])
    );
  end

  // input stage: each VC takes at most one of the grants it got
  always_comb begin
    for (int unsigned o = 0; o < NO; o++) take[o] = '0;
    for (int unsigned i = 0; i < NI; i++) begin
      int unsigned o0;
      o0 = int'(req_port[i]) * NCH;
      if (o0 + 1 < NO) begin
        if      (ogn[o0][i]   && own[o0])   take[o0][i]   = 1'b1;
        else if (ogn[o0+1][i] && own[o0+1]) take[o0+1][i] = 1'b1;
        else if (ogn[o0][i])                take[o0][i]   = 1'b1;
        else if (ogn[o0+1][i])              take[o0+1][i] = 1'b1;
      end
    end
    for (int unsigned o = 0; o < NO; o++) used[o] = (take[o] != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alloc_valid <= '0;
      oc_busy     <= '0;
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
          if (take[o][i]) begin
            alloc_valid[i] <= 1'b1;
            alloc_oc[i]    <= OW'(o);
            oc_busy[o]     <= 1'b1;
          end
    end
  end

  always_comb begin
    demand = '0;
    for (int unsigned i = 0; i < NI; i++)
      if (alloc_valid[i] && flit_valid[i]) demand[alloc_oc[i]] = 1'b1;
  end

  // An output channel is taken by at most one input VC per cycle.
  for (genvar o = 0; o < NO; o++) begin : g_chk
    a_onehot_take: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(take[o]));
  end
endmodule
