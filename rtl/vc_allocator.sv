// vc_allocator: virtual channel allocation, separable input-first.
//
// The router has NI input virtual channels (two multi-synchronous FIFOs per
// port) and NO output channels (the two bidirectional channels of each
// port).  A packet's head flit must secure an output channel of the port its
// route names before any of its flits may cross the switch; it keeps that
// channel until its tail flit has crossed (release).
//   Input stage: every requesting input VC picks one channel of its output
//   port: a free channel that currently points outward first, then any free
//   channel (which the channel control then turns around).
//   Output stage: every output channel grants one of the input VCs that
//   picked it with a round-robin arbiter.
// Allocation takes effect at the next clock edge.  The state (which output
// channel each input VC holds and which output channels are busy) lives
// here.  demand tells the channel control which output channels have an
// allocated packet with a flit waiting.  The design compares three allocator
// styles and gives none of their insides; this is the separable input-first
// one, built in the simplest way.
module vc_allocator
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
  logic [NI-1:0] pick_valid;
  logic [OW-1:0] pick_oc [NI];
  logic [NI-1:0] cand [NO];
  logic [NI-1:0] gnt  [NO];

  // input stage
  always_comb begin
    for (int unsigned i = 0; i < NI; i++) begin
      int unsigned o0;
      o0 = int'(req_port[i]) * NCH;
      pick_valid[i] = 1'b0;
      pick_oc[i]    = '0;
      if (head_req[i] && !alloc_valid[i]) begin
        if      (!oc_busy[o0]   && own[o0])   begin pick_valid[i] = 1'b1; pick_oc[i] = OW'(o0);     end
        else if (!oc_busy[o0+1] && own[o0+1]) begin pick_valid[i] = 1'b1; pick_oc[i] = OW'(o0 + 1); end
        else if (!oc_busy[o0])                begin pick_valid[i] = 1'b1; pick_oc[i] = OW'(o0);     end
        else if (!oc_busy[o0+1])              begin pick_valid[i] = 1'b1; pick_oc[i] = OW'(o0 + 1); end
      end
    end
    for (int unsigned o = 0; o < NO; o++)
      for (int unsigned i = 0; i < NI; i++)
        cand[o][i] = pick_valid[i] && (pick_oc[i] == OW'(o));
  end

  // output stage
  for (genvar o = 0; o < NO; o++) begin : g_out
    rr_arbiter #(.N(NI)) u_arb (
      .clk(clk), .rst_n(rst_n), .req(cand[o]), .update(1'b1), .gnt(gnt[o])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      alloc_valid <= '0;
      oc_busy     <= '0;
      for (int unsigned i = 0; i < NI; i++) alloc_oc[i] <= '0;
    end else begin
      for (int unsigned i = 0; i < NI; i++) begin
        if (release_vc[i] && alloc_valid[i]) begin
          alloc_valid[i]        <= 1'b0;
          oc_busy[alloc_oc[i]]  <= 1'b0;
        end
      end
      for (int unsigned o = 0; o < NO; o++)
        for (int unsigned i = 0; i < NI; i++)
          if (gnt[o][i]) begin
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

  // An output channel is held by at most one input VC.
  for (genvar o = 0; o < NO; o++) begin : g_chk
    a_onehot_owner: assert property (@(posedge clk) disable iff (!rst_n)
      $onehot0(gnt[o]));
  end
endmodule
