// mbinoc_router: five-port multi-synchronous bidirectional NoC router.
//
// Ports north, east, south, west and local each carry two bidirectional
// channels instead of a fixed input link and a fixed output link.  Channel 0
// of every port is controlled by this router in priority mode (it owns it
// after reset), channel 1 in normal mode (the far end owns it after reset).
// A channel is turned around at run time when the end that does not hold it
// has flits for it and the holder has none, so bandwidth follows the
// traffic.
//
// Data path: flits arriving on a channel are written into that channel's
// multi-synchronous FIFO in the sender's clock (nbr_clk of the port) and
// read in this router's clock clk.  The head flit of a packet computes its
// route (XY) and, in the VC allocator, obtains one of the two channels of its
// output port; the channel's direction control is then asked to point it
// outward.  Each cycle the switch allocator lets at most one VC per input
// port send its front flit through the crossbar to its output channel,
// provided the channel points outward and the far end's FIFO is ready.  The
// tail flit frees the output channel (wormhole switching).
//
// Timing: a flit that enters a FIFO can leave the router on the third
// rising edge of clk after its write at the earliest (two edges through the
// FIFO's pointer synchronizer, one through allocation when it is a head
// flit), then one flit per cycle per input port.
//
// Lint: verilator reports SYNCASYNCNET on the reset here because the
// assertions inside the allocators sample the reset synchronously (disable
// iff) while the flip-flops use it as an asynchronous reset; the assertions
// are not hardware, so this is harmless.
//
// Link signals use the ch_in_t / ch_out_t structs of mbinoc_pkg, indexed
// [port][channel].  Port numbers follow port_e (N, E, S, W, L).  The port
// count, the two channels per port, the multi-synchronous FIFOs and the
// direction control follow the design; XY routing, wormhole switching and
// the flit format are this design's choices.  VA_STYLE picks one of the
// three VC allocator styles the design was built with (separable
// input-first, the default; separable output-first; wavefront); they share
// one interface and differ only in which requests win.
module mbinoc_router
  import mbinoc_pkg::*;
#(
  parameter logic [COORD_W-1:0] X_COORD    = '0,
  parameter logic [COORD_W-1:0] Y_COORD    = '0,
  parameter int unsigned        BUF_DEPTH  = 32,
  parameter int unsigned        PRI_DELAY  = 4,
  parameter int unsigned        NORM_DELAY = 8,
  parameter int unsigned        VA_STYLE   = 0   // 0 input-first, 1 output-first, 2 wavefront
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] nbr_clk,
  input  logic [NPORTS-1:0] nbr_rst_n,
  input  ch_in_t            ch_in  [NPORTS][NCH],
  output ch_out_t           ch_out [NPORTS][NCH],
  output logic [NPORTS*NCH-1:0] dir_outward,   // per channel: points outward
  output logic [NPORTS*NCH-1:0] dir_delay,     // per channel: ASM in delay
  output logic [NPORTS*NCH-1:0] busy_out       // per output channel: held by a packet
);
  localparam int unsigned NI = NPORTS * NCH;
  localparam int unsigned NO = NPORTS * NCH;
  localparam int unsigned OW = $clog2(NO);
  localparam int unsigned IW = $clog2(NI);

  flit_t        flit  [NI];
  port_e        route [NI];
  logic [NI-1:0] flit_valid, flit_head, flit_tail, pop, release_vc;
  logic [NO-1:0] own, arb_req, demand, far_rdy, want, ds_ready, xbar_valid, xbar_out_valid, oc_busy;
  logic [NI-1:0] alloc_valid;
  logic [OW-1:0] alloc_oc [NI];
  logic [IW-1:0] sel [NO];
  flit_t        xbar_flit [NO];

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    flit_t      in_data [2];
    flit_t      pflit   [2];
    port_e      proute  [2];
    flit_t      xf      [2];
    flit_t      ld      [2];
    logic [1:0] in_valid, in_ready, ip_req, op_req, lv, loe, far_ready;

    for (genvar c = 0; c < NCH; c++) begin : g_ch
      assign in_data[c]   = ch_in[p][c].data;
      assign in_valid[c]  = ch_in[p][c].valid;
      assign ip_req[c]    = ch_in[p][c].op_req;
      assign far_ready[c] = ch_in[p][c].ready;
      assign far_rdy[p*NCH+c] = ch_in[p][c].ready;
      assign flit[p*NCH+c]  = pflit[c];
      assign route[p*NCH+c] = proute[c];
      assign xf[c]          = xbar_flit[p*NCH+c];
      assign ch_out[p][c].data   = ld[c];
      assign ch_out[p][c].valid  = lv[c];
      assign ch_out[p][c].oe     = loe[c];
      assign ch_out[p][c].ready  = in_ready[c];
      assign ch_out[p][c].op_req = op_req[c];
    end

    input_port_ctrl #(
      .X_COORD(X_COORD), .Y_COORD(Y_COORD), .BUF_DEPTH(BUF_DEPTH),
      .PRI_DELAY(PRI_DELAY), .NORM_DELAY(NORM_DELAY)
    ) u_ipc (
      .clk(clk), .rst_n(rst_n), .nbr_clk(nbr_clk[p]), .nbr_rst_n(nbr_rst_n[p]),
      .priority_mode(2'b01),
      .link_data(in_data), .link_valid(in_valid), .link_ready(in_ready),
      .ip_req(ip_req), .op_req(op_req),
      .pop(pop[p*NCH +: NCH]), .flit(pflit), .flit_valid(flit_valid[p*NCH +: NCH]),
      .flit_head(flit_head[p*NCH +: NCH]), .flit_tail(flit_tail[p*NCH +: NCH]),
      .route(proute), .req_channel(want[p*NCH +: NCH]),
      .direction_control(own[p*NCH +: NCH]),
      .arbitration_request(arb_req[p*NCH +: NCH]),
      .in_delay(dir_delay[p*NCH +: NCH])
    );

    output_port_ctrl u_opc (
      .direction_control(own[p*NCH +: NCH]), .xbar_flit(xf),
      .xbar_valid(xbar_out_valid[p*NCH +: NCH]), .far_ready(far_ready),
      .link_data(ld), .link_valid(lv), .link_oe(loe),
      .ds_ready(ds_ready[p*NCH +: NCH])
    );
  end

  // A channel is wanted (direction_control of its ASM) while a packet holds
  // it, has a flit waiting and the far end's FIFO can take that flit.  An
  // end whose flits are blocked downstream therefore lets the channel go,
  // which keeps the shared channels from closing a cycle of waits.
  assign want = demand & far_rdy;

  // VC allocator: the three styles share one interface.
  if (VA_STYLE == 1) begin : g_va_of
    vc_allocator_of u_va (
      .clk(clk), .rst_n(rst_n), .head_req(flit_valid & flit_head), .req_port(route),
      .flit_valid(flit_valid), .own(own), .release_vc(release_vc),
      .alloc_valid(alloc_valid), .alloc_oc(alloc_oc), .oc_busy(oc_busy),
      .demand(demand)
    );
  end else if (VA_STYLE == 2) begin : g_va_wf
    vc_allocator_wf u_va (
      .clk(clk), .rst_n(rst_n), .head_req(flit_valid & flit_head), .req_port(route),
      .flit_valid(flit_valid), .own(own), .release_vc(release_vc),
      .alloc_valid(alloc_valid), .alloc_oc(alloc_oc), .oc_busy(oc_busy),
      .demand(demand)
    );
  end else begin : g_va_if
    vc_allocator u_va (
      .clk(clk), .rst_n(rst_n), .head_req(flit_valid & flit_head), .req_port(route),
      .flit_valid(flit_valid), .own(own), .release_vc(release_vc),
      .alloc_valid(alloc_valid), .alloc_oc(alloc_oc), .oc_busy(oc_busy),
      .demand(demand)
    );
  end

  switch_allocator u_sa (
    .clk(clk), .rst_n(rst_n), .alloc_valid(alloc_valid), .alloc_oc(alloc_oc),
    .flit_valid(flit_valid), .flit_tail(flit_tail),
    .arbitration_request(arb_req), .ds_ready(ds_ready),
    .pop(pop), .release_vc(release_vc), .sel(sel), .xbar_valid(xbar_valid)
  );

  crossbar u_xbar (
    .in_flit(flit), .sel(sel), .in_valid(xbar_valid),
    .out_flit(xbar_flit), .out_valid(xbar_out_valid)
  );

  assign dir_outward = own;
  assign busy_out    = oc_busy;
endmodule
