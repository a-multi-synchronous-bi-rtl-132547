// mbinoc_top: two MBiNoC routers in unrelated clock domains, joined by a
// bidirectional link, plus the inter-router four-phase handshake pair.
//
// Router 0 sits at mesh position (0,0) and runs on clk0; router 1 sits at
// (1,0) and runs on clk1.  The east port of router 0 and the west port of
// router 1 are joined by two bidirectional channels.  Router 0 controls the
// first channel in priority mode and router 1 in normal mode; the second
// channel is the other way round.  So each router holds one channel after
// reset, and either router can take both channels when it alone has traffic
// toward the other.  Flits cross from one clock domain to the other through
// the receiving port's multi-synchronous FIFO, which is written in the
// sender's clock.  Every other port of both routers (north, south and the
// outer west/east ports, and both local ports) is brought out as a
// channel-end struct array indexed [router][port][channel]; the entries of
// the joined ports are not used on the input side.
//
// Beside the routers sits the talker/listener pair of the four-phase
// handshake between the two clock domains (talker in clk0, listener in
// clk1), each request passing through the talker's or listener's output
// register and a two flip-flop synchronizer at the receiving side.
// hs_start begins a handshake, hs_got pulses in clk1 when the listener sees
// it and hs_done pulses in clk0 when it is complete.
//
// link_conflict reports a cycle in which both ends of a joined channel
// drive it; the direction protocol must keep it low.
//
// Lint: verilator's SYNCASYNCNET on rst0_n/rst1_n comes from assertions in
// the routers that sample the reset synchronously; the flip-flops all use it
// as an asynchronous reset.  The UNOPTFLAT report on the arbiters' grant
// is a false loop through the link structs, explained in rr_arbiter.
module mbinoc_top
  import mbinoc_pkg::*;
#(
  parameter int unsigned BUF_DEPTH  = 32,
  parameter int unsigned PRI_DELAY  = 4,
  parameter int unsigned NORM_DELAY = 8,
  parameter int unsigned VA_STYLE   = 0   // VC allocator style, see mbinoc_router
) (
  input  logic    clk0,
  input  logic    rst0_n,
  input  logic    clk1,
  input  logic    rst1_n,
  input  logic    ext_clk   [2][NPORTS],
  input  logic    ext_rst_n [2][NPORTS],
  input  ch_in_t  ext_in    [2][NPORTS][NCH],
  output ch_out_t ext_out   [2][NPORTS][NCH],
  output logic [NPORTS*NCH-1:0] dir_outward [2],
  output logic [NPORTS*NCH-1:0] dir_delay   [2],
  output logic [NPORTS*NCH-1:0] busy_out    [2],
  output logic [NCH-1:0]        link_conflict,
  input  logic    hs_start,
  output logic    hs_busy,
  output logic    hs_done,
  output logic    hs_got
);
  ch_in_t  rin  [2][NPORTS][NCH];
  ch_out_t rout [2][NPORTS][NCH];
  logic [NPORTS-1:0] rclk [2];
  logic [NPORTS-1:0] rrst [2];
  ch_in_t  e0_in [NCH];
  ch_in_t  w1_in [NCH];

  // Port inputs: joined ports come from the link, the rest from outside.
  always_comb begin
    for (int r = 0; r < 2; r++)
      for (int p = 0; p < NPORTS; p++) begin
        rclk[r][p] = ext_clk[r][p];
        rrst[r][p] = ext_rst_n[r][p];
        for (int c = 0; c < NCH; c++) rin[r][p][c] = ext_in[r][p][c];
      end
    rclk[0][PORT_E] = clk1;
    rrst[0][PORT_E] = rst1_n;
    rclk[1][PORT_W] = clk0;
    rrst[1][PORT_W] = rst0_n;
    for (int c = 0; c < NCH; c++) begin
      rin[0][PORT_E][c] = e0_in[c];
      rin[1][PORT_W][c] = w1_in[c];
    end
  end

  assign ext_out = rout;

  // Channel c of router 0's east port meets channel 1-c of router 1's west
  // port, so that priority mode at one end faces normal mode at the other.
  for (genvar c = 0; c < NCH; c++) begin : g_link
    bidir_channel u_ch (
      .a_out(rout[0][PORT_E][c]), .b_out(rout[1][PORT_W][NCH-1-c]),
      .a_in (e0_in[c]),           .b_in (w1_in[NCH-1-c]),
      .conflict(link_conflict[c])
    );
  end

  mbinoc_router #(
    .X_COORD(4'd0), .Y_COORD(4'd0), .BUF_DEPTH(BUF_DEPTH),
    .PRI_DELAY(PRI_DELAY), .NORM_DELAY(NORM_DELAY), .VA_STYLE(VA_STYLE)
  ) u_r0 (
    .clk(clk0), .rst_n(rst0_n), .nbr_clk(rclk[0]), .nbr_rst_n(rrst[0]),
    .ch_in(rin[0]), .ch_out(rout[0]), .dir_outward(dir_outward[0]),
    .dir_delay(dir_delay[0]), .busy_out(busy_out[0])
  );

  mbinoc_router #(
    .X_COORD(4'd1), .Y_COORD(4'd0), .BUF_DEPTH(BUF_DEPTH),
    .PRI_DELAY(PRI_DELAY), .NORM_DELAY(NORM_DELAY), .VA_STYLE(VA_STYLE)
  ) u_r1 (
    .clk(clk1), .rst_n(rst1_n), .nbr_clk(rclk[1]), .nbr_rst_n(rrst[1]),
    .ch_in(rin[1]), .ch_out(rout[1]), .dir_outward(dir_outward[1]),
    .dir_delay(dir_delay[1]), .busy_out(busy_out[1])
  );

  // Four-phase handshake between the two clock domains.
  logic op_req_T, op_req_L, ip_req_syncT, ip_req_syncL;

  talker_asm u_talker (
    .clk_T(clk0), .rst_n(rst0_n), .start(hs_start), .in_req_syncL(ip_req_syncL),
    .op_req_T(op_req_T), .busy(hs_busy), .done(hs_done)
  );
  sync_2ff u_sync_t2l (.clk(clk1), .rst_n(rst1_n), .d(op_req_T), .q(ip_req_syncT));
  listener_asm u_listener (
    .clk_L(clk1), .rst_n(rst1_n), .in_req_syncT(ip_req_syncT),
    .op_req_L(op_req_L), .got_req(hs_got)
  );
  sync_2ff u_sync_l2t (.clk(clk0), .rst_n(rst0_n), .d(op_req_L), .q(ip_req_syncL));
endmodule
