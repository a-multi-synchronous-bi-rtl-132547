// tb_mbinoc_top: end-to-end test of the two-router network at its default
// parameters (32-flit buffers, delays 4 and 8).
//
// Router 0 at (0,0) runs at period 10, router 1 at (1,0) at period 12.
// Traffic sources/sinks sit on both local ports and on the north ports of
// both routers and the east port of router 1 (positions (0,0), (1,0),
// (0,1), (1,1), (2,0)), each in its own clock (11, 9, 10.5, 12.5, 13); the
// remaining edge ports are idle.  All periods stay within a 4:3 ratio of
// the router they face.  First only the sources on router 0's side send
// (toward router 1), so router 0 must take over the link channel that
// router 1 holds; then all sources send to all other positions while one
// sink pauses for a while.  Every packet must arrive once, whole and in
// order, no channel may be driven from both ends, and a series of
// talker/listener handshakes must complete.  Counted mechanisms, each of
// which must occur: link channel taken by each router from the other,
// priority channel yielded, delay state, full buffer, flit waiting for a
// full far buffer, switch arbitration between two VCs, flits crossing the
// link in both directions, handshakes.
module tb_mbinoc_top;
  import mbinoc_pkg::*;
  localparam int NPKT = 40;
  localparam int NN = 5;
  // NIC k: router, port, position {x,y}
  localparam int          NR  [NN] = '{0, 1, 0, 1, 1};
  localparam port_e       NP  [NN] = '{PORT_L, PORT_L, PORT_N, PORT_N, PORT_E};
  localparam logic [39:0] POS = {8'h20, 8'h11, 8'h01, 8'h10, 8'h00};

  logic clk0 = 0, clk1 = 0, rst_n = 0;
  logic nclk [NN];
  logic    ext_clk   [2][NPORTS];
  logic    ext_rst_n [2][NPORTS];
  ch_in_t  ext_in    [2][NPORTS][NCH];
  ch_out_t ext_out   [2][NPORTS][NCH];
  logic [NPORTS*NCH-1:0] dir_outward [2];
  logic [NPORTS*NCH-1:0] dir_delay [2];
  logic [NPORTS*NCH-1:0] busy_out [2];
  logic [NCH-1:0] link_conflict;
  logic hs_start = 0, hs_busy, hs_done, hs_got;
  ch_out_t nout [NN][2];
  ch_in_t  nin  [NN][2];
  ch_in_t  nic_side [NN][2];
  logic [1:0] nconf [NN];
  logic start_a = 0, start_b = 0, hold = 0;
  int sent [NN], rcvd [NN], rflits [NN], errs [NN], stalls [NN];
  logic done [NN];
  int checks = 0, failures = 0;

  initial for (int k = 0; k < NN; k++) nclk[k] = 0;
  always #5    clk0 = ~clk0;
  always #6    clk1 = ~clk1;
  always #5.5  nclk[0] = ~nclk[0];
  always #4.5  nclk[1] = ~nclk[1];
  always #5.25 nclk[2] = ~nclk[2];
  always #6.25 nclk[3] = ~nclk[3];
  always #6.5  nclk[4] = ~nclk[4];

  mbinoc_top dut (
    .clk0(clk0), .rst0_n(rst_n), .clk1(clk1), .rst1_n(rst_n),
    .ext_clk(ext_clk), .ext_rst_n(ext_rst_n), .ext_in(ext_in), .ext_out(ext_out),
    .dir_outward(dir_outward), .dir_delay(dir_delay), .busy_out(busy_out),
    .link_conflict(link_conflict), .hs_start(hs_start), .hs_busy(hs_busy),
    .hs_done(hs_done), .hs_got(hs_got)
  );

  // external port wiring: NICs where present, idle elsewhere
  always_comb begin
    for (int r = 0; r < 2; r++)
      for (int p = 0; p < NPORTS; p++) begin
        ext_clk[r][p]   = (r == 0) ? clk0 : clk1;
        ext_rst_n[r][p] = rst_n;
        for (int c = 0; c < NCH; c++) ext_in[r][p][c] = '0;
      end
    for (int k = 0; k < NN; k++) begin
      ext_clk[NR[k]][NP[k]] = nclk[k];
      for (int c = 0; c < NCH; c++) ext_in[NR[k]][NP[k]][c] = nin[k][c];
    end
  end

  for (genvar k = 0; k < NN; k++) begin : g_n
    localparam logic [7:0] ME = POS[k*8 +: 8];
    localparam logic [63:0] D =
      (k == 0) ? {32'h0, POS[39:32], POS[31:24], POS[23:16], POS[15:8]} :
      (k == 1) ? {32'h0, POS[39:32], POS[31:24], POS[23:16], POS[7:0]}  :
      (k == 2) ? {32'h0, POS[39:32], POS[31:24], POS[15:8],  POS[7:0]}  :
      (k == 3) ? {32'h0, POS[39:32], POS[23:16], POS[15:8],  POS[7:0]}  :
                 {32'h0, POS[31:24], POS[23:16], POS[15:8],  POS[7:0]};
    // router-0-side sources send first, only toward router 1's side
    localparam logic [63:0] DA = (k == 0) ? {40'h0, POS[39:32], POS[31:24], POS[15:8]} :
                                            {40'h0, POS[39:32], POS[31:24], POS[15:8]};
    logic [1:0] conf;
    for (genvar c = 0; c < 2; c++) begin : g_c
      bidir_channel u_ch (.a_out(ext_out[NR[k]][NP[k]][c]), .b_out(nout[k][c]),
                          .a_in(nin[k][c]), .b_in(nic_side[k][c]), .conflict(conf[c]));
    end
    assign nconf[k] = conf;
    if (k == 0 || k == 2) begin : g_first
      tb_nic #(.MY_X(ME[7:4]), .MY_Y(ME[3:0]), .SRC_ID(3'(k)), .NPKT(NPKT), .NDEST(3), .DESTS(DA),
               .GAP(2)) u_nic (
        .clk(nclk[k]), .rst_n(rst_n), .router_clk(NR[k] == 0 ? clk0 : clk1), .router_rst_n(rst_n),
        .nout(nout[k]), .nin(nic_side[k]), .start(start_a), .rx_hold(1'b0),
        .sent_pkts(sent[k]), .rcvd_pkts(rcvd[k]), .rcvd_flits(rflits[k]), .errors(errs[k]),
        .tx_stalls(stalls[k]), .done_sending(done[k]));
    end else begin : g_later
      tb_nic #(.MY_X(ME[7:4]), .MY_Y(ME[3:0]), .SRC_ID(3'(k)), .NPKT(NPKT), .NDEST(4), .DESTS(D),
               .GAP(6)) u_nic (
        .clk(nclk[k]), .rst_n(rst_n), .router_clk(NR[k] == 0 ? clk0 : clk1), .router_rst_n(rst_n),
        .nout(nout[k]), .nin(nic_side[k]), .start(start_b), .rx_hold(k == 1 && hold),
        .sent_pkts(sent[k]), .rcvd_pkts(rcvd[k]), .rcvd_flits(rflits[k]), .errors(errs[k]),
        .tx_stalls(stalls[k]), .done_sending(done[k]));
    end
  end

  // mechanism counters
  int n_conflict = 0, n_take0 = 0, n_take1 = 0, n_yield = 0, n_delay = 0, n_full = 0;
  int n_stall = 0, n_sa = 0, n_east = 0, n_west = 0, n_hs = 0, n_got = 0;
  logic [9:0] prev0, prev1;
  always @(posedge clk0) if (rst_n) begin
    if (link_conflict != 0) n_conflict++;
    for (int k = 0; k < NN; k++) if (nconf[k] != 0) n_conflict++;
    // router 0's east channel 1 is its normal-mode end of the link
    if (dir_outward[0][2*PORT_E+1] && !prev0[2*PORT_E+1]) n_take0++;
    if (!dir_outward[0][2*PORT_E] && prev0[2*PORT_E]) n_yield++;
    if (dir_delay[0] != 0) n_delay++;
    if ((dut.u_r0.demand & dut.u_r0.own & ~dut.u_r0.far_rdy) != 0) n_stall++;
    for (int p = 0; p < NPORTS; p++) if (&dut.u_r0.u_sa.eligible[2*p +: 2]) n_sa++;
    for (int c = 0; c < 2; c++) begin
      if (!dut.rout[0][PORT_E][c].ready || !dut.rout[1][PORT_W][c].ready) n_full++;
      if (dut.rout[0][PORT_E][c].oe && dut.rout[0][PORT_E][c].valid && dut.e0_in[c].ready) n_east++;
    end
    if (hs_done) n_hs++;
    prev0 <= dir_outward[0];
  end
  always @(posedge clk1) if (rst_n) begin
    if (link_conflict != 0) n_conflict++;
    if (dir_outward[1][2*PORT_W+1] && !prev1[2*PORT_W+1]) n_take1++;
    if (dir_delay[1] != 0) n_delay++;
    if ((dut.u_r1.demand & dut.u_r1.own & ~dut.u_r1.far_rdy) != 0) n_stall++;
    for (int p = 0; p < NPORTS; p++) if (&dut.u_r1.u_sa.eligible[2*p +: 2]) n_sa++;
    for (int c = 0; c < 2; c++)
      if (dut.rout[1][PORT_W][c].oe && dut.rout[1][PORT_W][c].valid && dut.w1_in[c].ready) n_west++;
    if (hs_got) n_got++;
    prev1 <= dir_outward[1];
  end

  // handshakes run all the time
  always @(negedge clk0) hs_start <= rst_n && !hs_busy && ($urandom_range(0, 7) == 0);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #5000000;
    failures++;
    $display("watchdog: sent %0d %0d %0d %0d %0d rcvd %0d %0d %0d %0d %0d", sent[0], sent[1], sent[2],
             sent[3], sent[4], rcvd[0], rcvd[1], rcvd[2], rcvd[3], rcvd[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot_s, tot_r, tot_e;
    prev0 = 10'b0101010101; prev1 = 10'b0101010101;
    #40 rst_n = 1;
    #50 start_a = 1;
    wait (done[0] && done[2]);
    start_b = 1;
    hold = 1;
    #6000 hold = 0;
    wait (done[1] && done[3] && done[4]);
    for (int t = 0; t < 3000; t++) begin
      @(posedge clk0);
      tot_s = 0; tot_r = 0; tot_e = 0;
      for (int k = 0; k < NN; k++) begin tot_s += sent[k]; tot_r += rcvd[k]; tot_e += errs[k]; end
      if (tot_r == tot_s) break;
    end
    check(tot_s == NN * NPKT, $sformatf("sent %0d packets", tot_s));
    check(tot_r == tot_s, $sformatf("received %0d of %0d packets", tot_r, tot_s));
    check(tot_e == 0, $sformatf("%0d sink errors", tot_e));
    check(n_conflict == 0, $sformatf("%0d cycles with a channel driven from both ends", n_conflict));
    check(n_take0 > 0, "router 0 never took router 1's link channel");
    check(n_take1 > 0, "router 1 never took router 0's link channel");
    check(n_yield > 0, "router 0 never yielded its priority link channel");
    check(n_delay > 0, "no delay state");
    check(n_full > 0, "no link buffer ever filled");
    check(n_stall > 0, "no flit waited for a full far buffer");
    check(n_sa > 0, "no switch arbitration between two VCs");
    check(n_east > 0 && n_west > 0, "flits did not cross the link both ways");
    check(n_hs > 10 && n_got >= n_hs, $sformatf("handshakes done=%0d seen=%0d", n_hs, n_got));
    $display("packets=%0d take0=%0d take1=%0d yield=%0d delay=%0d full=%0d stall=%0d sa=%0d east=%0d west=%0d hs=%0d",
             tot_r, n_take0, n_take1, n_yield, n_delay, n_full, n_stall, n_sa, n_east, n_west, n_hs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
