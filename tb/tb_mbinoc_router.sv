// tb_mbinoc_router: one router at (1,1) with a traffic source/sink on each
// of its five ports, every one in its own clock (router period 10, the
// others 9, 11, 12, 8 and 10.5).  The periods stay within the ratio of 4:3
// for which the direction protocol's delay of 4 cycles covers the far end's
// synchronizer latency.
//
// Each port's source sends NPKT packets of 1..4 flits to random other
// ports.  For a while the local sink stops reading, so the router's buffers
// fill and flow control must hold flits back.  The test checks that every
// packet arrives exactly once, whole, in order and at the right port, that
// no channel is ever driven from both ends, and counts the mechanisms that
// must occur: channel turnarounds (the router taking a channel from the far
// end and giving it back), delay states, stalls from a full buffer, and
// cycles in which both VCs of one input port compete in the switch
// allocator.
module tb_mbinoc_router;
  // VC allocator style under test (0 input-first, 1 output-first, 2 wavefront)
  localparam int unsigned VA_STYLE = 0;
  import mbinoc_pkg::*;
  localparam int NPKT = 60;
  localparam logic [63:0] POS = {8'h11, 8'h01, 8'h10, 8'h21, 8'h12};  // N,E,S,W,L at bytes 0..4

  logic clk = 0, rst_n = 0;
  logic nclk [5];
  logic [4:0] nclk_v, nrst_v;
  ch_in_t  rin  [5][2];
  ch_out_t rout [5][2];
  ch_out_t nout [5][2];
  ch_in_t  nin  [5][2];
  logic [9:0] dir_outward, dir_delay, busy_out;
  logic [1:0] conflict [5];
  logic start = 0, hold_local = 0;
  int sent [5], rcvd [5], rflits [5], errs [5], stalls [5];
  logic done [5];
  int checks = 0, failures = 0;

  initial begin nclk[0] = 0; nclk[1] = 0; nclk[2] = 0; nclk[3] = 0; nclk[4] = 0; end
  always #5   clk = ~clk;
  always #4.5  nclk[0] = ~nclk[0];
  always #5.5  nclk[1] = ~nclk[1];
  always #6    nclk[2] = ~nclk[2];
  always #4    nclk[3] = ~nclk[3];
  always #5.25 nclk[4] = ~nclk[4];
  always_comb for (int p = 0; p < 5; p++) begin nclk_v[p] = nclk[p]; nrst_v[p] = rst_n; end

  mbinoc_router #(.X_COORD(4'd1), .Y_COORD(4'd1), .VA_STYLE(VA_STYLE)) dut (
    .clk(clk), .rst_n(rst_n), .nbr_clk(nclk_v), .nbr_rst_n(nrst_v),
    .ch_in(rin), .ch_out(rout), .dir_outward(dir_outward), .dir_delay(dir_delay),
    .busy_out(busy_out)
  );

  for (genvar p = 0; p < 5; p++) begin : g_p
    localparam logic [7:0] ME = POS[p*8 +: 8];
    // destinations: the four other positions
    localparam logic [63:0] D = (p == 0) ? {32'h0, POS[39:32], POS[31:24], POS[23:16], POS[15:8]} :
                                (p == 1) ? {32'h0, POS[39:32], POS[31:24], POS[23:16], POS[7:0]} :
                                (p == 2) ? {32'h0, POS[39:32], POS[31:24], POS[15:8],  POS[7:0]} :
                                (p == 3) ? {32'h0, POS[39:32], POS[23:16], POS[15:8],  POS[7:0]} :
                                           {32'h0, POS[31:24], POS[23:16], POS[15:8],  POS[7:0]};
    for (genvar c = 0; c < 2; c++) begin : g_c
      bidir_channel u_ch (.a_out(rout[p][c]), .b_out(nout[p][c]), .a_in(rin[p][c]),
                          .b_in(nin[p][c]), .conflict(conflict[p][c]));
    end
    tb_nic #(.MY_X(ME[7:4]), .MY_Y(ME[3:0]), .SRC_ID(3'(p)), .NPKT(NPKT), .NDEST(4), .DESTS(D),
             .GAP(p == 4 ? 12 : 4)) u_nic (
      .clk(nclk[p]), .rst_n(rst_n), .router_clk(clk), .router_rst_n(rst_n),
      .nout(nout[p]), .nin(nin[p]), .start(start), .rx_hold(p == 4 && hold_local),
      .sent_pkts(sent[p]), .rcvd_pkts(rcvd[p]), .rcvd_flits(rflits[p]), .errors(errs[p]),
      .tx_stalls(stalls[p]), .done_sending(done[p])
    );
  end

  // mechanism counters
  int n_conflict = 0, n_take = 0, n_give = 0, n_delay = 0, n_full = 0, n_sa_compete = 0, n_stall = 0;
  logic [9:0] prev_dir;
  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < 5; p++) for (int c = 0; c < 2; c++) if (conflict[p][c]) n_conflict++;
    for (int i = 0; i < 10; i++) begin
      if (i % 2 == 1 && dir_outward[i] && !prev_dir[i]) n_take++;   // normal end took channel
      if (i % 2 == 0 && !dir_outward[i] && prev_dir[i]) n_give++;   // priority end yielded
    end
    if (dir_delay != 0) n_delay++;
    if ((dut.demand & dut.own & ~dut.far_rdy) != 0) n_stall++;
    for (int p = 0; p < 5; p++) for (int c = 0; c < 2; c++) if (!rout[p][c].ready) n_full++;
    for (int p = 0; p < 5; p++) if (&dut.u_sa.eligible[2*p +: 2]) n_sa_compete++;
    prev_dir <= dir_outward;
  end
  always @(posedge nclk[0] or posedge nclk[1] or posedge nclk[2] or posedge nclk[3]) if (rst_n)
    for (int p = 0; p < 5; p++) for (int c = 0; c < 2; c++) if (conflict[p][c]) n_conflict++;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog: sent %0d %0d %0d %0d %0d rcvd %0d %0d %0d %0d %0d", sent[0], sent[1], sent[2], sent[3], sent[4],
             rcvd[0], rcvd[1], rcvd[2], rcvd[3], rcvd[4]);
    $display("own=%b busy=%b demand=%b fv=%b av=%b arb=%b dsr=%b", dut.own, dut.oc_busy, dut.demand,
             dut.flit_valid, dut.alloc_valid, dut.arb_req, dut.ds_ready);
    for (int i = 0; i < 10; i++) $display("vc%0d oc=%0d route=%0d head=%b flit=%h", i, dut.alloc_oc[i], dut.route[i], dut.flit_head[i], dut.flit[i]);
    $display("nic own %b %b %b %b %b", g_p[0].u_nic.own, g_p[1].u_nic.own, g_p[2].u_nic.own, g_p[3].u_nic.own, g_p[4].u_nic.own);
    $display("nic txv %b %b %b %b %b", g_p[0].u_nic.tx_valid, g_p[1].u_nic.tx_valid, g_p[2].u_nic.tx_valid, g_p[3].u_nic.tx_valid, g_p[4].u_nic.tx_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot_s, tot_r, tot_e;
    prev_dir = 10'b0101010101;
    #40 rst_n = 1;
    #50 start = 1;
    hold_local = 1;
    #8000 hold_local = 0;
    wait (done[0] && done[1] && done[2] && done[3] && done[4]);
    for (int t = 0; t < 2000; t++) begin
      @(posedge clk);
      tot_s = 0; tot_r = 0; tot_e = 0;
      for (int p = 0; p < 5; p++) begin tot_s += sent[p]; tot_r += rcvd[p]; tot_e += errs[p]; end
      if (tot_r == tot_s) break;
    end
    if (tot_r != tot_s) begin
      $display("own=%b busy=%b demand=%b want=%b fv=%b av=%b arb=%b dsr=%b dly=%b", dut.own, dut.oc_busy, dut.demand, dut.want,
               dut.flit_valid, dut.alloc_valid, dut.arb_req, dut.ds_ready, dir_delay);
      for (int i = 0; i < 10; i++) $display("vc%0d oc=%0d route=%0d flit=%h", i, dut.alloc_oc[i], dut.route[i], dut.flit[i]);
      $display("nic own %b %b %b %b %b", g_p[0].u_nic.own, g_p[1].u_nic.own, g_p[2].u_nic.own, g_p[3].u_nic.own, g_p[4].u_nic.own);
      $display("rcvd %0d %0d %0d %0d %0d", rcvd[0], rcvd[1], rcvd[2], rcvd[3], rcvd[4]);
    end
    check(tot_s == 5 * NPKT, $sformatf("sent %0d packets", tot_s));
    check(tot_r == tot_s, $sformatf("received %0d of %0d packets", tot_r, tot_s));
    check(tot_e == 0, $sformatf("%0d sink errors", tot_e));
    check(n_conflict == 0, $sformatf("%0d cycles with a channel driven from both ends", n_conflict));
    check(n_take > 0, $sformatf("router took a normal-mode channel %0d times", n_take));
    check(n_give > 0, $sformatf("router yielded a priority channel %0d times", n_give));
    check(n_delay > 0, "delay state never entered");
    check(n_full > 0, "no router buffer ever filled");
    check(n_stall > 0, "no flit ever waited for a full far buffer");
    check(n_sa_compete > 0, "switch allocator never arbitrated between two VCs");
    $display("packets=%0d takes=%0d yields=%0d delay_cycles=%0d full_cycles=%0d stall_cycles=%0d sa_compete=%0d",
             tot_r, n_take, n_give, n_delay, n_full, n_stall, n_sa_compete);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
