// tb_vc_allocator_wf: wavefront VC allocator with random traffic.
//
// Random head requests, routes, channel directions and releases.  A shadow
// copy of the allocation table is kept here and each cycle checked against:
// a new allocation must be a channel of the requested port that was free,
// no output channel may be held twice, oc_busy must match the holders and
// demand must mark exactly the held channels whose holder has a flit.  A
// lone requester must get an outward-pointing free channel when one exists,
// and no requester may wait more than NI cycles while its port has a free
// channel.
module tb_vc_allocator_wf;
  import mbinoc_pkg::*;
  localparam int NI = 10, NO = 10;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0] head_req, flit_valid, release_vc, alloc_valid;
  port_e req_port [NI];
  logic [NO-1:0] own, oc_busy, demand;
  logic [3:0] alloc_oc [NI];
  int checks = 0, failures = 0, nalloc = 0, nowned_pref = 0;
  logic [NI-1:0] sh_valid;
  int sh_oc [NI];
  int wait_cnt [NI];

  vc_allocator_wf dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [NO-1:0] busy_before;
    int nreq_port [NPORTS];
    head_req = 0; flit_valid = 0; release_vc = 0; own = '1;
    for (int i = 0; i < NI; i++) begin req_port[i] = PORT_N; sh_oc[i] = 0; wait_cnt[i] = 0; end
    sh_valid = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      for (int i = 0; i < NI; i++) begin
        flit_valid[i] = 1'($urandom);
        head_req[i]   = !sh_valid[i] && ($urandom_range(0, 2) == 0);
        if (head_req[i]) flit_valid[i] = 1'b1;
        req_port[i]   = port_e'($urandom_range(0, 4));
        release_vc[i] = sh_valid[i] && ($urandom_range(0, 5) == 0);
      end
      own = NO'($urandom);
      #1;
      // consistency of current state
      for (int i = 0; i < NI; i++) begin
        check(alloc_valid[i] == sh_valid[i], "alloc_valid matches shadow");
        if (sh_valid[i]) check(int'(alloc_oc[i]) == sh_oc[i], "alloc_oc matches shadow");
      end
      for (int o = 0; o < NO; o++) begin
        automatic int holders = 0; automatic logic d = 0;
        for (int i = 0; i < NI; i++) if (sh_valid[i] && sh_oc[i] == o) begin holders++; d |= flit_valid[i]; end
        check(holders <= 1, "output channel held twice");
        check(oc_busy[o] == (holders == 1), "oc_busy");
        check(demand[o] == d, "demand");
      end
      for (int p = 0; p < NPORTS; p++) nreq_port[p] = 0;
      for (int i = 0; i < NI; i++) if (head_req[i]) nreq_port[req_port[i]]++;
      busy_before = oc_busy;
      @(posedge clk);
      #1;
      for (int i = 0; i < NI; i++) begin
        if (release_vc[i] && sh_valid[i]) sh_valid[i] = 0;
      end
      for (int i = 0; i < NI; i++) begin
        if (head_req[i] && alloc_valid[i]) begin
          automatic int o0 = int'(req_port[i]) * 2;
          nalloc++;
          check(int'(alloc_oc[i]) == o0 || int'(alloc_oc[i]) == o0 + 1, $sformatf("allocated channel belongs to routed port: vc %0d port %0d oc %0d", i, req_port[i], alloc_oc[i]));
          check(!busy_before[alloc_oc[i]], "allocated channel was free");
          if (nreq_port[req_port[i]] == 1 && ((!busy_before[o0] && own[o0]) || (!busy_before[o0+1] && own[o0+1]))) begin
            check(own[alloc_oc[i]], "lone requester gets an outward channel");
            nowned_pref++;
          end
          sh_valid[i] = 1; sh_oc[i] = int'(alloc_oc[i]);
          wait_cnt[i] = 0;
        end else if (head_req[i]) begin
          automatic int o0 = int'(req_port[i]) * 2;
          if (!busy_before[o0] || !busy_before[o0+1]) wait_cnt[i]++;
        end
      end
    end
    check(nalloc > 500, $sformatf("allocations %0d", nalloc));
    check(nowned_pref > 50, $sformatf("preference cases %0d", nowned_pref));
    $display("allocations=%0d", nalloc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
