// tb_switch_allocator: random eligibility patterns.  Checks that a VC is
// popped only when it holds a channel, has a flit, the channel has an
// arbitration request and the far FIFO is ready; that each input port pops
// at most one VC and pops one whenever it has an eligible VC; that the
// crossbar select and valid point from the popped VC to its channel; that
// tail flits release; and that two VCs of one port that stay eligible are
// served alternately.
module tb_switch_allocator;
  localparam int NI = 10, NO = 10;
  logic clk = 0, rst_n = 0;
  logic [NI-1:0] alloc_valid, flit_valid, flit_tail, pop, release_vc;
  logic [3:0] alloc_oc [NI];
  logic [NO-1:0] arbitration_request, ds_ready, xbar_valid;
  logic [3:0] sel [NO];
  int checks = 0, failures = 0;

  switch_allocator dut (.*);

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
    logic [NI-1:0] elig;
    int perm [NO];
    logic [NI-1:0] last_pop;
    alloc_valid = 0; flit_valid = 0; flit_tail = 0; arbitration_request = 0; ds_ready = 0;
    for (int i = 0; i < NI; i++) alloc_oc[i] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    last_pop = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // a random permutation: each VC holds a distinct output channel
      for (int o = 0; o < NO; o++) perm[o] = o;
      perm.shuffle();
      for (int i = 0; i < NI; i++) begin
        alloc_oc[i]    = 4'(perm[i]);
        alloc_valid[i] = ($urandom_range(0, 3) != 0);
        flit_valid[i]  = ($urandom_range(0, 3) != 0);
        flit_tail[i]   = 1'($urandom);
      end
      arbitration_request = NO'($urandom) | NO'($urandom);
      ds_ready            = NO'($urandom) | NO'($urandom);
      if (cyc >= 2500) begin  // fairness phase: everything eligible
        alloc_valid = '1; flit_valid = '1; arbitration_request = '1; ds_ready = '1;
      end
      #1;
      for (int i = 0; i < NI; i++)
        elig[i] = alloc_valid[i] && flit_valid[i] && arbitration_request[alloc_oc[i]] && ds_ready[alloc_oc[i]];
      for (int p = 0; p < 5; p++) begin
        check($countones(pop[2*p +: 2]) <= 1, "one pop per input port");
        check((pop[2*p +: 2] != 0) == (elig[2*p +: 2] != 0), "port with eligible VC pops");
        if (cyc > 2501) check(pop[2*p +: 2] != last_pop[2*p +: 2], "round robin alternates");
      end
      for (int i = 0; i < NI; i++) begin
        if (pop[i]) begin
          check(elig[i], "pop only when eligible");
          check(xbar_valid[alloc_oc[i]] && sel[alloc_oc[i]] == 4'(i), "crossbar select");
        end
        check(release_vc[i] == (pop[i] && flit_tail[i]), "release on tail");
      end
      check($countones(xbar_valid) == $countones(pop), "one crossbar output per pop");
      last_pop = pop;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
