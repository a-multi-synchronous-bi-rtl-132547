// tb_dcc_asm: direction ASM in priority and normal mode.
//
// Two instances (one per mode) get the same random direction_control and
// ip_req_sync streams; a reference model written here from the state rules
// predicts state, op_req and own every cycle.  Directed checks then measure
// the delay-state lengths: the priority ASM spends PRI_DELAY+1 = 5 cycles in
// delay, the normal ASM NORM_DELAY+1 = 9 quiet cycles before it owns the
// channel.
module tb_dcc_asm;
  logic clk = 0, rst_n = 0;
  logic dc, ip;
  logic op_p, own_p, dly_p, op_n, own_n, dly_n;
  int checks = 0, failures = 0;

  dcc_asm dut_p (.clk(clk), .rst_n(rst_n), .priority_mode(1'b1), .direction_control(dc),
                 .ip_req_sync(ip), .op_req(op_p), .own(own_p), .in_delay(dly_p));
  dcc_asm dut_n (.clk(clk), .rst_n(rst_n), .priority_mode(1'b0), .direction_control(dc),
                 .ip_req_sync(ip), .op_req(op_n), .own(own_n), .in_delay(dly_n));

  always #5 clk = ~clk;

  // reference: 0 initial, 1 delay, 2 free
  int st_p, st_n, cnt_p, cnt_n;

  function automatic void model_step(bit pri, ref int st, ref int cnt, input bit d, input bit r);
    case (st)
      0: begin cnt = 0; if (pri ? d : (d && !r)) st = 1; end
      1: begin
        if (pri) begin if (cnt >= 4) st = 2; end
        else if (r) st = 0;
        else if (cnt >= 8) st = 2;
        cnt++;
      end
      default: if (pri ? (r && !d) : r) st = 0;
    endcase
  endfunction

  function automatic bit model_op(int st, bit d);
    return (st == 1) ? 1'b1 : (st == 2) ? d : 1'b0;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    dc = 0; ip = 0;
    st_p = 2; st_n = 0; cnt_p = 0; cnt_n = 0;
    repeat (2) @(posedge clk);
    #1;
    check(own_p && !own_n, "reset: priority owns, normal does not");
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // slowly changing inputs so that delays can complete
      if ($urandom_range(0, 9) == 0) dc = ~dc;
      if ($urandom_range(0, 11) == 0) ip = ~ip;
      #1;
      check(op_p == model_op(st_p, dc), "priority op_req");
      check(own_p == (st_p == 2), "priority own");
      check(dly_p == (st_p == 1), "priority delay");
      check(op_n == model_op(st_n, dc), "normal op_req");
      check(own_n == (st_n == 2), "normal own");
      check(dly_n == (st_n == 1), "normal delay");
      @(posedge clk);
      model_step(1, st_p, cnt_p, dc, ip);
      model_step(0, st_n, cnt_n, dc, ip);
    end
    // directed: priority yields, then reacquires after 5 delay cycles
    @(negedge clk); dc = 0; ip = 1;
    repeat (3) @(negedge clk);
    check(!own_p, "priority yields to request when idle");
    check(!own_n && !dly_n, "normal stays initial while far end requests");
    ip = 0; dc = 1;
    n = 0;
    while (!own_p) begin @(negedge clk); n++; end
    check(n == 6, $sformatf("priority reacquire: %0d cycles, expected 6 (1 initial + 5 delay)", n));
    // normal end: reaches free after 1 + 9 cycles
    @(negedge clk); dc = 0; ip = 1;
    repeat (3) @(negedge clk);
    ip = 0; dc = 1;
    n = 0;
    while (!own_n) begin @(negedge clk); n++; end
    check(n == 10, $sformatf("normal acquire: %0d cycles, expected 10 (1 initial + 9 delay)", n));
    ip = 1;
    @(negedge clk);
    check(!own_n, "normal releases at once on request");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
