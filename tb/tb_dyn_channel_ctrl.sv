// tb_dyn_channel_ctrl: two channel controls facing each other across two
// unrelated clocks, as at the two ends of a link.
//
// Each end (A with clock period 10, B with period 13) has channel 0 in
// priority mode and channel 1 in normal mode, and A's channel c faces B's
// channel 1-c, so priority mode always faces normal mode.  Random demand on both sides.  Checks: both ends
// never drive the same channel at once, every end that keeps demanding a
// channel eventually owns it, the registered op_req crosses intact, and
// arbitration_request equals owner and demand.  Counts turnarounds.
module tb_dyn_channel_ctrl;
  logic clka = 0, clkb = 0, rst_n = 0;
  logic [1:0] req_a, req_b, op_a, op_b, dir_a, dir_b, arb_a, arb_b, dly_a, dly_b;
  logic [1:0] ip_a, ip_b;
  int checks = 0, failures = 0, turns = 0;
  int starve_a [2], starve_b [2];

  assign ip_a = {op_b[0], op_b[1]};
  assign ip_b = {op_a[0], op_a[1]};

  dyn_channel_ctrl dut_a (.clk(clka), .rst_n(rst_n), .priority_mode(2'b01), .req_channel(req_a),
    .ip_req(ip_a), .op_req(op_a), .direction_control(dir_a), .arbitration_request(arb_a), .in_delay(dly_a));
  dyn_channel_ctrl dut_b (.clk(clkb), .rst_n(rst_n), .priority_mode(2'b01), .req_channel(req_b),
    .ip_req(ip_b), .op_req(op_b), .direction_control(dir_b), .arbitration_request(arb_b), .in_delay(dly_b));

  always #5   clka = ~clka;
  always #6.5 clkb = ~clkb;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // no double drive, sampled continuously
  logic [1:0] prev_dir_a;
  always @(posedge clka or posedge clkb) if (rst_n) begin
    for (int c = 0; c < 2; c++) check(!(dir_a[c] && dir_b[1-c]), "both ends drive a channel");
  end

  always @(posedge clka) if (rst_n) begin
    for (int c = 0; c < 2; c++) begin
      if (dir_a[c] != prev_dir_a[c]) turns++;
      starve_a[c] = (req_a[c] && !dir_a[c]) ? starve_a[c] + 1 : 0;
      check(starve_a[c] < 200, "end A starves");
      check(arb_a[c] == (dir_a[c] && req_a[c]), "arbitration request A");
    end
    prev_dir_a <= dir_a;
  end
  always @(posedge clkb) if (rst_n) begin
    for (int c = 0; c < 2; c++) begin
      starve_b[c] = (req_b[c] && !dir_b[c]) ? starve_b[c] + 1 : 0;
      check(starve_b[c] < 200, "end B starves");
    end
  end

  initial begin
    req_a = 0; req_b = 0; prev_dir_a = 2'b01;
    starve_a = '{0, 0}; starve_b = '{0, 0};
    #30;
    check(dir_a == 2'b01 && dir_b == 2'b01, "after reset each end owns its priority channel");
    rst_n = 1;
    // A alone wants both channels
    @(negedge clka) req_a = 2'b11;
    repeat (40) @(negedge clka);
    check(dir_a == 2'b11 && dir_b == 2'b00, "A took both channels");
    // B wants its priority channel (B ch1 = A ch0) back
    req_a = 2'b10;
    @(negedge clkb) req_b = 2'b10;
    repeat (40) @(negedge clkb);
    check(dir_b[1] && !dir_a[0], "B regained its priority channel");
    // random demand
    for (int i = 0; i < 4000; i++) begin
      @(negedge clka);
      if ($urandom_range(0, 15) == 0) req_a = 2'($urandom);
      if ($urandom_range(0, 15) == 0) req_b = 2'($urandom);
    end
    check(turns > 10, $sformatf("channel turnarounds: %0d", turns));
    $display("turnarounds=%0d", turns);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
