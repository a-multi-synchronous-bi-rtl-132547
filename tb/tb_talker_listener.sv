// tb_talker_listener: four-phase handshake between talker (period 10) and
// listener (period 17), each request through a two flip-flop synchronizer.
// Checks the four phases in order (request up, acknowledge up, request down,
// acknowledge down), that each start gives exactly one listener event and
// one done, and that a handshake completes within a bounded time.
module tb_talker_listener;
  logic clkt = 0, clkl = 0, rst_n = 0;
  logic start, op_req_T, op_req_L, syncT, syncL, busy, done, got;
  int checks = 0, failures = 0, ndone = 0, ngot = 0;

  talker_asm   u_t (.clk_T(clkt), .rst_n(rst_n), .start(start), .in_req_syncL(syncL),
                    .op_req_T(op_req_T), .busy(busy), .done(done));
  sync_2ff     u_s1 (.clk(clkl), .rst_n(rst_n), .d(op_req_T), .q(syncT));
  listener_asm u_l (.clk_L(clkl), .rst_n(rst_n), .in_req_syncT(syncT), .op_req_L(op_req_L),
                    .got_req(got));
  sync_2ff     u_s2 (.clk(clkt), .rst_n(rst_n), .d(op_req_L), .q(syncL));

  always #5   clkt = ~clkt;
  always #8.5 clkl = ~clkl;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // phase order: 0 idle, 1 req up, 2 ack up, 3 req down, back to 0 on ack down
  int phase = 0;
  always @(op_req_T or op_req_L) if (rst_n) begin
    case (phase)
      0: begin check(op_req_T && !op_req_L, "phase 1: request rises first"); phase = 1; end
      1: begin check(op_req_T && op_req_L, "phase 2: acknowledge rises"); phase = 2; end
      2: begin check(!op_req_T && op_req_L, "phase 3: request falls"); phase = 3; end
      default: begin check(!op_req_T && !op_req_L, "phase 4: acknowledge falls"); phase = 0; end
    endcase
  end
  always @(posedge clkt) if (rst_n && done) ndone++;
  always @(posedge clkl) if (rst_n && got) ngot++;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    start = 0;
    #25 rst_n = 1;
    for (int k = 0; k < 50; k++) begin
      @(negedge clkt) start = 1;
      @(negedge clkt) start = 0;
      t = 0;
      while (!done) begin @(posedge clkt); #1; t++; end
      check(t < 30, $sformatf("handshake took %0d talker cycles", t));
      repeat ($urandom_range(0, 5)) @(negedge clkt);
    end
    repeat (5) @(negedge clkt);
    check(ndone == 50, $sformatf("done pulses %0d", ndone));
    check(ngot == 50, $sformatf("listener events %0d", ngot));
    check(phase == 0 && !busy, "back to idle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
