// tb_bidir_channel: random channel-end outputs; checks the resolved wires
// seen by each end, the cross-over of ready and op_req, and the conflict
// flag.
module tb_bidir_channel;
  import mbinoc_pkg::*;
  ch_out_t a_out, b_out;
  ch_in_t  a_in, b_in;
  logic conflict;
  int checks = 0, failures = 0;

  bidir_channel dut (.*);

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      a_out = {$urandom, $urandom, 4'($urandom)};
      b_out = {$urandom, $urandom, 4'($urandom)};
      #1;
      check(b_in.valid == (a_out.oe && a_out.valid), "valid A to B");
      check(a_in.valid == (b_out.oe && b_out.valid), "valid B to A");
      if (a_out.oe) check(b_in.data == a_out.data, "data A to B");
      if (b_out.oe && !a_out.oe) check(a_in.data == b_out.data, "data B to A");
      check(a_in.ready == b_out.ready && b_in.ready == a_out.ready, "ready cross-over");
      check(a_in.op_req == b_out.op_req && b_in.op_req == a_out.op_req, "request cross-over");
      check(conflict == (a_out.oe && b_out.oe), "conflict flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
