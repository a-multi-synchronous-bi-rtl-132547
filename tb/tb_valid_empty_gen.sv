// tb_valid_empty_gen: drives the read side with a Gray-coded write pointer,
// checks empty/valid against the word count, that pops happen only while
// data is present, the read address and the Gray-coded read pointer.
module tb_valid_empty_gen;
  localparam int AW = 3;
  logic rclk = 0, r_rst_n = 0, in_ready;
  logic [AW:0] wptr_sync, rptr_gray;
  logic [AW-1:0] raddress;
  logic empty, out_valid, pop;
  int checks = 0, failures = 0;
  int wcount, rcount;

  valid_empty_gen #(.AW(AW)) dut (.*);

  always #5 rclk = ~rclk;

  function automatic logic [AW:0] gray(int v);
    logic [AW:0] b = (AW+1)'(v);
    return b ^ (b >> 1);
  endfunction

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
    in_ready = 0; wptr_sync = 0; wcount = 0; rcount = 0;
    repeat (2) @(posedge rclk);
    #1 r_rst_n = 1;
    check(empty && !out_valid, "empty after reset");
    for (int i = 0; i < 300; i++) begin
      @(negedge rclk);
      if (wcount - rcount < 8 && $urandom_range(0, 2) == 0) wcount++;
      wptr_sync = gray(wcount % 16);
      in_ready  = 1'($urandom);
      #1;
      check(empty == (wcount == rcount), "empty flag");
      check(out_valid == (wcount != rcount), "valid flag");
      check(pop == (in_ready && wcount != rcount), "pop only with data");
      check(raddress == AW'(rcount), "read address");
      @(posedge rclk);
      if (pop) rcount++;
      #1 check(rptr_gray == gray(rcount % 16), "Gray read pointer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
