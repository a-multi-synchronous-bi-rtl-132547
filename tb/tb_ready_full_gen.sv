// tb_ready_full_gen: drives the write side with a read pointer that stays at
// zero, checks that it accepts exactly DEPTH words before full rises, that
// the Gray-coded pointer is the Gray code of the word count, and that full
// falls again when the (Gray-coded) read pointer advances.
module tb_ready_full_gen;
  localparam int AW = 3;
  logic wclk = 0, w_rst_n = 0, in_valid;
  logic [AW:0] rptr_sync, wptr_gray;
  logic [AW-1:0] waddress;
  logic full, out_ready, push;
  int checks = 0, failures = 0;
  int count;

  ready_full_gen #(.AW(AW)) dut (.*);

  always #5 wclk = ~wclk;

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
    in_valid = 0; rptr_sync = 0; count = 0;
    repeat (2) @(posedge wclk);
    #1 w_rst_n = 1;
    check(!full && out_ready, "not full after reset");
    // fill: keep in_valid high for 12 cycles; only 8 may be accepted
    for (int i = 0; i < 12; i++) begin
      @(negedge wclk);
      in_valid = 1;
      #1;
      check(push == (count < 8), "push only while not full");
      check(full == (count >= 8), "full exactly at DEPTH words");
      check(waddress == AW'(count), "write address follows count");
      @(posedge wclk);
      if (push) count++;
      #1 check(wptr_gray == gray(count), "Gray pointer");
    end
    in_valid = 0;
    // reader consumed 3 words (Gray-coded pointer arrives)
    for (int r = 1; r <= 3; r++) begin
      @(negedge wclk);
      rptr_sync = gray(r);
      #1 check(!full && out_ready, "space after read pointer moves");
    end
    // refill up to full again
    for (int i = 0; i < 5; i++) begin
      @(negedge wclk);
      in_valid = 1;
      @(posedge wclk);
      if (push) count++;
    end
    @(negedge wclk);
    in_valid = 0;
    check(count == 11 && full, "full again after 3 more words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
