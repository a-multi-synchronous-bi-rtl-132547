// tb_ms_fifo: multi-synchronous FIFO between two unrelated clocks.
//
// A random producer (write clock period 10) and a random consumer (read
// clock period 13.7) exchange 600 words; every word read must be the next
// one written (scoreboard).  It also checks the latency of an empty FIFO: a
// word written at one write edge shows out_valid on the second read edge
// after it, no earlier and (allowing one read period of phase) no later than
// the third.  The FIFO must become full at least once.  Runs at the default size (16 x 16).
module tb_ms_fifo;
  logic wclk = 0, rclk = 0, w_rst_n = 0, r_rst_n = 0;
  logic in_valid, in_ready, out_ready, out_valid, full, empty;
  logic [15:0] wdata, rdata;
  logic [15:0] queue [$];
  int checks = 0, failures = 0;
  int nwritten = 0, nread = 0, nfull = 0;
  realtime t_write;
  int redges;

  ms_fifo #(.WIDTH(16), .DEPTH(16)) dut (.*);

  always #5    wclk = ~wclk;
  always #6.85 rclk = ~rclk;

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; in_ready = 0; wdata = 0;
    #30 w_rst_n = 1; r_rst_n = 1;
    // latency of a single word into an empty FIFO
    @(negedge wclk);
    in_valid = 1; wdata = 16'hBEEF;
    @(posedge wclk);
    queue.push_back(wdata); nwritten++;
    t_write = $realtime;
    #1 in_valid = 0;
    redges = 0;
    while (!out_valid) begin @(posedge rclk); redges++; #1; end
    checks++;
    if (redges < 2 || redges > 3) begin
      failures++;
      $display("latency %0d read edges, expected 2..3", redges);
    end
    // drain it
    @(negedge rclk); in_ready = 1;
    checks++;
    if (rdata !== 16'hBEEF) begin failures++; $display("first word %h", rdata); end
    @(posedge rclk); #1 in_ready = 0;
    void'(queue.pop_front()); nread++;
    fork
      begin : producer
        while (nwritten < 600) begin
          @(negedge wclk);
          in_valid = ($urandom_range(0, 3) != 0);
          wdata    = 16'($urandom);
          @(posedge wclk);
          if (full) nfull++;
          if (in_valid && out_ready) begin queue.push_back(wdata); nwritten++; end
        end
        @(negedge wclk) in_valid = 0;
      end
      begin : consumer
        while (nread < 600) begin
          @(negedge rclk);
          // slow reader in bursts so the FIFO fills up
          in_ready = (nread % 100 < 50) ? ($urandom_range(0, 4) == 0) : 1'b1;
          @(posedge rclk);
          if (in_ready && out_valid) begin
            checks++;
            if (queue.size() == 0 || rdata !== queue[0]) begin
              failures++;
              $display("word %0d: got %h", nread, rdata);
            end
            if (queue.size() != 0) void'(queue.pop_front());
            nread++;
          end
        end
      end
    join
    checks++;
    if (nfull == 0) begin failures++; $display("FIFO never became full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
