// tb_sync_2ff: checks that the two flip-flop synchronizer delays its input
// by exactly two clock edges and clears on reset.
module tb_sync_2ff;
  logic clk = 0, rst_n = 0;
  logic [3:0] d, q;
  logic [3:0] hist [3];
  int checks = 0, failures = 0;

  sync_2ff #(.WIDTH(4)) dut (.clk(clk), .rst_n(rst_n), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = 0;
    repeat (2) @(posedge clk);
    #1 checks++; if (q !== 0) failures++;
    rst_n = 1;
    hist[0] = 0; hist[1] = 0; hist[2] = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d = 4'($urandom);
      @(posedge clk);
      hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      #1;
      checks++;
      if (q !== hist[1]) begin
        failures++;
        $display("mismatch at %0d: q=%h expected %h", i, q, hist[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
