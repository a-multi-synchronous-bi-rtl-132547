// tb_fifo_regfile: writes random words to random addresses of the register
// file and checks the combinational read port against a reference array.
module tb_fifo_regfile;
  logic wclk = 0;
  logic push;
  logic [3:0] wadd, radd;
  logic [15:0] wdata, rdata;
  logic [15:0] ref_mem [16];
  logic [15:0] written;
  int checks = 0, failures = 0;

  fifo_regfile #(.WIDTH(16), .DEPTH(16)) dut (.*);

  always #5 wclk = ~wclk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    written = '0;
    push = 0; wadd = 0; radd = 0; wdata = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge wclk);
      push  = 1'($urandom);
      wadd  = 4'($urandom);
      wdata = 16'($urandom);
      radd  = 4'($urandom);
      #1;
      if (written[radd]) begin
        checks++;
        if (rdata !== ref_mem[radd]) begin
          failures++;
          $display("read %0d: %h expected %h", radd, rdata, ref_mem[radd]);
        end
      end
      @(posedge wclk);
      if (push) begin ref_mem[wadd] = wdata; written[wadd] = 1'b1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
