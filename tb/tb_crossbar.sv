// tb_crossbar: random flits and selects; every valid output must carry the
// selected input flit, every idle output zero.
module tb_crossbar;
  import mbinoc_pkg::*;
  flit_t in_flit [10];
  flit_t out_flit [10];
  logic [3:0] sel [10];
  logic [9:0] in_valid, out_valid;
  int checks = 0, failures = 0;

  crossbar dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < 10; i++) begin
        in_flit[i] = {$urandom, $urandom};
        sel[i]     = 4'($urandom_range(0, 9));
      end
      in_valid = 10'($urandom);
      #1;
      for (int o = 0; o < 10; o++) begin
        checks++;
        if (out_flit[o] !== (in_valid[o] ? in_flit[sel[o]] : '0) || out_valid[o] !== in_valid[o]) begin
          failures++;
          $display("output %0d wrong", o);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
