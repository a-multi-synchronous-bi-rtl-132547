// tb_output_port_ctrl: random direction, crossbar and ready inputs; checks
// that the port drives the link only while the channel points outward and
// that ds_ready is the far end's ready qualified by the direction.
module tb_output_port_ctrl;
  import mbinoc_pkg::*;
  logic [1:0] direction_control, xbar_valid, far_ready, link_valid, link_oe, ds_ready;
  flit_t xbar_flit [2];
  flit_t link_data [2];
  int checks = 0, failures = 0;

  output_port_ctrl dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 400; t++) begin
      direction_control = 2'($urandom);
      xbar_valid = 2'($urandom);
      far_ready = 2'($urandom);
      for (int c = 0; c < 2; c++) xbar_flit[c] = {$urandom, $urandom};
      #1;
      for (int c = 0; c < 2; c++) begin
        checks += 4;
        if (link_oe[c] !== direction_control[c]) failures++;
        if (link_valid[c] !== (direction_control[c] & xbar_valid[c])) failures++;
        if (link_data[c] !== (direction_control[c] ? xbar_flit[c] : '0)) failures++;
        if (ds_ready[c] !== (direction_control[c] & far_ready[c])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
