// tb_route_compute: exhaustive check of XY routing at router (2,1): every
// destination in a 4-bit x 4-bit grid against the expected port.
module tb_route_compute;
  import mbinoc_pkg::*;
  logic [COORD_W-1:0] dx, dy;
  port_e port;
  int checks = 0, failures = 0;

  route_compute #(.X_COORD(4'd2), .Y_COORD(4'd1)) dut (.dst_x(dx), .dst_y(dy), .out_port(port));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    port_e exp;
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        dx = 4'(x); dy = 4'(y);
        #1;
        exp = (x > 2) ? PORT_E : (x < 2) ? PORT_W : (y > 1) ? PORT_N : (y < 1) ? PORT_S : PORT_L;
        checks++;
        if (port != exp) begin failures++; $display("(%0d,%0d): %0d expected %0d", x, y, port, exp); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
