// tb_input_port_ctrl: input port controller of a router at (1,1), written
// from a far end in another clock (period 13) and read in the router clock
// (period 10).
//
// The far end pushes flits into both channels with valid/ready; the router
// side pops at random.  Each channel must deliver its flits in order, with
// head/tail decoded and the XY route of the destination.  The channel
// control must start with channel 0 outward and channel 1 inward, raise
// arbitration_request only for an outward channel with demand, and turn
// channel 0 over when the far end requests it while there is no demand.
module tb_input_port_ctrl;
  import mbinoc_pkg::*;
  logic clk = 0, nclk = 0, rst_n = 0;
  flit_t link_data [2];
  logic [1:0] link_valid, link_ready, ip_req, op_req, pop, flit_valid, flit_head, flit_tail;
  logic [1:0] req_channel, direction_control, arbitration_request, in_delay;
  flit_t flit [2];
  port_e route [2];
  flit_t q [2][$];
  int checks = 0, failures = 0, nrx = 0;

  input_port_ctrl #(.X_COORD(4'd1), .Y_COORD(4'd1)) dut (
    .clk(clk), .rst_n(rst_n), .nbr_clk(nclk), .nbr_rst_n(rst_n), .priority_mode(2'b01), .*);

  always #5   clk = ~clk;
  always #6.5 nclk = ~nclk;

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic port_e xy(flit_t f);
    if (flit_dx(f) > 1) return PORT_E;
    if (flit_dx(f) < 1) return PORT_W;
    if (flit_dy(f) > 1) return PORT_N;
    if (flit_dy(f) < 1) return PORT_S;
    return PORT_L;
  endfunction

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // far end: writer
  int nsent = 0;
  always @(posedge nclk) if (rst_n) begin
    for (int c = 0; c < 2; c++) if (link_valid[c] && link_ready[c]) begin q[c].push_back(link_data[c]); nsent++; end
    for (int c = 0; c < 2; c++) begin
      link_valid[c] <= (nsent < 800) && ($urandom_range(0, 2) != 0);
      link_data[c]  <= {$urandom, $urandom};
    end
  end

  // router side: reader
  always @(negedge clk) pop <= rst_n ? 2'($urandom) : 2'b00;
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 2; c++) begin
      if (flit_valid[c]) begin
        check(q[c].size() > 0, "flit only after a write");
        if (q[c].size() > 0) begin
          check(flit[c] == q[c][0], "flit order");
          check(flit_head[c] == flit[c][HEAD_BIT] && flit_tail[c] == flit[c][TAIL_BIT], "head/tail decode");
          check(route[c] == xy(flit[c]), "route");
        end
      end
      if (pop[c] && flit_valid[c]) begin void'(q[c].pop_front()); nrx++; end
    end
    check(arbitration_request == (direction_control & req_channel), "arbitration request");
  end

  initial begin
    link_valid = 0; link_data[0] = 0; link_data[1] = 0; ip_req = 0; req_channel = 0;
    #30;
    check(direction_control == 2'b01, "reset direction: channel 0 outward, channel 1 inward");
    rst_n = 1;
    #200;
    req_channel = 2'b01;
    ip_req = 2'b01;   // far end asks for channel 0 while it is busy
    #200;
    check(direction_control[0], "busy priority channel is kept");
    req_channel = 2'b00;
    #100;
    check(!direction_control[0], "idle priority channel is yielded");
    ip_req = 2'b00;
    req_channel = 2'b01;
    #100;
    check(direction_control[0], "priority channel regained");
    wait (nsent >= 800);
    #3000;
    check(nrx == nsent, $sformatf("received %0d of %0d flits", nrx, nsent));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
