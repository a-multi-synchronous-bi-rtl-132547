// dyn_channel_ctrl: dynamic channel control of one router port.
//
// A port has two bidirectional data channels.  Channel 0 is driven by a
// direction ASM in priority mode and channel 1 by one in normal mode (the
// mode input can swap them, which the network-interface side of a local port
// uses).  For each channel the module:
//   * synchronizes the far end's request (ip_req) with a two flip-flop
//     synchronizer into this router's clock,
//   * runs the direction ASM with the local demand (req_channel, from the
//     route computation / allocated packets) as direction_control,
//   * registers op_req before it leaves toward the far end, so the crossing
//     signal is glitch free,
//   * reports the direction (direction_control toward the FIFO and the
//     tri-state drivers: 1 = outward) and an arbitration request to the
//     switch allocator, high when the channel points outward and there is
//     data for it.
// From a request leaving this port to the far end's ASM reacting takes one
// register plus two synchronizer stages plus one state update.  The
// structure follows the design's router and dynamic channel control
// diagrams; the exact split of signals is this design's choice.
module dyn_channel_ctrl #(
  parameter int unsigned PRI_DELAY  = 4,
  parameter int unsigned NORM_DELAY = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic [1:0] priority_mode,     // per channel: 1 = priority mode
  input  logic [1:0] req_channel,       // local demand per channel
  input  logic [1:0] ip_req,            // far end's op_req, other clock domain
  output logic [1:0] op_req,            // registered request to the far end
  output logic [1:0] direction_control, // 1 = channel points outward
  output logic [1:0] arbitration_request,
  output logic [1:0] in_delay
);
  logic [1:0] ip_req_sync, op_req_c;

  sync_2ff #(.WIDTH(2)) u_sync (.clk(clk), .rst_n(rst_n), .d(ip_req), .q(ip_req_sync));

  for (genvar c = 0; c < 2; c++) begin : g_ch
    dcc_asm #(.PRI_DELAY(PRI_DELAY), .NORM_DELAY(NORM_DELAY)) u_asm (
      .clk              (clk),
      .rst_n            (rst_n),
      .priority_mode    (priority_mode[c]),
      .direction_control(req_channel[c]),
      .ip_req_sync      (ip_req_sync[c]),
      .op_req           (op_req_c[c]),
      .own              (direction_control[c]),
      .in_delay         (in_delay[c])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) op_req <= '0;
    else        op_req <= op_req_c;
  end

  assign arbitration_request = direction_control & req_channel;
endmodule
