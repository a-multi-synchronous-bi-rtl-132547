// tb_nic: traffic source and sink on one router port, for testbenches.
//
// Plays the far end of a router port: the local network interface or a
// neighbouring router.  Its channel 0 runs the direction ASM in normal mode
// and channel 1 in priority mode, so it faces the router's channel c with
// the same index c.  Each packet goes out whole on one channel, channel 1
// (which it owns after reset) three times in four, channel 0 otherwise; it
// asks for a channel while it has a flit for it and the router's FIFO has
// room.  It receives on both channels through two multi-synchronous FIFOs
// written in the router's clock.
//
// Traffic: after start it sends NPKT packets of 1..4 flits, each to one of
// the NDEST destinations packed in DESTS ({x,y} bytes), with random gaps.
// Flit: head/tail bits, destination, then source id (3 bits), packet number
// (16 bits), flit index (8 bits) and a 27-bit check word computed from them.
// The sink checks that each flit is addressed here, that packets arrive
// whole and in order on a channel, that the check word is right and that no
// packet arrives twice.  While rx_hold is high it stops reading its FIFOs,
// which backs traffic up into the router.
module tb_nic
  import mbinoc_pkg::*;
#(
  parameter int unsigned       BUF_DEPTH = 32,
  parameter logic [3:0]        MY_X      = 4'd0,
  parameter logic [3:0]        MY_Y      = 4'd0,
  parameter logic [2:0]        SRC_ID    = 3'd0,
  parameter int unsigned       NPKT      = 20,
  parameter int unsigned       NDEST     = 1,
  parameter logic [63:0]       DESTS     = '0,
  parameter int unsigned       GAP       = 3
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    router_clk,
  input  logic    router_rst_n,
  output ch_out_t nout [2],
  input  ch_in_t  nin  [2],
  input  logic    start,
  input  logic    rx_hold,
  output int      sent_pkts,
  output int      rcvd_pkts,
  output int      rcvd_flits,
  output int      errors,
  output int      tx_stalls,
  output logic    done_sending
);
  logic [1:0] own, op_req, arb_unused, dly_unused, rx_valid, rx_ready;
  flit_t      rx_flit [2];
  flit_t      tx_flit;
  logic       tx_valid, tx_ready, tx_ch;
  logic [1:0] want;

  function automatic logic [26:0] check_word(logic [2:0] s, logic [15:0] q, logic [7:0] i);
    return 27'({s, q, i} * 27'd2654435 + 27'h5a5a5a5);
  endfunction

  dyn_channel_ctrl u_dcc (
    .clk(clk), .rst_n(rst_n), .priority_mode(2'b10), .req_channel(want),
    .ip_req({nin[1].op_req, nin[0].op_req}), .op_req(op_req), .direction_control(own),
    .arbitration_request(arb_unused), .in_delay(dly_unused)
  );

  for (genvar c = 0; c < 2; c++) begin : g_rx
    logic full_u, empty_u;
    ms_fifo #(.WIDTH(FLIT_W), .DEPTH(BUF_DEPTH)) u_fifo (
      .wclk(router_clk), .w_rst_n(router_rst_n), .in_valid(nin[c].valid), .wdata(nin[c].data),
      .out_ready(rx_ready[c]), .full(full_u),
      .rclk(clk), .r_rst_n(rst_n), .in_ready(!rx_hold), .rdata(rx_flit[c]),
      .out_valid(rx_valid[c]), .empty(empty_u)
    );
    assign nout[c].ready  = rx_ready[c];
    assign nout[c].op_req = op_req[c];
  end

  for (genvar c = 0; c < 2; c++) begin : g_tx
    assign want[c]       = tx_valid && tx_ch == c && nin[c].ready;
    assign nout[c].oe    = own[c];
    assign nout[c].valid = own[c] && tx_valid && tx_ch == c;
    assign nout[c].data  = own[c] ? tx_flit : '0;
  end
  assign tx_ready = own[tx_ch] && nin[tx_ch].ready;

  // ---------------- source ----------------
  int pkt, idx, len, gap;
  logic [3:0] dx, dy;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pkt = 0; idx = 0; len = 0; gap = 0;
      tx_valid <= 1'b0; tx_flit <= '0; tx_ch <= 1'b1; sent_pkts <= 0; tx_stalls <= 0; done_sending <= 1'b0;
    end else begin
      if (tx_valid && !tx_ready) tx_stalls <= tx_stalls + 1;
      if (tx_valid && tx_ready) begin
        idx++;
        if (idx == len) begin
          pkt++; sent_pkts <= sent_pkts + 1;
          len = 0; idx = 0;
          gap = $urandom_range(0, GAP);
        end
      end
      if (!(tx_valid && !tx_ready)) begin
        if (len == 0) begin
          if (gap > 0) gap--;
          else if (start && pkt < int'(NPKT)) begin
            automatic int d = $urandom_range(0, NDEST - 1);
            len = $urandom_range(1, 4);
            idx = 0;
            tx_ch <= ($urandom_range(0, 3) != 0);
            {dx, dy} = DESTS[d*8 +: 8];
          end
        end
        if (len != 0) begin
          tx_valid <= 1'b1;
          tx_flit  <= {idx == 0, idx == len - 1, dx, dy, SRC_ID, 16'(pkt), 8'(idx),
                       check_word(SRC_ID, 16'(pkt), 8'(idx))};
        end else begin
          tx_valid <= 1'b0;
        end
      end
      done_sending <= (pkt >= int'(NPKT));
    end
  end

  // ---------------- sink ----------------
  logic       open_pkt [2];
  logic [2:0] cur_src  [2];
  logic [15:0] cur_seq [2];
  int         cur_idx  [2];
  logic [8*1024-1:0] seen;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rcvd_pkts = 0; rcvd_flits = 0; errors = 0; seen = '0;
      for (int c = 0; c < 2; c++) begin open_pkt[c] = 0; cur_idx[c] = 0; cur_src[c] = 0; cur_seq[c] = 0; end
    end else if (!rx_hold) begin
      for (int c = 0; c < 2; c++) if (rx_valid[c]) begin
        automatic flit_t f = rx_flit[c];
        automatic logic [2:0] s = f[53:51];
        automatic logic [15:0] q = f[50:35];
        automatic logic [7:0] i = f[34:27];
        rcvd_flits = rcvd_flits + 1;
        if (f[61:58] != MY_X || f[57:54] != MY_Y) begin
          errors = errors + 1; $display("NIC (%0d,%0d): misrouted flit %h", MY_X, MY_Y, f);
        end
        if (f[26:0] != check_word(s, q, i)) begin
          errors = errors + 1; $display("NIC (%0d,%0d): corrupt flit %h", MY_X, MY_Y, f);
        end
        if (f[HEAD_BIT]) begin
          if (open_pkt[c]) begin errors = errors + 1; $display("NIC (%0d,%0d): head inside packet", MY_X, MY_Y); end
          open_pkt[c] = 1; cur_src[c] = s; cur_seq[c] = q; cur_idx[c] = 0;
        end
        if (!open_pkt[c] || s != cur_src[c] || q != cur_seq[c] || int'(i) != cur_idx[c]) begin
          errors = errors + 1;
          $display("NIC (%0d,%0d): flit out of order %h", MY_X, MY_Y, f);
        end
        cur_idx[c]++;
        if (f[TAIL_BIT]) begin
          open_pkt[c] = 0;
          if (seen[{s, q[9:0]}]) begin errors = errors + 1; $display("NIC: duplicate packet"); end
          seen[{s, q[9:0]}] = 1'b1;
          rcvd_pkts = rcvd_pkts + 1;
        end
      end
    end
  end
endmodule
