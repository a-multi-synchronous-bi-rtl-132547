// ms_fifo: multi-synchronous FIFO with valid/ready interfaces on both sides.
//
// Carries data between two clock domains of unrelated phase and frequency.
// The write side (wclk, the sender's clock) accepts a word when in_valid and
// out_ready are both high; the read side (rclk, the receiver's clock) hands
// out a word when out_valid and in_ready are both high.  Inside are a
// dual-port register file, the ready/full generator on the write side, the
// valid/empty generator on the read side, and two two-flip-flop synchronizers
// that carry the Gray-coded pointers across.  Pointers are log2(DEPTH)+1 bits
// wide.  The Gray pointer register loads at the write edge itself, so a
// written word becomes visible at the read side on the second rclk edge after
// the write edge (the two synchronizer stages), plus up to one rclk period of
// phase; space freed by a pop reaches the write side the same way.  rdata is combinational from the register file.  The structure
// follows the design's FIFO block diagram; the reset style is this design's
// own.  DEPTH must be a power of two.
module ms_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  // write clock domain (sender side)
  input  logic             wclk,
  input  logic             w_rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] wdata,
  output logic             out_ready,
  output logic             full,
  // read clock domain (receiver side)
  input  logic             rclk,
  input  logic             r_rst_n,
  input  logic             in_ready,
  output logic [WIDTH-1:0] rdata,
  output logic             out_valid,
  output logic             empty
);
  logic [AW-1:0] waddress, raddress;
  logic [AW:0]   wptr_gray, rptr_gray, wptr_sync, rptr_sync;
  logic          push, pop;

  fifo_regfile #(.WIDTH(WIDTH), .DEPTH(DEPTH)) u_rf (
    .wclk (wclk), .push(push), .wadd(waddress), .wdata(wdata),
    .radd (raddress), .rdata(rdata)
  );

  ready_full_gen #(.AW(AW)) u_wside (
    .wclk (wclk), .w_rst_n(w_rst_n), .in_valid(in_valid),
    .rptr_sync(rptr_sync), .waddress(waddress), .wptr_gray(wptr_gray),
    .full (full), .out_ready(out_ready), .push(push)
  );

  valid_empty_gen #(.AW(AW)) u_rside (
    .rclk (rclk), .r_rst_n(r_rst_n), .in_ready(in_ready),
    .wptr_sync(wptr_sync), .raddress(raddress), .rptr_gray(rptr_gray),
    .empty(empty), .out_valid(out_valid), .pop(pop)
  );

  sync_2ff #(.WIDTH(AW+1)) u_w2r (.clk(rclk), .rst_n(r_rst_n), .d(wptr_gray), .q(wptr_sync));
  sync_2ff #(.WIDTH(AW+1)) u_r2w (.clk(wclk), .rst_n(w_rst_n), .d(rptr_gray), .q(rptr_sync));

  // Write-side rule: never push into a full FIFO; read side: never pop empty.
  a_no_overflow: assert property (@(posedge wclk) disable iff (!w_rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge rclk) disable iff (!r_rst_n) pop |-> !empty);
endmodule
