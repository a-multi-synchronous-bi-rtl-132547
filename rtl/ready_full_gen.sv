// ready_full_gen: write side of the multi-synchronous FIFO.
//
// Holds the write pointer as an (AW+1)-bit binary counter that advances on
// every accepted push (in_valid while out_ready).  The low AW bits address the
// register file; the whole pointer goes out Gray coded (wptr_gray) for the
// synchronizer toward the read clock.  The read pointer arrives Gray coded and
// synchronized (rptr_sync), is turned back into binary, and the FIFO is full
// when the two pointers differ in their MSB and agree in all lower bits.
// out_ready is the inverse of full.  The Gray output is registered so that it
// is glitch free when it crosses clock domains.  Everything runs on wclk with
// an asynchronous active-low reset.
module ready_full_gen
  import mbinoc_pkg::*;
#(
  parameter int unsigned AW = 4
) (
  input  logic        wclk,
  input  logic        w_rst_n,
  input  logic        in_valid,
  input  logic [AW:0] rptr_sync,   // Gray coded, already synchronized
  output logic [AW-1:0] waddress,
  output logic [AW:0] wptr_gray,
  output logic        full,
  output logic        out_ready,
  output logic        push
);
  logic [AW:0] wnext;
  logic [AW:0] wbin, rbin;

  assign rbin = (AW+1)'(gray2bin(16'(rptr_sync)));

  assign full      = (wbin[AW] != rbin[AW]) && (wbin[AW-1:0] == rbin[AW-1:0]);
  assign out_ready = !full;
  assign push      = in_valid && out_ready;
  assign waddress  = wbin[AW-1:0];

  assign wnext = push ? wbin + 1'b1 : wbin;

  always_ff @(posedge wclk or negedge w_rst_n) begin
    if (!w_rst_n) begin
      wbin      <= '0;
      wptr_gray <= '0;
    end else begin
      wbin <= wnext;
      wptr_gray <= (AW+1)'(bin2gray(16'(wnext)));
    end
  end
endmodule
