// valid_empty_gen: read side of the multi-synchronous FIFO.
//
// Holds the read pointer as an (AW+1)-bit binary counter that advances on
// every accepted pop (in_ready while out_valid).  The low AW bits address the
// register file; the whole pointer goes out Gray coded (rptr_gray) for the
// synchronizer toward the write clock.  The write pointer arrives Gray coded
// and synchronized (wptr_sync), is turned back into binary and compared for
// equality with the read pointer: equal means empty.  out_valid is the
// inverse of empty.  Everything runs on rclk with an asynchronous active-low
// reset; the Gray output is registered so that it is glitch free.
module valid_empty_gen
  import mbinoc_pkg::*;
#(
  parameter int unsigned AW = 4
) (
  input  logic        rclk,
  input  logic        r_rst_n,
  input  logic        in_ready,
  input  logic [AW:0] wptr_sync,   // Gray coded, already synchronized
  output logic [AW-1:0] raddress,
  output logic [AW:0] rptr_gray,
  output logic        empty,
  output logic        out_valid,
  output logic        pop
);
  logic [AW:0] rnext;
  logic [AW:0] rbin, wbin;

  assign wbin      = (AW+1)'(gray2bin(16'(wptr_sync)));
  assign empty     = (rbin == wbin);
  assign out_valid = !empty;
  assign pop       = in_ready && out_valid;
  assign raddress  = rbin[AW-1:0];

  assign rnext = pop ? rbin + 1'b1 : rbin;

  always_ff @(posedge rclk or negedge r_rst_n) begin
    if (!r_rst_n) begin
      rbin      <= '0;
      rptr_gray <= '0;
    end else begin
      rbin <= rnext;
      rptr_gray <= (AW+1)'(bin2gray(16'(rnext)));
    end
  end
endmodule
