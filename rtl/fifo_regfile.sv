// fifo_regfile: dual-port register file of the multi-synchronous FIFO.
//
// One write port clocked by wclk (the sender's clock) and one combinational
// read port read from the receiver's clock domain.  A word is written at the
// rising edge of wclk when push is high.  The read port returns the word at
// radd without a clock, so the FIFO's output data is valid together with its
// valid flag.  The depth and width defaults (16 x 16) follow the RAM listed in
// the FIFO synthesis report; the router instantiates it at 32 x 64.  The
// memory has no reset: a word is only read after it has been written.
module fifo_regfile #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             wclk,
  input  logic             push,
  input  logic [AW-1:0]    wadd,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    radd,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge wclk) begin
    if (push) mem[wadd] <= wdata;
  end

  assign rdata = mem[radd];
endmodule
