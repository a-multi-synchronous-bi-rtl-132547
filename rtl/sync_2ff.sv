// sync_2ff: two flip-flop synchronizer.
//
// Brings a signal (or a Gray-coded pointer, where only one bit changes at a
// time) into the clock domain of clk.  The input is sampled by a first
// flip-flop and passed through a second one, so the output lags the input by
// two clk edges.  Used for the FIFO pointers and for the channel request
// signals between neighbouring routers, as in the design's block diagrams.
// The asynchronous active-low reset clears both stages; the reset is this
// design's own choice.
module sync_2ff #(
  parameter int unsigned WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  logic [WIDTH-1:0] meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= '0;
      q    <= '0;
    end else begin
      meta <= d;
      q    <= meta;
    end
  end
endmodule
