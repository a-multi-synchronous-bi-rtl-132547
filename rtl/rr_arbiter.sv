// rr_arbiter: round-robin arbiter.
//
// Grants one of N requesters per cycle (one-hot gnt).  The search starts one
// past the requester granted last, so every steady requester is served
// within N grants.  The pointer moves only when update is high and a grant
// was given, so a grant that is not used does not cost a requester its turn.
// Helper of the allocators.  The 32-bit loop index keeps the modulo
// arithmetic simple; only its low bits are used (verilator UNUSEDSIGNAL).
// In the two-router top, verilator reports UNOPTFLAT (circular logic) on
// gnt.  The loop it sees is gnt -> valid/data of a link struct -> the far
// router's ch_in struct -> its ready field -> the far switch allocator ->
// the far gnt -> back.  It is not real: ready comes only from FIFO pointer
// registers and never depends on valid, but verilator tracks each link
// struct as one signal.  It costs simulation speed only.
module rr_arbiter #(
  parameter int unsigned N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         update,
  output logic [N-1:0] gnt
);
  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;
  logic [IW-1:0] last;

  always_comb begin
    int unsigned idx;
    logic found;
    gnt   = '0;
    found = 1'b0;
    for (int unsigned k = 1; k <= N; k++) begin
      idx = (int'(last) + k) % N;
      if (req[idx] && !found) begin
        gnt[idx] = 1'b1;
        found    = 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) last <= IW'(N - 1);
    else if (update && gnt != '0) begin
      for (int unsigned i = 0; i < N; i++) if (gnt[i]) last <= IW'(i);
    end
  end
endmodule
