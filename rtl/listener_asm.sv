// listener_asm: answering side of the four-phase inter-router handshake.
//
// States L_request0 and L_request1.  In L_request0 the listener holds
// op_req_L low until it sees the talker's request, synchronized into its own
// clock (in_req_syncT), go high; it then raises op_req_L (the acknowledge)
// in L_request1, pulses got_req, and holds it until the request falls again.
// op_req_L is a register, so it is glitch free when it crosses to the
// talker's clock domain.  States and outputs follow the design's handshake
// chart; the got_req pulse is this design's addition.
module listener_asm (
  input  logic clk_L,
  input  logic rst_n,
  input  logic in_req_syncT,
  output logic op_req_L,
  output logic got_req
);
  typedef enum logic {L_REQUEST0, L_REQUEST1} l_state_e;
  l_state_e state;

  always_ff @(posedge clk_L or negedge rst_n) begin
    if (!rst_n) begin
      state    <= L_REQUEST0;
      op_req_L <= 1'b0;
      got_req  <= 1'b0;
    end else begin
      got_req <= 1'b0;
      unique case (state)
        L_REQUEST0: if (in_req_syncT) begin
          state    <= L_REQUEST1;
          op_req_L <= 1'b1;
          got_req  <= 1'b1;
        end
        L_REQUEST1: if (!in_req_syncT) begin
          state    <= L_REQUEST0;
          op_req_L <= 1'b0;
        end
        default: state <= L_REQUEST0;
      endcase
    end
  end
endmodule
