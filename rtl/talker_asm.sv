// talker_asm: initiating side of the four-phase inter-router handshake.
//
// States idle, T_request1 and T_request0.  From idle the talker raises
// op_req_T (on start) and waits in T_request1 until the listener's
// acknowledge, synchronized into this clock (in_req_syncL), is seen high; it
// then drops op_req_T in T_request0 and waits for the acknowledge to fall,
// after which it returns to idle and pulses done.  op_req_T is a register, so
// it is glitch free when it crosses to the listener's clock domain.  The
// three states and their outputs follow the design's handshake chart; the
// start input and done pulse are this design's additions, since the chart
// leaves idle unconditionally.
module talker_asm (
  input  logic clk_T,
  input  logic rst_n,
  input  logic start,
  input  logic in_req_syncL,
  output logic op_req_T,
  output logic busy,
  output logic done
);
  typedef enum logic [1:0] {T_IDLE, T_REQUEST1, T_REQUEST0} t_state_e;
  t_state_e state;

  always_ff @(posedge clk_T or negedge rst_n) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      op_req_T <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        T_IDLE: begin
          op_req_T <= 1'b0;
          if (start) begin
            state    <= T_REQUEST1;
            op_req_T <= 1'b1;
          end
        end
        T_REQUEST1: if (in_req_syncL) begin
          state    <= T_REQUEST0;
          op_req_T <= 1'b0;
        end
        T_REQUEST0: if (!in_req_syncL) begin
          state <= T_IDLE;
          done  <= 1'b1;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  assign busy = (state != T_IDLE);
endmodule
