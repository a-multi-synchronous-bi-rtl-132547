// dcc_asm: direction ASM of one end of a bidirectional channel.
//
// Decides, for one channel end, whether the channel currently points outward
// (this end may drive it: own = 1).  The two ends of a channel run the same
// three-state machine (initial, delay, free) in different modes, chosen by
// the mode input: priority mode at one end, normal mode at the other.
//
//  Priority mode starts in free (it owns the channel after reset).
//    free:    op_req = direction_control.  Stays while the far end does not
//             request (ip_req_sync = 0) or while there is local data
//             (direction_control = 1); otherwise yields and goes to initial.
//    initial: op_req = 0, counter cleared.  Goes to delay when local data
//             appears (direction_control = 1).
//    delay:   op_req = 1, counter counts up; after PRI_DELAY+1 cycles (the
//             counter has reached PRI_DELAY) it returns to free.  The delay
//             gives the far end time to see op_req and release the channel.
//  Normal mode starts in initial (the far end owns the channel).
//    initial: op_req = 0, counter cleared.  Goes to delay when the far end
//             does not request (ip_req_sync = 0) and there is local data.
//    delay:   op_req = 1, counter counts up.  Back to initial at once if the
//             far end requests; after NORM_DELAY+1 quiet cycles it goes free.
//    free:    op_req = direction_control.  Back to initial at once when the
//             far end requests.
//
// ip_req_sync must already be synchronized to clk.  op_req is combinational
// from the state and the demand; the caller registers it before it leaves the
// router.  The states, outputs and transitions follow the design's two ASM
// charts.  The priority delay of 4 is printed in its chart; for the normal
// ASM the description asks for eight cycles while its chart prints 4, and
// this implementation follows the eight.  Counter width and the exact cycle
// count of the delay state (the counter is tested before it increments, as an
// ASM chart reads) are this design's choice.
module dcc_asm #(
  parameter int unsigned PRI_DELAY  = 4,
  parameter int unsigned NORM_DELAY = 8,
  parameter int unsigned CNT_W      = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic priority_mode,      // 1: priority mode, 0: normal mode
  input  logic direction_control,  // local data wants this channel
  input  logic ip_req_sync,        // far end's request, synchronized
  output logic op_req,             // request toward the far end
  output logic own,                // channel points outward (this end drives)
  output logic in_delay            // ASM is in its delay state
);
  typedef enum logic [1:0] {
    ST_INITIAL = 2'd0,
    ST_DELAY   = 2'd1,
    ST_FREE    = 2'd2
  } state_e;

  state_e             state, state_nx;
  logic [CNT_W-1:0]   counter, counter_nx;

  always_comb begin
    state_nx   = state;
    counter_nx = counter;
    op_req     = 1'b0;
    unique case (state)
      ST_INITIAL: begin
        op_req     = 1'b0;
        counter_nx = '0;
        if (priority_mode) begin
          if (direction_control) state_nx = ST_DELAY;
        end else begin
          if (!ip_req_sync && direction_control) state_nx = ST_DELAY;
        end
      end
      ST_DELAY: begin
        op_req     = 1'b1;
        counter_nx = counter + 1'b1;
        if (priority_mode) begin
          if (counter >= CNT_W'(PRI_DELAY)) state_nx = ST_FREE;
        end else begin
          if (ip_req_sync)                        state_nx = ST_INITIAL;
          else if (counter >= CNT_W'(NORM_DELAY)) state_nx = ST_FREE;
        end
      end
      ST_FREE: begin
        op_req = direction_control;
        if (priority_mode) begin
          if (ip_req_sync && !direction_control) state_nx = ST_INITIAL;
        end else begin
          if (ip_req_sync) state_nx = ST_INITIAL;
        end
      end
      default: state_nx = ST_INITIAL;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= priority_mode ? ST_FREE : ST_INITIAL;
      counter <= '0;
    end else begin
      state   <= state_nx;
      counter <= counter_nx;
    end
  end

  assign own      = (state == ST_FREE);
  assign in_delay = (state == ST_DELAY);
endmodule
