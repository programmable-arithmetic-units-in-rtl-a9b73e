// loop_fsm: one of the control unit's loop state machines.
//
// It turns one backward edge of the control state graph into a counted
// loop. When the sequencer steps out of the loop's end state (at_end & step),
// the FSM says whether to jump back to the loop's first state: it does so
// `count` times, then lets the sequencer fall through once and rearms, so
// that the loop runs again in full the next time it is entered (a loop
// nested inside another one starts afresh on every outer pass).
//   IDLE    : not inside the loop; at the end state it jumps if count > 0
//             and loads remaining = count - 1.
//   LOOPING : inside the loop; it jumps while remaining > 0, counting down,
//             and returns to IDLE on the pass where it does not jump.
// jump is combinational; the state changes on the clock edge of a step.
// The document gives three such FSMs and loops repeated n, m and k times;
// the meaning of count (number of backward jumps) is this design's choice.
module loop_fsm #(
  parameter int unsigned CNT_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] count,   // programmed number of backward jumps
  input  logic             at_end,  // current state is this loop's end state
  input  logic             step,    // the sequencer advances this cycle
  output logic             jump,    // take the backward edge
  output logic             active   // inside the loop (for status)
);
  typedef enum logic {IDLE = 1'b0, LOOPING = 1'b1} loop_state_e;

  loop_state_e     st;
  logic [CNT_W-1:0] remaining;

  always_comb begin
    jump   = at_end && ((st == IDLE) ? (count != '0) : (remaining != '0));
    active = (st == LOOPING);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= IDLE;
      remaining <= '0;
    end else if (at_end && step) begin
      if (st == IDLE) begin
        if (count != '0) begin
          st        <= LOOPING;
          remaining <= count - 1'b1;
        end
      end else if (remaining != '0) begin
        remaining <= remaining - 1'b1;
      end else begin
        st <= IDLE;
      end
    end
  end
endmodule
