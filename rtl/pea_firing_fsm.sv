// pea_firing_fsm: outer actor state machine of the accelerator.
//
// The accelerator is a dataflow actor. Its outer state machine has three
// states, IDLE, FIRING_START and FIRING_WAIT: in IDLE it waits until the actor
// is enabled (an instruction is waiting), FIRING_START starts one firing of
// the nested control FSM, which processes exactly one instruction, and
// FIRING_WAIT waits until that firing reports completion. The three states
// follow the accelerator's definition; their exact handshake (a one-cycle
// invoke pulse out, a one-cycle done pulse back) is this design's choice.
//
// Interface: enable is sampled in IDLE; invoke is high for the single cycle
// spent in FIRING_START; fire_done is expected in FIRING_WAIT; firing is high
// in both firing states. Timing: enable seen at edge t gives invoke in the
// cycle after t; after done, IDLE is reached at the next edge and the next
// firing can start one edge later.
module pea_firing_fsm (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,
  input  logic fire_done,
  output logic invoke,
  output logic firing
);
  typedef enum logic [1:0] {IDLE, FIRING_START, FIRING_WAIT} state_e;
  state_e state, next;

  always_comb begin
    next = state;
    unique case (state)
      IDLE:         if (enable) next = FIRING_START;
      FIRING_START: next = FIRING_WAIT;
      FIRING_WAIT:  if (fire_done) next = IDLE;
      default:      next = IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) state <= IDLE;
    else        state <= next;
  end

  assign invoke = (state == FIRING_START);
  assign firing = (state != IDLE);

  a_done_only_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
                                             fire_done |-> state == FIRING_WAIT)
    else $error("pea_firing_fsm: done outside a firing");
endmodule
