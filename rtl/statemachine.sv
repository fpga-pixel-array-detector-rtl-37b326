// statemachine: sequences the reception of one pixel gang after another.
//
// States, in order:
//   idle       - entered on reset; clears counter and shift register and moves
//                to waiting on the next edge.
//   waiting    - arms the trigger detector; on `trigger` it moves to receiving.
//   receiving  - enables the counter and the shift register (one bit per
//                clock); when `count_done` reports the last bit it moves to
//                data_valid.
//   data_valid - enables the shift register's output for one cycle and clears
//                counter and shift register, then returns to waiting.
// Outputs are decoded from the state register (Moore), except `arm`, which is
// also a pure state decode. `reset` is asynchronous and active high.
//
// The four states, their meaning and the clear after each gang follow the
// source description; the transition conditions, the one-cycle idle and
// data_valid states and the encoding are this design's choices.
module statemachine
  import pad_pkg::*;
(
  input  logic   clk,
  input  logic   reset,
  input  logic   trigger,
  input  logic   count_done,
  output logic   arm,
  output logic   counter_enable,
  output logic   shiftregister_clr,
  output logic   shiftregister_output_enable,
  output state_t state
);

  state_t next;

  always_comb begin
    next = state;
    unique case (state)
      ST_IDLE:       next = ST_WAITING;
      ST_WAITING:    if (trigger)    next = ST_RECEIVING;
      ST_RECEIVING:  if (count_done) next = ST_DATA_VALID;
      ST_DATA_VALID: next = ST_WAITING;
      default:       next = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or posedge reset) begin
    if (reset) state <= ST_IDLE;
    else       state <= next;
  end

  assign arm                         = (state == ST_WAITING);
  assign counter_enable              = (state == ST_RECEIVING);
  assign shiftregister_clr           = (state == ST_IDLE) || (state == ST_DATA_VALID);
  assign shiftregister_output_enable = (state == ST_DATA_VALID);

endmodule
