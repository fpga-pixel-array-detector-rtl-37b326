// trigger: finds the "10" pattern that announces a pixel gang.
//
// The block keeps the previous bit of the serial line in a one-bit history
// register. In any cycle where the history holds 1, the current input bit is 0
// and `arm` is high, `trig` goes high (combinationally), so the state machine
// switches to receiving on that same edge and the very next bit on the line is
// the first data bit. `arm` is driven by the state machine in its waiting
// state, so a "10" inside a gang's data does not restart reception.
// `trigger_reg` shows the last two bits seen, {history, current}.
//
// The "10" pattern and the use of the state in the trigger follow the source
// description; the history register and the combinational compare are this
// design's choice.
module trigger (
  input  logic       clk,
  input  logic       reset,
  input  logic       d,
  input  logic       arm,
  output logic       trig,
  output logic [1:0] trigger_reg
);

  logic prev_bit;

  always_ff @(posedge clk or posedge reset) begin
    if (reset) prev_bit <= 1'b0;
    else       prev_bit <= d;
  end

  assign trigger_reg = {prev_bit, d};
  assign trig        = arm && (trigger_reg == pad_pkg::TRIGGER_PATTERN);

endmodule
