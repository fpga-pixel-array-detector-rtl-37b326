// shiftregister: serial-in, parallel-out store for one pixel gang.
//
// On each rising edge with `shift_en` high the register shifts left by one and
// takes `d` into bit 0, so after GANG_BITS shifts the first bit received sits
// in bit GANG_BITS-1 and the last in bit 0. `clr` empties it synchronously and
// has priority over shifting; `reset` is asynchronous and active high. The
// parallel output `q` shows the contents only while `output_enable` is high and
// is zero otherwise.
//
// The 16 slots per gang, the shifting and the clear after each gang follow the
// source description. The shift direction (first bit ends up as the MSB) and
// the zero output when not enabled are this design's choices.
module shiftregister #(
  parameter int unsigned GANG_BITS = pad_pkg::GANG_BITS_DEFAULT
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 d,
  input  logic                 shift_en,
  input  logic                 clr,
  input  logic                 output_enable,
  output logic [GANG_BITS-1:0] q
);

  logic [GANG_BITS-1:0] slots;

  always_ff @(posedge clk or posedge reset) begin
    if (reset)         slots <= '0;
    else if (clr)      slots <= '0;
    else if (shift_en) slots <= {slots[GANG_BITS-2:0], d};
  end

  assign q = output_enable ? slots : '0;

endmodule
