// counter: counts the data bits of one pixel gang.
//
// While `enable` is high the count goes up by one per clock. `done` is high in
// the cycle whose rising edge shifts in the last (GANG_BITS-th) bit, so the
// state machine can leave its receiving state on that same edge. `clr` resets
// the count synchronously and has priority over `enable`; `reset` is
// asynchronous and active high.
//
// Counting to 16 bits per gang and being cleared by the state machine after each
// gang follow the source description. The width, the clear priority and the
// combinational `done` are this design's choices.
module counter #(
  parameter int unsigned GANG_BITS = pad_pkg::GANG_BITS_DEFAULT,
  localparam int unsigned CW = $clog2(GANG_BITS + 1)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          enable,
  input  logic          clr,
  output logic [CW-1:0] count,
  output logic          done
);

  localparam logic [CW-1:0] LAST = CW'(GANG_BITS - 1);

  always_ff @(posedge clk or posedge reset) begin
    if (reset)       count <= '0;
    else if (clr)    count <= '0;
    else if (enable) count <= count + 1'b1;
  end

  assign done = enable && !clr && (count == LAST);

endmodule
