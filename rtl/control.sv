// control: FPGA receiver for one pixel-gang pin of a hybrid pixel array
// detector.
//
// The detector ASIC sends the one-bit outputs of a gang of pixels serially on
// one pin. Each gang is announced by the bits 1, 0 and followed by GANG_BITS
// data bits, one bit per clock. This block samples `gang_in` on every rising
// edge of `clk`:
//   * `trigger` watches for the 1-then-0 pattern while the state machine waits;
//   * after the trigger, `statemachine` enables `counter` and `shiftregister`
//     for GANG_BITS clocks, shifting in one data bit per clock;
//   * when the counter reports the last bit, the state machine spends one
//     cycle in data_valid: `shiftregister_out` carries the word (first data
//     bit in the MSB) and `data_valid` is high; counter and shift register are
//     cleared at the end of that cycle.
// Latency: `data_valid` is high in the clock cycle right after the one in which
// the last data bit is on `gang_in`. Gangs may follow back to back (18 bit
// times per gang on the wire): the data_valid cycle can carry the next gang's
// leading 1. A 1-then-0 inside a gang's data is ignored.
//
// The four sub-blocks, their names and the port names reset, clk, gang_in and
// shiftregister_out follow the source schematic. The `data_valid` port, the
// zero output outside data_valid, the bit order and the cycle timing are this
// design's choices.
module control #(
  parameter int unsigned GANG_BITS = pad_pkg::GANG_BITS_DEFAULT
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 gang_in,
  output logic [GANG_BITS-1:0] shiftregister_out,
  output logic                 data_valid
);

  import pad_pkg::*;

  localparam int unsigned CW = $clog2(GANG_BITS + 1);

  logic          arm, trig, count_done;
  logic          counter_enable, shiftregister_clr, shiftregister_output_enable;
  logic [1:0]    trigger_reg;
  logic [CW-1:0] count;
  state_t        state;

  statemachine u1_statemachine (
    .clk                         (clk),
    .reset                       (reset),
    .trigger                     (trig),
    .count_done                  (count_done),
    .arm                         (arm),
    .counter_enable              (counter_enable),
    .shiftregister_clr           (shiftregister_clr),
    .shiftregister_output_enable (shiftregister_output_enable),
    .state                       (state)
  );

  trigger u2_trigger (
    .clk         (clk),
    .reset       (reset),
    .d           (gang_in),
    .arm         (arm),
    .trig        (trig),
    .trigger_reg (trigger_reg)
  );

  counter #(.GANG_BITS(GANG_BITS)) u3_counter (
    .clk    (clk),
    .reset  (reset),
    .enable (counter_enable),
    .clr    (shiftregister_clr),
    .count  (count),
    .done   (count_done)
  );

  shiftregister #(.GANG_BITS(GANG_BITS)) u4_shiftregister (
    .clk           (clk),
    .reset         (reset),
    .d             (gang_in),
    .shift_en      (counter_enable),
    .clr           (shiftregister_clr),
    .output_enable (shiftregister_output_enable),
    .q             (shiftregister_out)
  );

  assign data_valid = shiftregister_output_enable;

  // The counter must never run past the gang length.
  a_count_in_range: assert property (@(posedge clk) disable iff (reset)
    count <= CW'(GANG_BITS));

  // A 1-then-0 seen while waiting starts reception on the next cycle.
  a_trigger_starts: assert property (@(posedge clk) disable iff (reset)
    (state == ST_WAITING && trigger_reg == TRIGGER_PATTERN) |=> state == ST_RECEIVING);

  // data_valid lasts exactly one cycle.
  a_valid_one_cycle: assert property (@(posedge clk) disable iff (reset)
    data_valid |=> !data_valid);

endmodule
