// tb_statemachine: self-checking test of the receiver state machine.
//
// Drives random `trigger` and `count_done` inputs and compares the state and
// all four control outputs with a reference model every cycle. Also checks the
// fixed sequence of one whole gang: idle, waiting, receiving for 16 clocks,
// one data_valid clock, back to waiting.
module tb_statemachine;
  import pad_pkg::*;

  logic clk = 0, reset = 1, trigger = 0, count_done = 0;
  logic arm, counter_enable, shiftregister_clr, shiftregister_output_enable;
  state_t state, model;
  int checks = 0, failures = 0;
  int visits[4] = '{default: 0};

  statemachine dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_outputs(string what);
    checks++;
    if (state !== model
        || arm !== (model == ST_WAITING)
        || counter_enable !== (model == ST_RECEIVING)
        || shiftregister_clr !== (model == ST_IDLE || model == ST_DATA_VALID)
        || shiftregister_output_enable !== (model == ST_DATA_VALID)) begin
      failures++;
      $display("FAIL %s: state=%0d model=%0d arm=%0b en=%0b clr=%0b oe=%0b", what,
               state, model, arm, counter_enable, shiftregister_clr,
               shiftregister_output_enable);
    end
  endtask

  initial begin
    model = ST_IDLE;
    @(posedge clk); #1 check_outputs("in reset");
    @(negedge clk) reset = 0;
    check_outputs("idle after reset");
    @(negedge clk) model = ST_WAITING;
    check_outputs("waiting");
    // One gang with exact timing.
    trigger = 1;
    @(negedge clk) trigger = 0; model = ST_RECEIVING;
    for (int i = 0; i < 16; i++) begin
      check_outputs("receiving");
      count_done = (i == 15);
      @(negedge clk);
    end
    count_done = 0; model = ST_DATA_VALID;
    check_outputs("data_valid");
    @(negedge clk) model = ST_WAITING;
    check_outputs("back to waiting");
    // Random inputs.
    for (int n = 0; n < 3000; n++) begin
      trigger    = ($urandom_range(0, 3) == 0);
      count_done = ($urandom_range(0, 7) == 0);
      @(negedge clk);
      unique case (model)
        ST_IDLE:       model = ST_WAITING;
        ST_WAITING:    if (trigger) model = ST_RECEIVING;
        ST_RECEIVING:  if (count_done) model = ST_DATA_VALID;
        ST_DATA_VALID: model = ST_WAITING;
      endcase
      visits[model]++;
      check_outputs("random");
      if (n == 1500) begin
        reset = 1; #1 model = ST_IDLE; check_outputs("async reset");
        @(negedge clk) reset = 0;
      end
    end
    checks++;
    if (visits[ST_RECEIVING] == 0 || visits[ST_DATA_VALID] < 20) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
