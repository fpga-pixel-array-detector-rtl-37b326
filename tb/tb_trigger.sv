// tb_trigger: self-checking test of the "10" trigger detector.
//
// Feeds a random serial stream with a random `arm` and checks every cycle that
// `trig` is high exactly when arm is high, the previous bit was 1 and the
// current bit is 0, and that `trigger_reg` shows {previous, current}.
module tb_trigger;
  logic clk = 0, reset = 1, d = 0, arm = 0;
  logic trig;
  logic [1:0] trigger_reg;
  int checks = 0, failures = 0, fired = 0, masked = 0;
  logic prev_ref = 0;

  trigger dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      d   = 1'($urandom_range(0, 1));
      arm = ($urandom_range(0, 3) != 0);
      #1;
      checks++;
      if (trig !== (arm && prev_ref && !d)) begin
        failures++;
        $display("FAIL trig=%0b arm=%0b prev=%0b d=%0b", trig, arm, prev_ref, d);
      end
      checks++;
      if (trigger_reg !== {prev_ref, d}) begin
        failures++;
        $display("FAIL trigger_reg=%b expected %b", trigger_reg, {prev_ref, d});
      end
      if (trig) fired++;
      if (!arm && prev_ref && !d) masked++;
      @(posedge clk);
      prev_ref = d;
    end
    checks++;
    if (fired < 50 || masked < 10) begin
      failures++;
      $display("FAIL coverage fired=%0d masked=%0d", fired, masked);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
