// tb_counter: self-checking test of the gang bit counter.
//
// Drives random enable/clear patterns (with clear rare and enable frequent so
// that the count reaches the gang length many times) and compares `count` and
// `done` every cycle with a reference count kept in the testbench. Also checks
// that exactly GANG_BITS enabled clocks after a clear produce one `done`.
module tb_counter;
  localparam int unsigned GANG_BITS = pad_pkg::GANG_BITS_DEFAULT;
  localparam int unsigned CW = $clog2(GANG_BITS + 1);

  logic clk = 0, reset = 1, enable = 0, clr = 0;
  logic [CW-1:0] count;
  logic done;
  int checks = 0, failures = 0, dones = 0;
  int ref_count = 0;

  counter dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: count=%0d ref=%0d done=%0b", what, count, ref_count, done);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 reset = 0;
    check(count == 0, "after reset");
    // A full gang: GANG_BITS enabled clocks, done on the last one only.
    for (int i = 0; i < int'(GANG_BITS); i++) begin
      @(negedge clk);
      enable = 1;
      #1 check(done == (i == int'(GANG_BITS) - 1), "done on last bit");
      @(posedge clk); #1;
      check(count == CW'(i + 1), "count step");
    end
    @(negedge clk) enable = 0; clr = 1;
    @(posedge clk); #1 check(count == 0, "clear");
    ref_count = 0;
    // Random stimulus; the reference wraps only through clr as in use.
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      clr    = ($urandom_range(0, 19) == 0) || (ref_count == int'(GANG_BITS));
      enable = ($urandom_range(0, 3) != 0);
      #1 check(done == (enable && !clr && ref_count == int'(GANG_BITS) - 1), "done");
      if (done) dones++;
      @(posedge clk);
      if (clr) ref_count = 0;
      else if (enable) ref_count++;
      #1 check(int'(count) == ref_count, "count");
    end
    check(dones > 10, "done seen often");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
