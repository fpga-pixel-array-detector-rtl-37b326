// tb_shiftregister: self-checking test of the gang shift register.
//
// First shifts in one known 16-bit word bit by bit (first bit = MSB) and reads
// it back through the output enable; then applies random shift/clear/output
// enable patterns and compares `q` with a reference register every cycle.
module tb_shiftregister;
  localparam int unsigned GANG_BITS = pad_pkg::GANG_BITS_DEFAULT;

  logic clk = 0, reset = 1, d = 0, shift_en = 0, clr = 0, output_enable = 0;
  logic [GANG_BITS-1:0] q;
  logic [GANG_BITS-1:0] model = '0;
  logic [GANG_BITS-1:0] word = 16'hA5C3;
  int checks = 0, failures = 0;

  shiftregister dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [GANG_BITS-1:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 reset = 0;
    for (int i = int'(GANG_BITS) - 1; i >= 0; i--) begin
      @(negedge clk);
      shift_en = 1; d = word[i];
      #1 check('0, "output hidden while shifting");
    end
    @(negedge clk) shift_en = 0; output_enable = 1;
    #1 check(word, "word after 16 shifts, first bit in MSB");
    @(negedge clk) output_enable = 0; clr = 1;
    @(negedge clk) clr = 0; output_enable = 1;
    #1 check('0, "cleared");
    model = '0;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      d             = 1'($urandom_range(0, 1));
      shift_en      = ($urandom_range(0, 3) != 0);
      clr           = ($urandom_range(0, 15) == 0);
      output_enable = 1'($urandom_range(0, 1));
      #1 check(output_enable ? model : '0, "random");
      @(posedge clk);
      if (clr) model = '0;
      else if (shift_en) model = {model[GANG_BITS-2:0], d};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
