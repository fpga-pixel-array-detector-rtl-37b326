// tb_control: end-to-end test of the pixel-gang receiver at its default size.
//
// A stimulus process plays the part of the detector ASIC: it sends pixel gangs
// as the bits 1, 0 followed by 16 random data bits (first bit first), one bit
// per clock, separated by idle gaps. Gaps are a run of 0s followed by a run of
// 1s, which never contains a 1-then-0, so only real gang headers can trigger.
// Some gangs follow each other with no gap at all, and some carry data chosen
// to contain 1-then-0 pairs (false triggers that must be ignored).
//
// A checker process compares every `data_valid` word with the queue of sent
// words and checks that it appears exactly one clock after the last data bit
// was on the line. At the end it checks that every mechanism occurred:
// triggers, ignored false triggers inside data, back-to-back gangs, idle runs of
// 1s that did not trigger, a reset in the middle of a gang, and the clear after
// each gang. The clear is counted from the outside: every correct word after
// the first one shows that the receiver returned to waiting with its counter
// restarted. Only the ports of the receiver are observed.
module tb_control;
  localparam int unsigned GANG_BITS = pad_pkg::GANG_BITS_DEFAULT;
  localparam int NGANGS = 400;

  logic clk = 0, reset = 1, gang_in = 0;
  logic [GANG_BITS-1:0] shiftregister_out;
  logic data_valid;

  control dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  logic [GANG_BITS-1:0] sent_q[$];
  longint due_q[$];

  // Mechanism counters.
  int n_trigger = 0, n_false_in_data = 0, n_back_to_back = 0, n_ones_idle = 0;
  int n_valid = 0, n_abort = 0, n_clear = 0;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycle <= cycle + 1;

  // Send one bit: drive it after a falling edge so it is stable at the next
  // rising edge, which samples it.
  task automatic send_bit(logic b);
    @(negedge clk);
    gang_in = b;
  endtask

  function automatic int count_10(logic [GANG_BITS-1:0] w);
    int n = 0;
    for (int i = int'(GANG_BITS) - 1; i > 0; i--)
      if (w[i] && !w[i-1]) n++;
    return n;
  endfunction

  task automatic send_gang(logic [GANG_BITS-1:0] w, bit expect_out);
    send_bit(1'b1);
    send_bit(1'b0);
    for (int i = int'(GANG_BITS) - 1; i >= 0; i--) send_bit(w[i]);
    // The last data bit is sampled at the next rising edge (cycle value c);
    // data_valid is expected while the counter reads c+1.
    if (expect_out) begin
      sent_q.push_back(w);
      due_q.push_back(cycle + 1);
    end
    n_false_in_data += count_10(w);
    n_trigger++;
  endtask

  // Checker.
  always @(posedge clk) begin
    if (!reset && data_valid) begin
      n_valid++;
      checks++;
      if (sent_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected word %h at cycle %0d", shiftregister_out, cycle);
      end else begin
        logic [GANG_BITS-1:0] w;
        longint due;
        w = sent_q.pop_front();
        due = due_q.pop_front();
        if (shiftregister_out !== w) begin
          failures++;
          $display("FAIL word %h expected %h", shiftregister_out, w);
        end else if (n_valid > 1) n_clear++;
        checks++;
        if (cycle !== due) begin
          failures++;
          $display("FAIL latency: word at cycle %0d, expected %0d", cycle, due);
        end
      end
    end else if (!reset) begin
      checks++;
      if (shiftregister_out !== '0) begin
        failures++;
        $display("FAIL output not zero outside data_valid: %h", shiftregister_out);
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    repeat (3) @(posedge clk);
    for (int g = 0; g < NGANGS; g++) begin
      logic [GANG_BITS-1:0] w;
      automatic int kind = $urandom_range(0, 9);
      if (kind == 0) w = {(GANG_BITS/2){2'b10}};      // many false triggers
      else if (kind == 1) w = '1;
      else if (kind == 2) w = '0;
      else w = GANG_BITS'($urandom);
      // Idle gap, unless back to back.
      if ($urandom_range(0, 3) == 0) begin
        if (g > 0) n_back_to_back++;
      end else begin
        automatic int zeros = $urandom_range(0, 5);
        automatic int ones  = $urandom_range(0, 4);
        repeat (zeros) send_bit(1'b0);
        repeat (ones) send_bit(1'b1);
        if (ones > 1) n_ones_idle++;
      end
      if (g == NGANGS / 2) begin
        // Start a gang, then reset in its middle: nothing may come out of it.
        send_bit(1'b0);
        send_bit(1'b1);
        send_bit(1'b0);
        repeat (7) send_bit(1'($urandom));
        @(negedge clk) reset = 1;
        @(negedge clk) reset = 0;
        gang_in = 0;
        n_abort++;
        repeat (2) send_bit(1'b0);
      end
      send_gang(w, 1'b1);
    end
    repeat (5) send_bit(1'b0);
    repeat (5) @(posedge clk);

    checks++;
    if (sent_q.size() != 0) begin
      failures++;
      $display("FAIL %0d words never came out", sent_q.size());
    end
    checks++;
    if (n_valid != NGANGS) begin
      failures++;
      $display("FAIL %0d words out, %0d sent", n_valid, NGANGS);
    end
    $display("mechanisms: triggers=%0d false_triggers_in_data=%0d back_to_back=%0d idle_ones_runs=%0d words=%0d clears=%0d resets_mid_gang=%0d",
             n_trigger, n_false_in_data, n_back_to_back, n_ones_idle, n_valid, n_clear, n_abort);
    if (n_trigger == 0)       begin failures++; $display("FAIL no trigger"); end
    if (n_false_in_data == 0) begin failures++; $display("FAIL no false trigger in data"); end
    if (n_back_to_back == 0)  begin failures++; $display("FAIL no back-to-back gangs"); end
    if (n_ones_idle == 0)     begin failures++; $display("FAIL no idle runs of ones"); end
    if (n_valid == 0)         begin failures++; $display("FAIL no data_valid"); end
    if (n_clear == 0)         begin failures++; $display("FAIL no clear"); end
    if (n_abort == 0)         begin failures++; $display("FAIL no mid-gang reset"); end
    checks += 7;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
