// tb_coarse_counter: pulses the oscillator input and checks that the 4-bit
// counter counts only while run is high, is cleared by clr and wraps at 16.
module tb_coarse_counter;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic osc = 0, run = 0, clr = 0;
  logic [3:0] count;
  int expected = 0;

  coarse_counter #(.WIDTH(4)) dut (.osc, .run, .clr, .count);

  task automatic pulses(input int n);
    repeat (n) begin
      #1000 osc = 1;
      #1000 osc = 0;
    end
  endtask

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100 clr = 1;
    #400 clr = 0;
    check(count == 0, "cleared");
    for (int k = 0; k < 12; k++) begin
      int n;
      n   = int'($urandom_range(1, 9));
      run = (k % 3 != 0);
      #100;
      pulses(n);
      if (run) expected = (expected + n) % 16;
      #100;
      check(count == 4'(expected), $sformatf("step %0d run=%0b n=%0d: %0d vs %0d",
                                            k, run, n, count, expected));
    end
    run = 1;
    pulses(16 - expected + 3);
    check(count == 4'd3, "wraps at 2**WIDTH");
    clr = 1;
    #100;
    check(count == 0, "asynchronous clear");
    pulses(2);
    check(count == 0, "clear holds the counter");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
