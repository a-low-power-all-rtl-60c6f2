// tb_ring_oscillator: checks the delay-line ring model. With 4 cells of
// 1000 ps the period must be 8000 ps, the taps must show the travelling edge
// as a thermometer pattern, and stopping the ring must return every tap to 1
// within one line delay. A second instance with 16 cells checks the period
// scales with the length.
module tb_ring_oscillator;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic        run;
  logic [15:0] dly;
  logic [3:0]  taps;
  logic        osc;
  logic [15:0] taps16;
  logic        osc16;
  time         rise_t[$];
  time         rise16_t[$];

  ring_oscillator #(.CELLS(4))  dut   (.run, .cell_delay_ps(dly), .taps, .osc);
  ring_oscillator #(.CELLS(16)) dut16 (.run, .cell_delay_ps(dly), .taps(taps16), .osc(osc16));

  always @(posedge osc)   if (run) rise_t.push_back($time);
  always @(posedge osc16) if (run) rise16_t.push_back($time);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0;
    run = 0;
    dly = 1000;
    #10_000;
    check(taps == 4'hF && taps16 == 16'hFFFF, "stopped line is all ones");
    run = 1;
    t0 = $time;
    #2500;  // edge has passed two cells
    check(taps == 4'b1100, $sformatf("thermometer at 2.5 cells: %b", taps));
    #2000;  // 4.5 cells: the falling edge has left the line
    check(taps == 4'b0000, $sformatf("line all zero at 4.5 cells: %b", taps));
    #1000;  // 5.5 cells: rising edge has passed cell 0
    check(taps == 4'b0001, $sformatf("second half at 5.5 cells: %b", taps));
    #100_000;
    check(rise_t.size() >= 10, "ring oscillates");
    for (int i = 1; i < rise_t.size(); i++)
      check(rise_t[i] - rise_t[i-1] == 8000, $sformatf("period %0t", rise_t[i] - rise_t[i-1]));
    check(rise_t[0] - t0 == 8000, "first full period ends after 2*CELLS delays");
    for (int i = 1; i < rise16_t.size(); i++)
      check(rise16_t[i] - rise16_t[i-1] == 32000, "16-cell period");
    run = 0;
    #4100;
    check(taps == 4'hF, "line returns to ones after run falls");
    // A slower cell gives a proportionally longer period.
    rise_t.delete();
    dly = 1250;
    #20_000;
    run = 1;
    #50_000;
    for (int i = 1; i < rise_t.size(); i++)
      check(rise_t[i] - rise_t[i-1] == 10000, "period follows the cell delay");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
