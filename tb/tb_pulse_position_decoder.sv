// tb_pulse_position_decoder: feeds every legal state of a 16-cell line
// (N = 5) and of a 2-cell line (N = 2) and checks the latched, decoded edge
// position; also checks that the latch holds when capture is low.
module tb_pulse_position_decoder;
  timeunit 1ps;
  timeprecision 1ps;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, capture = 0;
  logic [15:0] taps5;
  logic [1:0]  taps2;
  logic [4:0]  pos5;
  logic [1:0]  pos2;

  pulse_position_decoder #(.N(5)) dut5 (.clk, .rst_n, .capture, .taps(taps5), .pos(pos5));
  pulse_position_decoder #(.N(2)) dut2 (.clk, .rst_n, .capture, .taps(taps2), .pos(pos2));

  always #10_000 clk = ~clk;

  // State of a line of 'cells' cells, p phases after the start of a period.
  function automatic logic [15:0] line_state(int cells, int p);
    logic [15:0] s = '1;
    for (int i = 0; i < cells; i++)
      s[i] = (p < cells) ? (i >= p) : (i < p - cells);
    return s;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    taps5 = '1;
    taps2 = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(pos5 == 0 && pos2 == 0, "reset state decodes to 0");
    for (int p = 0; p < 32; p++) begin
      @(negedge clk);
      taps5   = line_state(16, p);
      taps2   = 2'(line_state(2, p % 4));
      capture = 1;
      @(negedge clk);
      capture = 0;
      check(pos5 == 5'(p), $sformatf("N=5 p=%0d got %0d", p, pos5));
      check(pos2 == 2'(p % 4), $sformatf("N=2 p=%0d got %0d", p % 4, pos2));
      // Taps move on, latch must hold.
      taps5 = ~taps5;
      taps2 = ~taps2;
      @(negedge clk);
      check(pos5 == 5'(p), "latched position holds without capture");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
