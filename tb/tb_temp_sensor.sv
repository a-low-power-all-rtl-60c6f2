// tb_temp_sensor: drives the long (N = 5) and short (N = 2) sensors with a
// sequence of cell delays and checks every code. A run of RUN_CYCLES clocks
// lets floor(T_run / d) cell delays elapse, so the ring advances that many
// phases; the sum over 8 runs is the expected code, modulo 2**M:
//   D = 8 * floor(RUN_CYCLES * 20 ns / d)  mod 512.
// The last delay makes the code wrap. The sample rate is checked as well.
module tb_temp_sensor;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int RUNC = 8, GAPC = 4, PERIOD = 120, TCLK = 20_000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [15:0] dly;
  logic        s5, s2, v5, v2;
  logic [8:0]  d5, d2;

  temp_sensor #(.M(9), .N(5), .RUN_CYCLES(RUNC), .GAP_CYCLES(GAPC), .PERIOD_CYCLES(PERIOD))
    dut5 (.clk, .rst_n, .cell_delay_ps(dly), .sample(s5), .d_code(d5), .d_valid(v5));
  temp_sensor #(.M(9), .N(2), .RUN_CYCLES(RUNC), .GAP_CYCLES(GAPC), .PERIOD_CYCLES(PERIOD))
    dut2 (.clk, .rst_n, .cell_delay_ps(dly), .sample(s2), .d_code(d2), .d_valid(v2));

  always #(TCLK/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (20_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int delays[] = '{3001, 2903, 3101, 3499, 4003, 2407};
  int cyc = 0, last_v = -1;
  always @(posedge clk) cyc++;

  initial begin
    dly = 16'(delays[0]);
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (delays[k]) begin
      int exp_code;
      dly = 16'(delays[k]);
      exp_code = (8 * ((RUNC * TCLK) / delays[k])) % 512;
      // Each sensor delivers one code per period; take the first one that was
      // measured entirely with the new delay.
      repeat (2) begin
        @(posedge clk iff v5);
        if (last_v >= 0) check(cyc - last_v == PERIOD, $sformatf("sample period %0d", cyc - last_v));
        last_v = cyc;
        check(v2, "both sensors finish together");
      end
      #1;
      check(d5 == 9'(exp_code), $sformatf("N=5 d=%0d: code %0d expected %0d", delays[k], d5, exp_code));
      check(d2 == 9'(exp_code), $sformatf("N=2 d=%0d: code %0d expected %0d", delays[k], d2, exp_code));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
