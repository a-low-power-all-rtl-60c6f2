// tb_sweep_workload: the published measurement, a sweep from 20 degC to
// 75 degC in 5 degC steps, run on three chips whose two sensors sit in
// different process corners (six sensors in all). Each chip starts up at
// 20 degC, takes its second calibration point once the reference has risen
// by more than DIFF (20 degC, so at 45 degC) and then continues the sweep.
// The environment model is the one of tb_temp_sensor_chip (0.6 %/degC,
// 150 ps cell jitter, shortened sample period). For every calibrated reading
// the error against the true temperature must stay within 4 degC (the 9-bit code limits
// the resolution to about 1.5 degC per code even with dithering); the
// largest error per chip is printed.
module tb_sweep_workload;
  timeunit 1ps;
  timeprecision 1ps;
  import ts_pkg::*;

  localparam int PERIOD = 200, JIT = 150;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0][15:0]   cell_delay_ps;
  logic signed [11:0] r_code = '0;
  logic               r_valid = 1;
  logic [1:0][8:0]    d_code;
  logic [1:0]         d_valid, sample;
  logic [1:0][11:0]   c_code;
  logic [1:0][15:0]   temp;
  logic               out_valid, nc_ready, point1_taken, calibrated;
  logic [15:0]        gain;
  logic signed [23:0] offset;

  temp_sensor_chip #(.PERIOD_CYCLES(PERIOD), .JITTER_PS(JIT)) dut (
    .clk, .rst_n, .cell_delay_ps, .r_code, .r_valid, .d_code, .d_valid, .sample,
    .c_code, .temp, .out_valid, .nc_ready, .point1_taken, .calibrated, .gain, .offset
  );

  always #(CLK_PERIOD_PS/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (60_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real proc[3][2] = '{'{1.05, 0.94}, '{0.90, 1.10}, '{1.00, 0.97}};

  function automatic int delay_at(real g, int t);
    return int'(3000.0 * g / (1.0 - 0.006 * real'(t - 25)));
  endfunction

  initial begin
    for (int chip = 0; chip < 3; chip++) begin
      real worst;
      int  n_cal;
      worst = 0.0;
      n_cal = 0;
      rst_n = 0;
      cell_delay_ps[0] = 16'(delay_at(proc[chip][0], 20));
      cell_delay_ps[1] = 16'(delay_at(proc[chip][1], 20));
      r_code = 12'(20 * 8);
      repeat (5) @(posedge clk);
      @(negedge clk);
      rst_n = 1;
      for (int t = 20; t <= 75; t += 5) begin
        @(posedge clk iff d_valid[1]);
        #1;
        if (t < 75) begin
          cell_delay_ps[0] = 16'(delay_at(proc[chip][0], t + 5));
          cell_delay_ps[1] = 16'(delay_at(proc[chip][1], t + 5));
        end
        @(posedge clk iff out_valid);
        #1;
        r_code = 12'((t + 5) * 8);
        if (calibrated) begin
          n_cal++;
          for (int i = 0; i < 2; i++) begin
            real err;
            err = real'($signed(temp[i])) / 8.0 - real'(t);
            if (err < 0) err = -err;
            if (err > worst) worst = err;
            check(err <= 4.0, $sformatf("chip %0d sensor %0d: %0.2f degC at %0d degC",
                                        chip, i, real'($signed(temp[i])) / 8.0, t));
          end
        end
      end
      check(n_cal == 7, $sformatf("chip %0d calibrated at 45 degC (%0d calibrated readings)",
                                  chip, n_cal));
      $display("chip %0d: largest calibrated error %0.2f degC over %0d readings per sensor",
               chip, worst, n_cal);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
