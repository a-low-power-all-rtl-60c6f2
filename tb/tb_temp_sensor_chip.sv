// tb_temp_sensor_chip: end-to-end run of the two-sensor chip through a
// temperature sweep, with a shortened sample period and oscillator phase
// noise switched on.
//
// Environment model: the cell delay of sensor s at temperature T is
//   d_s(T) = 3000 ps * g_s / (1 - 0.006 * (T - 25))
// with process factors g = {1.05, 0.94} (the two sensors sit in different
// corners), so the oscillator frequency falls linearly by 0.6 % per degC,
// and the accurate reference reads R = 8 * T (0.125 degC per code).
// With the 160 ns run time, an ideal sensor reads D = 8 * 160 ns / d; the
// jitter dithers the eight runs, so each code is checked to lie within 12 of
// that value. A reference model of the calibration formulas, fed with the
// codes the sensors actually produced, predicts every normalised code and
// every temperature bit for bit. Once calibrated, both sensors must read the
// true temperature within 3 degC.
//
// Every mechanism is counted and must occur: the eight oscillator resets of
// each sample, decoder positions that carry into the counter bits, the
// start-up correction factor, the first calibration point, rounds where the
// reference has not yet risen by DIFF, and the second point.
module tb_temp_sensor_chip;
  timeunit 1ps;
  timeprecision 1ps;
  import ts_pkg::*;

  localparam int PERIOD = 200, RUNC = 8, GAPC = 4, TCLK = 20_000, JIT = 150;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0][15:0]  cell_delay_ps;
  logic signed [11:0] r_code = '0;
  logic              r_valid = 0;
  logic [1:0][8:0]   d_code;
  logic [1:0]        d_valid, sample;
  logic [1:0][11:0]  c_code;
  logic [1:0][15:0]  temp;
  logic              out_valid, nc_ready, point1_taken, calibrated;
  logic [15:0]       gain;
  logic signed [23:0] offset;

  temp_sensor_chip #(.RUN_CYCLES(RUNC), .GAP_CYCLES(GAPC), .PERIOD_CYCLES(PERIOD),
                     .JITTER_PS(JIT)) dut (
    .clk, .rst_n, .cell_delay_ps, .r_code, .r_valid, .d_code, .d_valid, .sample,
    .c_code, .temp, .out_valid, .nc_ready, .point1_taken, .calibrated, .gain, .offset
  );

  always #(TCLK/2) clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (40_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- mechanism counters ---------------------------------------------------
  int n_resets = 0, n_samples = 0, n_bad_resets = 0, n_carry = 0;
  int n_nc = 0, n_p1 = 0, n_no = 0, n_yes = 0;
  int resets_this = 0;
  always @(posedge dut.u_ts_long.run) resets_this++;
  always @(posedge clk) if (d_valid[1]) begin
    n_samples++;
    n_resets += resets_this;
    if (resets_this != RESETS_PER_SAMPLE) n_bad_resets++;
    resets_this = 0;
  end
  // Summed decoder positions of the short sensor reaching past 2**N.
  always @(posedge clk) if (dut.u_ts_short.done && dut.u_ts_short.pos_sum >= 4) n_carry++;
  always @(posedge nc_ready)     n_nc++;
  always @(posedge point1_taken) n_p1++;

  // ---- reference model of the calibration ---------------------------------
  longint m_nc[2], m_c[2], m_h[2];
  longint m_c1, m_r1, m_gs = GS_DEFAULT, m_off = OFFSET_DEFAULT;
  bit     m_p1 = 0, m_cal = 0, m_have_nc = 0;

  function automatic longint clamp(longint v, longint lo, longint hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  task automatic model_round(input int d[2], input int r);
    longint g;
    if (!m_have_nc) begin
      foreach (m_nc[i]) m_nc[i] = clamp((longint'(CAL_CODE_DEFAULT) << 12) / d[i], 0, 2**20 - 1);
      m_have_nc = 1;
    end
    foreach (m_c[i]) m_c[i] = clamp((d[i] * m_nc[i]) >> 12, 0, 4095);
    if (!m_p1) begin
      m_c1 = m_c[1];
      m_r1 = r;
      m_p1 = 1;
    end else if (!m_cal && (r - m_r1) > DIFF_DEFAULT && m_c1 > m_c[1]) begin
      g = ((m_c1 - m_c[1]) * 2048) / (r - m_r1);
      if (g != 0 && g < 65536) m_gs = g;
      m_off = m_c1 * 256 + ((m_gs * m_r1) >>> 3);
      m_cal = 1;
      n_yes++;
    end else if (!m_cal) begin
      n_no++;
    end
    foreach (m_h[i]) m_h[i] = clamp(((m_off - m_c[i] * 256) * 8) / m_gs, -32768, 32767);
  endtask

  real proc[2] = '{1.05, 0.94};
  int  temps[] = '{25, 25, 30, 38, 52, 60, 75, 20, 45};

  function automatic int delay_at(int s, int t);
    return int'(3000.0 * proc[s] / (1.0 - 0.006 * real'(t - 25)));
  endfunction

  initial begin
    int d[2];
    cell_delay_ps[0] = 16'(delay_at(0, temps[0]));
    cell_delay_ps[1] = 16'(delay_at(1, temps[0]));
    r_code  = 12'(temps[0] * 8);
    r_valid = 1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    foreach (temps[k]) begin
      // The sample for temps[k] is running; wait for its codes.
      @(posedge clk iff d_valid[1]);
      #1;
      foreach (d[i]) begin
        int ideal;
        ideal = 8 * (RUNC * TCLK) / delay_at(i, temps[k]);
        d[i] = int'(d_code[i]);
        check(d[i] - ideal <= 12 && ideal - d[i] <= 12,
              $sformatf("T=%0d sensor %0d code %0d, ideal %0d", temps[k], i, d[i], ideal));
      end
      // Move to the next temperature while the oscillators are stopped.
      if (k + 1 < temps.size()) begin
        cell_delay_ps[0] = 16'(delay_at(0, temps[k+1]));
        cell_delay_ps[1] = 16'(delay_at(1, temps[k+1]));
      end
      @(posedge clk iff out_valid);
      #1;
      model_round(d, temps[k] * 8);
      r_code = 12'(temps[(k + 1) % temps.size()] * 8);
      check(calibrated == m_cal && gain == 16'(m_gs) && offset == 24'(m_off),
            $sformatf("T=%0d calibration state cal=%0b gain=%0d offset=%0d", temps[k],
                      calibrated, gain, offset));
      $display("T=%0d D=%0d,%0d H=%0.2f,%0.2f", temps[k], d[0], d[1],
               real'($signed(temp[0])) / 8.0, real'($signed(temp[1])) / 8.0);
      for (int i = 0; i < 2; i++) begin
        check(c_code[i] == 12'(m_c[i]) && $signed(temp[i]) == 16'(m_h[i]),
              $sformatf("T=%0d sensor %0d C=%0d/%0d H=%0d/%0d", temps[k], i,
                        c_code[i], m_c[i], $signed(temp[i]), m_h[i]));
        if (m_cal)
          check($signed(temp[i]) - temps[k] * 8 <= 24 && temps[k] * 8 - $signed(temp[i]) <= 24,
                $sformatf("sensor %0d reads %0.2f degC at %0d degC", i,
                          real'($signed(temp[i])) / 8.0, temps[k]));
      end
    end
    $display("resets=%0d samples=%0d carries=%0d nc=%0d first_point=%0d below_diff=%0d second_point=%0d",
             n_resets, n_samples, n_carry, n_nc, n_p1, n_no, n_yes);
    check(n_samples >= temps.size() && n_bad_resets == 0, "eight resets in every sample");
    check(n_carry > 0, "decoder positions carried into the counter bits");
    check(n_nc == 1, "correction factors computed once at start-up");
    check(n_p1 == 1, "first calibration point taken");
    check(n_no > 0, "rounds below DIFF seen");
    check(n_yes == 1, "second calibration point taken");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
