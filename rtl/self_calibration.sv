// self_calibration: continuous self-calibration circuit shared by all the
// delay-line sensors of a chip.
//
// Delay-line codes depend on process as well as on temperature. Modelling a
// cell delay as a temperature-only factor times a process-only factor, the
// ratio of a sensor's code to its own code at a reference temperature depends
// on temperature alone. The circuit therefore works in three steps:
//
//  1. Process removal. The first complete set of sensor codes D_i(Tc) is taken
//     at start-up, when all sensors are at the same temperature, and each
//     sensor gets a correction factor Nc_i = C(Tc) / D_i(Tc) (CAL_CODE is the
//     stored target code C(Tc)). From then on every code is normalised,
//     C_i = D_i * Nc_i, so all sensors give the same code at start-up.
//  2. Temperature. With a preset gain GS (codes per degC, positive: codes fall
//     as temperature rises) and offset OFFSET (the code at 0 degC),
//     H_i = (OFFSET - C_i) / GS, in units of 0.125 degC.
//  3. Continuous two-point calibration against the accurate reference sensor.
//     At the first sample the reference sensor's code C(T1) and the reference
//     reading R(T1) are stored. At every later sample, if R(Tx) - R(T1) > DIFF
//     the second point is taken, R(T2) = R(Tx), C(T2) = C(Tx), and
//       GS'     = GR * (C(T1) - C(T2)) / (R(T2) - R(T1))
//       OFFSET' = C(T1) + GS' * T1,  with T1 = R(T1) / GR
//     replace the presets for all sensors. GR is the reference sensor's gain
//     in codes per degC (2**GR_SHIFT, 8 for 0.125 degC per code).
//
// Datapath: one multiplier and one sequential divider (seq_divider) serve all
// sensors in turn, one after the other; adding a sensor costs one stored Nc
// and a wider input multiplexer. Fixed-point formats are given in ts_pkg: Nc
// has NC_FRAC fraction bits, GS and OFFSET have GS_FRAC.
//
// Interface: d_code/d_valid per sensor and r_code/r_valid from the reference
// are latched whenever they arrive. A round starts once every sensor has
// delivered a new code and a reference reading has been seen; it ends with a
// one-cycle out_valid pulse and all c_code/temp outputs updated together.
// A round takes about (NUM_SENSORS + 1) * (DIV_BITS + 3) cycles, plus
// NUM_SENSORS * (DIV_BITS + 2) cycles for the first one and one more division
// for the round that takes the second point.
//
// The three steps and the formulas follow the published flow. Where the flow
// is inconsistent in sign, the convention above (GS positive, codes falling
// with temperature) is used throughout. The second point is taken only once;
// if the reference sensor's code has not fallen by then, the presets are kept
// and the test is repeated at the next sample. Formats, presets, DIFF and the
// handshake are this implementation's choices.
module self_calibration
  import ts_pkg::*;
#(
  parameter int unsigned NUM_SENSORS = 4,
  parameter int unsigned REF_SENSOR  = 0,
  parameter int unsigned DW          = CODE_BITS,
  parameter int unsigned CAL_CODE    = CAL_CODE_DEFAULT,
  parameter int unsigned GS_INIT     = GS_DEFAULT,
  parameter int          OFFSET_INIT = OFFSET_DEFAULT,
  parameter int unsigned DIFF        = DIFF_DEFAULT
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [NUM_SENSORS-1:0][DW-1:0] d_code,
  input  logic [NUM_SENSORS-1:0]      d_valid,
  input  logic signed [REF_BITS-1:0]  r_code,
  input  logic                        r_valid,
  output logic [NUM_SENSORS-1:0][CAL_BITS-1:0]  c_code,
  output logic [NUM_SENSORS-1:0][TEMP_BITS-1:0] temp,
  output logic                        out_valid,
  output logic                        nc_ready,
  output logic                        point1_taken,
  output logic                        calibrated,
  output logic [GS_BITS-1:0]          gain,
  output logic signed [OFF_BITS-1:0]  offset
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned IW = (NUM_SENSORS > 1) ? $clog2(NUM_SENSORS) : 1;
  localparam int unsigned PW = DW + NC_BITS;

  typedef enum logic [3:0] {
    S_WAIT, S_NC, S_NC_WAIT, S_MUL, S_CHECK, S_GS_WAIT, S_OFF, S_H, S_H_WAIT, S_OUT
  } state_t;

  state_t state;
  logic [IW-1:0] idx;
  logic          last;

  // Latest inputs and the copy a round works on.
  logic [NUM_SENSORS-1:0][DW-1:0] d_latest, d_work;
  logic [NUM_SENSORS-1:0]         pending;
  logic signed [REF_BITS-1:0]     r_latest, r_work, r1;
  logic                           r_seen;

  logic [NUM_SENSORS-1:0][NC_BITS-1:0]  nc;
  logic [CAL_BITS-1:0]                  c1;
  logic                                 h_neg;

  // Shared divider.
  logic                div_start, div_busy, div_done;
  logic [DIV_BITS-1:0] div_a, div_b, div_q;

  seq_divider #(.W(DIV_BITS)) u_div (
    .clk, .rst_n, .start(div_start), .dividend(div_a), .divisor(div_b),
    .busy(div_busy), .done(div_done), .quotient(div_q)
  );

  // Combinational helpers for the sensor selected by idx.
  logic [PW-1:0]                product;
  logic [CAL_BITS-1:0]          c_norm;
  logic signed [OFF_BITS+1:0]   h_num;
  logic [OFF_BITS+1:0]          h_mag;
  logic signed [REF_BITS:0]     r_rise;
  logic [CAL_BITS-1:0]          c_ref;
  logic signed [GS_BITS+REF_BITS:0] gs_r1;
  logic signed [DIV_BITS-1:0]   h_signed;

  assign last    = (idx == IW'(NUM_SENSORS - 1));
  assign product = PW'(d_work[idx]) * PW'(nc[idx]);
  assign c_norm  = ((product >> NC_FRAC) > PW'(2**CAL_BITS - 1)) ?
                   CAL_BITS'(2**CAL_BITS - 1) : CAL_BITS'(product >> NC_FRAC);
  assign h_num   = (OFF_BITS+2)'($signed(offset))
                 - (OFF_BITS+2)'($signed({2'b00, c_code[idx], GS_FRAC'(0)}));
  assign h_mag   = h_num[OFF_BITS+1] ? (OFF_BITS+2)'(-h_num) : (OFF_BITS+2)'(h_num);
  assign r_rise  = (REF_BITS+1)'(r_work) - (REF_BITS+1)'(r1);
  assign c_ref   = c_code[REF_SENSOR];
  assign gs_r1   = $signed({1'b0, gain}) * r1;
  assign h_signed = h_neg ? -$signed(div_q) : $signed(div_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_WAIT;
      idx          <= '0;
      d_latest     <= '0;
      d_work       <= '0;
      pending      <= '0;
      r_latest     <= '0;
      r_work       <= '0;
      r1           <= '0;
      r_seen       <= 1'b0;
      nc           <= '0;
      c1           <= '0;
      h_neg        <= 1'b0;
      c_code       <= '0;
      temp         <= '0;
      out_valid    <= 1'b0;
      nc_ready     <= 1'b0;
      point1_taken <= 1'b0;
      calibrated   <= 1'b0;
      gain         <= GS_BITS'(GS_INIT);
      offset       <= OFF_BITS'(OFFSET_INIT);
      div_start    <= 1'b0;
      div_a        <= '0;
      div_b        <= '0;
    end else begin
      div_start <= 1'b0;
      out_valid <= 1'b0;
      for (int i = 0; i < NUM_SENSORS; i++)
        if (d_valid[i]) begin
          d_latest[i] <= d_code[i];
          pending[i]  <= 1'b1;
        end
      if (r_valid) begin
        r_latest <= r_code;
        r_seen   <= 1'b1;
      end

      unique case (state)
        S_WAIT: if (&pending && r_seen) begin
          d_work  <= d_latest;
          r_work  <= r_valid ? r_code : r_latest;
          pending <= d_valid;
          idx     <= '0;
          state   <= nc_ready ? S_MUL : S_NC;
        end
        // Nc_i = C(Tc) / D_i(Tc)
        S_NC: begin
          div_a     <= DIV_BITS'(CAL_CODE) << NC_FRAC;
          div_b     <= DIV_BITS'(d_work[idx]);
          div_start <= 1'b1;
          state     <= S_NC_WAIT;
        end
        S_NC_WAIT: if (div_done) begin
          nc[idx] <= (div_q > DIV_BITS'(2**NC_BITS - 1)) ?
                     NC_BITS'(2**NC_BITS - 1) : NC_BITS'(div_q);
          idx     <= last ? '0 : idx + 1'b1;
          if (last) begin
            nc_ready <= 1'b1;
            state    <= S_MUL;
          end else begin
            state    <= S_NC;
          end
        end
        // C_i = D_i * Nc_i
        S_MUL: begin
          c_code[idx] <= c_norm;
          idx         <= last ? '0 : idx + 1'b1;
          if (last) state <= S_CHECK;
        end
        // First point, or second point once the reference has risen by DIFF.
        S_CHECK: begin
          state <= S_H;
          if (!point1_taken) begin
            c1           <= c_ref;
            r1           <= r_work;
            point1_taken <= 1'b1;
          end else if (!calibrated && r_rise > $signed((REF_BITS+1)'(DIFF)) && c1 > c_ref) begin
            div_a     <= DIV_BITS'(c1 - c_ref) << (GS_FRAC + GR_SHIFT);
            div_b     <= DIV_BITS'(r_rise);
            div_start <= 1'b1;
            state     <= S_GS_WAIT;
          end
        end
        S_GS_WAIT: if (div_done) begin
          gain  <= (div_q > DIV_BITS'(2**GS_BITS - 1) || div_q == '0) ?
                   gain : GS_BITS'(div_q);
          state <= S_OFF;
        end
        S_OFF: begin
          offset     <= OFF_BITS'($signed({1'b0, c1, GS_FRAC'(0)}) + (gs_r1 >>> GR_SHIFT));
          calibrated <= 1'b1;
          state      <= S_H;
        end
        // H_i = (OFFSET - C_i) / GS
        S_H: begin
          h_neg     <= h_num[OFF_BITS+1];
          div_a     <= DIV_BITS'(h_mag) << GR_SHIFT;
          div_b     <= DIV_BITS'(gain);
          div_start <= 1'b1;
          state     <= S_H_WAIT;
        end
        S_H_WAIT: if (div_done) begin
          if (h_signed > $signed(DIV_BITS'(2**(TEMP_BITS-1) - 1)))
            temp[idx] <= TEMP_BITS'(2**(TEMP_BITS-1) - 1);
          else if (h_signed < -$signed(DIV_BITS'(2**(TEMP_BITS-1))))
            temp[idx] <= TEMP_BITS'(2**(TEMP_BITS-1));
          else
            temp[idx] <= TEMP_BITS'(h_signed);
          idx   <= last ? '0 : idx + 1'b1;
          state <= last ? S_OUT : S_H;
        end
        S_OUT: begin
          out_valid <= 1'b1;
          state     <= S_WAIT;
        end
        default: state <= S_WAIT;
      endcase
    end
  end

  // The divider is only started while it is idle.
  a_div_idle: assert property (@(posedge clk) disable iff (!rst_n) div_start |-> !div_busy)
    else $error("self_calibration: divider started while busy");

  initial assert (REF_SENSOR < NUM_SENSORS)
    else $error("self_calibration: REF_SENSOR out of range");
endmodule
