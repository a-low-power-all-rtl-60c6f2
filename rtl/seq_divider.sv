// seq_divider: unsigned restoring divider, one quotient bit per clock.
//
// A pulse on start (while not busy) loads dividend and divisor; W clock cycles
// later done pulses for one cycle and quotient holds dividend / divisor,
// rounded down. Division by zero gives all ones. It is the single divider that
// the self-calibration circuit shares between the correction factor, the gain
// and the temperature computations. This structure is an implementation
// choice; the published design only says that these quotients are computed.
module seq_divider #(
  parameter int unsigned W = ts_pkg::DIV_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] dividend,
  input  logic [W-1:0] divisor,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quotient
);
  timeunit 1ps;
  timeprecision 1ps;

  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  rem;
  logic [W:0]    rem_shift, rem_n;
  logic [W-1:0]  quo, quo_n, dsr;
  logic [CW-1:0] cnt;

  always_comb begin
    rem_shift = {rem, quo[W-1]};
    quo_n     = {quo[W-2:0], 1'b0};
    rem_n     = rem_shift;
    if (rem_shift >= {1'b0, dsr}) begin
      rem_n    = rem_shift - {1'b0, dsr};
      quo_n[0] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rem  <= '0;
      quo  <= '0;
      dsr  <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          rem  <= '0;
          quo  <= dividend;
          dsr  <= divisor;
          cnt  <= CW'(W);
          busy <= 1'b1;
        end
      end else begin
        rem <= rem_n[W-1:0];
        quo <= quo_n;
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quotient = quo;
endmodule
