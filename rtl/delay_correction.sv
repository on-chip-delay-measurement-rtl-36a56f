`timescale 1ps/10fs
// delay_correction: removes the temperature influence from a measured delay.
//
// Path delay grows linearly with temperature, dD = alpha * dT. With the
// reference pair (T0, D0) taken at the initial measurement and the
// coefficient alpha stored in nonvolatile memory, a delay D_measured taken at
// temperature T is corrected to the reference temperature and compared with
// the reference:
//   D_corrected = D_measured - alpha * (T - T0)
//   D_aging     = D_corrected - D0
// so that D_aging is the delay increase from aging alone. The formulas
// follow the measurement method. Number formats (delay 0.01 ps, temperature
// 0.01 degC, alpha 0.01 ps/degC), rounding of alpha*dT to the nearest
// 0.01 ps (halves away from zero) and the two-stage pipeline are this
// design's choices.
//
// Interface: start pulse with the inputs valid; valid pulses two cycles
// later with d_corrected and d_aging, which hold until the next result.
module delay_correction
  import dm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  delay_t  d_measured,
  input  temp_t   t_measured,
  input  delay_t  d0,
  input  temp_t   t0,
  input  alpha_t  alpha,
  output logic    valid,
  output sdelay_t d_corrected,
  output sdelay_t d_aging
);

  logic signed [16:0] dt;
  logic signed [34:0] prod;       // 1e-4 ps
  logic signed [34:0] prod_r;
  logic signed [34:0] rounded;
  sdelay_t            shift_cps;  // alpha * dT in 0.01 ps
  sdelay_t            d_meas_r, d0_r;
  logic               stage1;

  assign dt   = 17'(t_measured) - 17'(t0);
  assign prod = $signed({1'b0, alpha}) * dt;

  assign rounded   = (prod_r >= 0) ? (prod_r + 35'sd50) : (prod_r - 35'sd50);
  assign shift_cps = sdelay_t'(rounded / 35'sd100);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      stage1      <= 1'b0;
      valid       <= 1'b0;
      prod_r      <= '0;
      d_meas_r    <= '0;
      d0_r        <= '0;
      d_corrected <= '0;
      d_aging     <= '0;
    end else begin
      stage1 <= start;
      valid  <= stage1;
      if (start) begin
        prod_r   <= prod;
        d_meas_r <= sdelay_t'(d_measured);
        d0_r     <= sdelay_t'(d0);
      end
      if (stage1) begin
        d_corrected <= d_meas_r - shift_cps;
        d_aging     <= d_meas_r - shift_cps - d0_r;
      end
    end
  end

endmodule
