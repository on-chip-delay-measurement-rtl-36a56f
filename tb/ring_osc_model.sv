`timescale 1ps/10fs
// ring_osc_model: behavioural model of a ring oscillator whose period grows
// linearly with temperature, for simulation only:
//   period = P25_PS * (1 + TCO * (T - 25 degC)),
// with the temperature temp_cdeg given in 0.01 degC.
module ring_osc_model #(
  parameter real P25_PS = 5000.0,
  parameter real TCO    = 0.0015
) (
  input  int   temp_cdeg,
  output logic ro_clk
);

  initial ro_clk = 1'b0;

  always begin
    #(P25_PS * (1.0 + TCO * (real'(temp_cdeg) / 100.0 - 25.0)) / 2.0);
    ro_clk = !ro_clk;
  end

endmodule
