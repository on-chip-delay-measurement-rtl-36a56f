`timescale 1ps/10fs
// dm_pkg: types and constants shared by the in-field delay measurement design.
//
// Delays are carried as unsigned fixed-point numbers in units of 0.01 ps
// ("cps"), temperatures as signed numbers in units of 0.01 degC ("cdeg"), and
// the temperature coefficient of delay in 0.01 ps/degC. With these units the
// reference numbers of the measurement method are exact integers: a 100 MHz
// system clock gives an initial test timing of 10000.00 ps = 1_000_000 cps, one
// PLL phase-shift step is 96.15 ps = 9615 cps, and the coefficient
// 7.34 ps/degC is 734. The unit choice itself is this design's own.
package dm_pkg;

  typedef logic        [31:0] delay_t;   // unsigned delay, 0.01 ps
  typedef logic signed [31:0] sdelay_t;  // signed delay difference, 0.01 ps
  typedef logic signed [15:0] temp_t;    // temperature, 0.01 degC
  typedef logic        [15:0] alpha_t;   // delay temperature coefficient, 0.01 ps/degC

  // Initial test timing t0 (one period of the 100 MHz initial clock).
  localparam int unsigned T0_CPS_DEFAULT = 1_000_000;
  // Minimum dynamic phase-shift step PS of the embedded PLL.
  localparam int unsigned PS_CPS_DEFAULT = 9_615;

  // Request to the PLL dynamic phase-shift port.
  typedef enum logic {
    PS_OP_INIT = 1'b0,   // return the controllable clock to zero phase shift
    PS_OP_STEP = 1'b1    // delay the controllable clock by one more step PS
  } ps_op_e;

  // Operation requested from the test timing generator.
  typedef enum logic {
    TG_OP_SHIFT   = 1'b0, // one scan-shift pulse of the scan clock
    TG_OP_CAPTURE = 1'b1  // one launch (DCLK) + capture (CLK) pulse pair
  } tg_op_e;

endpackage
