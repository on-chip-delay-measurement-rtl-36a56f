`timescale 1ps/10fs
// pll_model: behavioural model of an FPGA PLL with dynamic phase shift,
// for simulation only.
//
// Produces the original clock clk (period PERIOD_PS) and a copy dclk delayed
// by n * STEP_PS, where n is the phase-shift count. A request ps_req with
// ps_op = PS_OP_STEP increments n, PS_OP_INIT sets it to 0; the model answers
// LATENCY clk cycles later with a one-cycle ps_done pulse and the new phase
// takes effect from then on. The phase count is visible as phase_steps.
module pll_model
  import dm_pkg::*;
#(
  parameter realtime PERIOD_PS = 10000.0,
  parameter realtime STEP_PS   = 96.15,
  parameter int      LATENCY   = 3
) (
  output logic   clk,
  output logic   dclk,
  input  logic   ps_req,
  input  ps_op_e ps_op,
  output logic   ps_done,
  output int     phase_steps
);

  int      wait_cnt = 0;
  realtime shift_ps = 0.0;

  initial begin
    clk         = 1'b0;
    dclk        = 1'b0;
    ps_done     = 1'b0;
    phase_steps = 0;
  end

  always #(PERIOD_PS / 2.0) clk = !clk;

  always @(clk) dclk <= #(shift_ps) clk;

  always @(posedge clk) begin
    ps_done <= 1'b0;
    if (ps_req && !ps_done) begin
      if (wait_cnt == LATENCY) begin
        wait_cnt <= 0;
        ps_done  <= 1'b1;
        if (ps_op == PS_OP_STEP) begin
          phase_steps <= phase_steps + 1;
          shift_ps    <= STEP_PS * (phase_steps + 1);
        end else begin
          phase_steps <= 0;
          shift_ps    <= 0.0;
        end
      end else
        wait_cnt <= wait_cnt + 1;
    end
  end

endmodule
