`timescale 1ps/10fs
// test_timing_generator: builds the test clock TCLK and the scan enable SE.
//
// Inputs are the two PLL outputs: clk, the original clock CLK (which also
// clocks all control logic), and dclk, the controllable clock DCLK_i = CLK
// delayed by i phase-shift steps. TCLK is the OR of three gated clocks:
//   * the scan clock SCLK = CLK / 2, passed pulse by pulse in shift mode;
//   * one DCLK pulse, the launch pulse of a launch-off-capture test;
//   * the following CLK pulse, the capture pulse.
// The launch edge comes PS*i after a CLK edge and the capture edge comes on
// the next CLK edge, so the test timing is t_i = T_clk - PS*i. SE is 1 while
// shifting and 0 around the launch/capture pair. These roles of SCLK, CLK and
// DCLK_i follow the measurement method; the gating circuit, the CLK/2 scan
// clock and the request handshake are this design's choices.
//
// Each gate is a latch that is transparent while its own clock is low (an
// integrated clock gate), so a gated pulse is always whole. This design's
// latches are intended: s_gate, l_gate and c_gate are clock-gate latches.
// Their enables change only where the latch is closed or the clock is low:
//   * s_arm changes only on the CLK edges where SCLK falls;
//   * launch_arm and se change on the falling edge of CLK;
//   * c_arm changes on the rising edge of CLK (classic clock gate).
// launch_arm is high from half a CLK period before the launch CLK cycle to
// half a period into it, so exactly the DCLK pulse that starts PS*i after
// the launch cycle's CLK edge passes. That holds for 0 <= PS*i < T_clk/2,
// the range of the method (at most 49 * 96.15 ps against 5000 ps).
//
// Request interface (rising edge of clk): req_valid/req_op are taken when
// req_ready is high. A shift request is taken when SCLK is high and emits one
// SCLK pulse starting one CLK cycle later; back-to-back shifts run at the
// SCLK rate. A capture request taken at edge E0 lowers SE at E0 + T/2, gives
// the launch pulse at E2 + PS*i and the capture pulse at E3, and raises SE at
// E3 + T/2; busy is high from E0 to E3. func_mode = 1 selects the user
// functional mode: TCLK = CLK and SE = 0, requests are not taken.
// shift_active is high for the CLK cycle that follows each shift edge; the
// pattern generator and signature register step on the falling edge of CLK
// while it is high.
module test_timing_generator
  import dm_pkg::*;
(
  input  logic   clk,
  input  logic   dclk,
  input  logic   rst_n,
  input  logic   func_mode,
  input  logic   req_valid,
  input  tg_op_e req_op,
  output logic   req_ready,
  output logic   busy,
  output logic   tclk,
  output logic   se,
  output logic   sclk,
  output logic   shift_active
);

  typedef enum logic [1:0] {ST_IDLE, ST_CAP1, ST_CAP2, ST_CAP3} state_e;
  state_e state;

  logic s_arm, l_pre, c_arm, se_req, launch_arm;
  logic s_gate, l_gate, c_gate;
  logic take;

  assign req_ready = (state == ST_IDLE) && sclk && !func_mode;
  assign take      = req_valid && req_ready;
  assign busy      = (state != ST_IDLE);

  // Control on the rising edge of CLK.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_IDLE;
      sclk   <= 1'b0;
      s_arm  <= 1'b0;
      l_pre  <= 1'b0;
      c_arm  <= 1'b0;
      se_req <= 1'b1;
    end else begin
      sclk <= !sclk;
      if (sclk)  // SCLK falls at this edge: the shift gate may change
        s_arm <= take && (req_op == TG_OP_SHIFT);
      unique case (state)
        ST_IDLE: if (take && req_op == TG_OP_CAPTURE) begin
          state  <= ST_CAP1;
          se_req <= 1'b0;
        end
        ST_CAP1: begin
          state <= ST_CAP2;
          l_pre <= 1'b1;
        end
        ST_CAP2: begin
          state <= ST_CAP3;
          l_pre <= 1'b0;
          c_arm <= 1'b1;
        end
        ST_CAP3: begin
          state  <= ST_IDLE;
          c_arm  <= 1'b0;
          se_req <= 1'b1;
        end
        default: state <= ST_IDLE;
      endcase
    end
  end

  // Retiming on the falling edge of CLK: away from every TCLK edge.
  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) begin
      launch_arm <= 1'b0;
      se         <= 1'b1;
    end else begin
      launch_arm <= l_pre;
      se         <= se_req && !func_mode;
    end
  end

  // Clock-gate latches, transparent while their clock is low.
  always_latch
    if (!rst_n)     s_gate = 1'b0;
    else if (!sclk) s_gate = s_arm;

  always_latch
    if (!rst_n)     l_gate = 1'b0;
    else if (!dclk) l_gate = launch_arm;

  always_latch
    if (!rst_n)    c_gate = 1'b0;
    else if (!clk) c_gate = c_arm || func_mode;

  assign shift_active = sclk && s_gate;
  assign tclk = shift_active || (dclk && l_gate) || (clk && c_gate);

  // The capture pair must happen with scan enable low.
  a_se_low_capture: assert property (@(posedge clk) disable iff (!rst_n)
      (state == ST_CAP3) |-> !se);

endmodule
