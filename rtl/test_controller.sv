`timescale 1ps/10fs
// test_controller: the delay measurement flow with variable test timing.
//
// Finds the fastest test timing at which the BIST still passes. After start
// it returns the PLL's controllable clock to zero phase shift (i = 0, test
// timing t0, the initial clock period, which is at-speed) and starts a
// temperature measurement. Then it repeats: run one BIST pass at t_i; on a
// fail stop; on a pass with i < N_MAX record t_fastest = t_i, step the PLL
// phase by one step PS (i = i + 1, t_i = t0 - PS*i) and test again; on a
// pass with i = N_MAX stop at the limit. The measured delay is
// D_measured = t_fastest = t0 - PS * i_fastest. When the temperature reading
// is in, it starts the delay correction and finally pulses done. This flow,
// including that t_fastest stays t_{N-1} when the limit is reached with a
// pass, follows the measurement method's flow chart; the handshakes, the
// learn option (the i = 0 run stores the golden signatures) and the
// concurrent temperature measurement are this design's choices.
//
// Interfaces (all on the rising edge of clk):
//   PLL:   ps_req/ps_op held until ps_done pulses.
//   BIST:  bist_start pulse, bist_learn level, bist_done pulse + bist_pass.
//   TS:    temp_start pulse, temp_valid pulse.
//   corr:  corr_start pulse, corr_valid pulse.
// step_valid pulses after every BIST run with step_idx = i and step_pass.
// Delays are in 0.01 ps.
module test_controller
  import dm_pkg::*;
#(
  parameter int unsigned N_MAX  = 49,
  parameter int unsigned T0_CPS = T0_CPS_DEFAULT,
  parameter int unsigned PS_CPS = PS_CPS_DEFAULT,
  localparam int unsigned I_W = $clog2(N_MAX + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic           learn,
  output logic           busy,
  output logic           done,
  // PLL dynamic phase shift
  output logic           ps_req,
  output ps_op_e         ps_op,
  input  logic           ps_done,
  // BIST
  output logic           bist_start,
  output logic           bist_learn,
  input  logic           bist_done,
  input  logic           bist_pass,
  // temperature sensor
  output logic           temp_start,
  input  logic           temp_valid,
  // delay correction
  output logic           corr_start,
  input  logic           corr_valid,
  // results
  output logic [I_W-1:0] step_idx,
  output logic           step_valid,
  output logic           step_pass,
  output logic [I_W-1:0] i_fastest,
  output delay_t         t_current,
  output delay_t         d_measured,
  output logic           fail_found,
  output logic           limit_reached
);

  typedef enum logic [2:0] {
    C_IDLE, C_PS_INIT, C_RUN, C_WAIT_BIST, C_PS_STEP, C_WAIT_TEMP, C_CORR, C_WAIT_CORR
  } state_e;
  state_e state;

  logic learn_r, temp_ok;

  assign busy       = (state != C_IDLE);
  assign ps_req     = (state == C_PS_INIT) || (state == C_PS_STEP);
  assign ps_op      = (state == C_PS_STEP) ? PS_OP_STEP : PS_OP_INIT;
  assign bist_learn = learn_r && (step_idx == '0);
  assign t_current  = delay_t'(T0_CPS) - delay_t'(PS_CPS) * delay_t'(step_idx);
  assign d_measured = delay_t'(T0_CPS) - delay_t'(PS_CPS) * delay_t'(i_fastest);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= C_IDLE;
      learn_r       <= 1'b0;
      temp_ok       <= 1'b0;
      step_idx      <= '0;
      i_fastest     <= '0;
      fail_found    <= 1'b0;
      limit_reached <= 1'b0;
      done          <= 1'b0;
      bist_start    <= 1'b0;
      temp_start    <= 1'b0;
      corr_start    <= 1'b0;
      step_valid    <= 1'b0;
      step_pass     <= 1'b0;
    end else begin
      done       <= 1'b0;
      bist_start <= 1'b0;
      temp_start <= 1'b0;
      corr_start <= 1'b0;
      step_valid <= 1'b0;
      if (temp_valid) temp_ok <= 1'b1;
      unique case (state)
        C_IDLE: if (start) begin
          learn_r       <= learn;
          temp_ok       <= 1'b0;
          step_idx      <= '0;
          i_fastest     <= '0;   // t_fastest = t0
          fail_found    <= 1'b0;
          limit_reached <= 1'b0;
          temp_start    <= 1'b1;
          state         <= C_PS_INIT;
        end
        C_PS_INIT: if (ps_done) state <= C_RUN;
        C_RUN: begin
          bist_start <= 1'b1;
          state      <= C_WAIT_BIST;
        end
        C_WAIT_BIST: if (bist_done) begin
          step_valid <= 1'b1;
          step_pass  <= bist_pass;
          if (!bist_pass) begin
            fail_found <= 1'b1;
            state      <= C_WAIT_TEMP;
          end else if (step_idx < I_W'(N_MAX)) begin
            i_fastest <= step_idx;
            step_idx  <= step_idx + I_W'(1);
            state     <= C_PS_STEP;
          end else begin
            limit_reached <= 1'b1;
            state         <= C_WAIT_TEMP;
          end
        end
        C_PS_STEP: if (ps_done) state <= C_RUN;
        C_WAIT_TEMP: if (temp_ok || temp_valid) state <= C_CORR;
        C_CORR: begin
          corr_start <= 1'b1;
          state      <= C_WAIT_CORR;
        end
        C_WAIT_CORR: if (corr_valid) begin
          done  <= 1'b1;
          state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end

  a_ps_op_held: assert property (@(posedge clk) disable iff (!rst_n)
      (ps_req && !ps_done) |=> (ps_req && $stable(ps_op)));

  initial assert (longint'(PS_CPS) * longint'(N_MAX) < longint'(T0_CPS))
    else $error("test_controller: phase range exceeds the initial test timing");

endmodule
