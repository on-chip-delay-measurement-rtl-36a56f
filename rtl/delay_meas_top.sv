`timescale 1ps/10fs
// delay_meas_top: BIST-based in-field delay measurement with temperature
// correction for a scan-inserted user circuit in an FPGA.
//
// The embedded PLL (outside this module) supplies the original clock clk
// (CLK) and a copy dclk (DCLK_i) whose phase the PLL's dynamic phase-shift
// port delays in steps of PS. The test timing generator turns them into the
// test clock tclk of the user circuit's scan chains, with a launch edge on
// DCLK_i and a capture edge on the next CLK edge, so the launch-to-capture
// time is t_i = t0 - PS*i. The test controller sweeps i upward, running one
// LFSR/MISR logic-BIST pass per step, until a pattern fails; the last
// passing timing is the measured delay. A ring-oscillator temperature sensor
// measures the temperature during the test, and the delay correction maps
// the measured delay to the reference temperature T0 and reports the
// increase over the reference delay D0 (aging).
//
// Blocks: test_controller, bist_sequencer, test_timing_generator, lfsr,
// scan_chains, misr, ro_temp_sensor, delay_correction. The parts that are
// not logic are outside and connect through ports:
//   * PLL: clk, dclk in; ps_req/ps_op out, ps_done in (phase init / step);
//   * user logic: scan flip-flop outputs cut_q out, next-state cut_d in;
//   * ring oscillator: ro_clk in;
//   * nonvolatile memory: alpha, d0, t0 and the sensor calibration in.
// func_mode = 1 puts the user circuit in its functional mode (tclk = clk,
// se = 0). Results hold from done until the next start. Delays are in
// 0.01 ps, temperatures in 0.01 degC.
//
// The parameters default to the measurement method's numbers: 32 patterns,
// up to 49 phase steps of 96.15 ps from a 10000 ps initial timing. The scan
// configuration (4 chains of 14 flip-flops), the 16-bit LFSR/MISR and the
// sensor window are this design's choices.
module delay_meas_top
  import dm_pkg::*;
#(
  parameter int unsigned NUM_CHAINS   = 4,
  parameter int unsigned CHAIN_LEN    = 14,
  parameter int unsigned NUM_PATTERNS = 32,
  parameter int unsigned N_MAX        = 49,
  parameter int unsigned T0_CPS       = T0_CPS_DEFAULT,
  parameter int unsigned PS_CPS       = PS_CPS_DEFAULT,
  parameter int unsigned PRPG_W       = 16,
  parameter int unsigned SIG_W        = 16,
  parameter int unsigned GATE_CYCLES  = 4096,
  parameter int unsigned CNT_W        = 16,
  localparam int unsigned NFF   = NUM_CHAINS * CHAIN_LEN,
  localparam int unsigned I_W   = $clog2(N_MAX + 1),
  localparam int unsigned PAT_W = $clog2(NUM_PATTERNS + 1)
) (
  input  logic               clk,
  input  logic               dclk,
  input  logic               rst_n,
  // control
  input  logic               func_mode,
  input  logic               start,
  input  logic               learn,
  input  logic [PRPG_W-1:0]  seed,
  output logic               busy,
  output logic               done,
  // PLL dynamic phase shift
  output logic               ps_req,
  output ps_op_e             ps_op,
  input  logic               ps_done,
  // user logic
  output logic               tclk,
  output logic               se,
  output logic [NFF-1:0]     cut_q,
  input  logic [NFF-1:0]     cut_d,
  // ring oscillator
  input  logic               ro_clk,
  // nonvolatile parameters
  input  alpha_t             alpha,
  input  delay_t             d0,
  input  temp_t              t0,
  input  logic [CNT_W-1:0]   cal_count,
  input  temp_t              cal_temp,
  input  logic signed [15:0] cal_slope,
  // per-step and per-pattern log
  output logic               step_valid,
  output logic [I_W-1:0]     step_idx,
  output logic               step_pass,
  output logic               dec_valid,
  output logic [PAT_W-1:0]   dec_pattern,
  output logic               dec_pass,
  // results
  output logic [I_W-1:0]     i_fastest,
  output delay_t             d_measured,
  output logic               fail_found,
  output logic               limit_reached,
  output delay_t             t_current,
  output logic [CNT_W-1:0]   ro_count,
  output temp_t              t_measured,
  output sdelay_t            d_corrected,
  output sdelay_t            d_aging
);

  // controller <-> BIST
  logic bist_start, bist_learn, bist_done, bist_pass;
  // BIST <-> timing generator
  logic   tg_valid, tg_ready, tg_busy;
  tg_op_e tg_op;
  logic   shift_active;
  // BIST <-> LFSR / MISR
  logic              lfsr_load, misr_clear, misr_en;
  logic [SIG_W-1:0]  signature;
  logic [NUM_CHAINS-1:0] chain_in, chain_out;
  // sensor and correction
  logic             temp_start, temp_valid;
  logic             corr_start, corr_valid;

  test_controller #(
    .N_MAX (N_MAX), .T0_CPS(T0_CPS), .PS_CPS(PS_CPS)
  ) u_ctrl (
    .clk, .rst_n, .start, .learn, .busy, .done,
    .ps_req, .ps_op, .ps_done,
    .bist_start, .bist_learn, .bist_done, .bist_pass,
    .temp_start, .temp_valid,
    .corr_start, .corr_valid,
    .step_idx, .step_valid, .step_pass,
    .i_fastest, .t_current, .d_measured, .fail_found, .limit_reached
  );

  bist_sequencer #(
    .NUM_PATTERNS(NUM_PATTERNS), .CHAIN_LEN(CHAIN_LEN), .SIG_W(SIG_W)
  ) u_bist (
    .clk, .rst_n,
    .start(bist_start), .learn(bist_learn),
    .busy(), .done(bist_done), .pass(bist_pass),
    .tg_valid, .tg_op, .tg_ready, .tg_busy,
    .lfsr_load, .misr_clear, .misr_en, .signature,
    .dec_valid, .dec_pattern, .dec_pass
  );

  test_timing_generator u_tg (
    .clk, .dclk, .rst_n, .func_mode,
    .req_valid(tg_valid), .req_op(tg_op), .req_ready(tg_ready), .busy(tg_busy),
    .tclk, .se, .sclk(), .shift_active
  );

  lfsr #(.WIDTH(PRPG_W), .NUM_OUT(NUM_CHAINS)) u_lfsr (
    .clk, .load(lfsr_load), .seed, .adv(shift_active),
    .state(), .scan_in(chain_in)
  );

  scan_chains #(.NUM_CHAINS(NUM_CHAINS), .CHAIN_LEN(CHAIN_LEN)) u_chains (
    .tclk, .rst_n, .se,
    .scan_in(chain_in), .scan_out(chain_out),
    .d(cut_d), .q(cut_q)
  );

  misr #(.WIDTH(SIG_W), .NUM_IN(NUM_CHAINS)) u_misr (
    .clk, .clear(misr_clear), .en(misr_en && shift_active),
    .data(chain_out), .signature
  );

  ro_temp_sensor #(.GATE_CYCLES(GATE_CYCLES), .CNT_W(CNT_W)) u_ts (
    .clk, .rst_n, .ro_clk, .start(temp_start),
    .cal_count, .cal_temp, .cal_slope,
    .busy(), .valid(temp_valid), .count(ro_count),
    .temperature(t_measured)
  );

  delay_correction u_corr (
    .clk, .rst_n, .start(corr_start),
    .d_measured, .t_measured, .d0, .t0, .alpha,
    .valid(corr_valid), .d_corrected, .d_aging
  );

endmodule
