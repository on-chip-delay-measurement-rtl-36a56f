`timescale 1ps/10fs
// ro_temp_sensor: ring-oscillator temperature sensor readout.
//
// The on-chip temperature is derived from the frequency of a ring
// oscillator, whose output ro_clk enters here. After start the sensor opens
// a counting window of GATE_CYCLES clk cycles. The window is synchronised
// into the ro_clk domain, where a counter counts ro_clk edges while it is
// open. SETTLE_CYCLES after the window closes the counter is idle, and its
// value is copied into the clk domain. A linear calibration then gives the
// temperature
//   temperature = cal_temp + ((count - cal_count) * cal_slope) >>> 8
// in 0.01 degC, with cal_slope in 1/256 of 0.01 degC per count (negative
// for an oscillator that slows down when warm). Deriving the temperature
// from ring-oscillator frequency follows the measurement method; the single
// oscillator, the window, the linear calibration and its number formats are
// this design's choices. The calibration values come from a per-device
// calibration and are inputs.
//
// Interface: start pulse while idle; valid pulses when temperature and count
// are updated, GATE_CYCLES + SETTLE_CYCLES + 2 cycles after the clock edge
// that takes start.
module ro_temp_sensor
  import dm_pkg::*;
#(
  parameter int unsigned GATE_CYCLES   = 4096,
  parameter int unsigned SETTLE_CYCLES = 8,
  parameter int unsigned CNT_W         = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              ro_clk,
  input  logic              start,
  input  logic [CNT_W-1:0]  cal_count,
  input  temp_t             cal_temp,
  input  logic signed [15:0] cal_slope,
  output logic              busy,
  output logic              valid,
  output logic [CNT_W-1:0]  count,
  output temp_t             temperature
);

  localparam int unsigned W_W = $clog2(GATE_CYCLES + SETTLE_CYCLES + 1);

  typedef enum logic [1:0] {T_IDLE, T_GATE, T_SETTLE, T_CALC} state_e;
  state_e state;

  logic [W_W-1:0]   wcnt;
  logic             gate;
  // ring-oscillator domain
  logic             g_s1, g_s2, g_s3;
  logic [CNT_W-1:0] ro_cnt;
  // arithmetic
  logic signed [CNT_W:0]    diff;
  logic signed [CNT_W+16:0] prod;

  assign busy = (state != T_IDLE);
  assign gate = (state == T_GATE);

  always_ff @(posedge ro_clk or negedge rst_n) begin
    if (!rst_n) begin
      g_s1   <= 1'b0;
      g_s2   <= 1'b0;
      g_s3   <= 1'b0;
      ro_cnt <= '0;
    end else begin
      g_s1 <= gate;
      g_s2 <= g_s1;
      g_s3 <= g_s2;
      if (g_s2 && !g_s3)
        ro_cnt <= CNT_W'(1);
      else if (g_s2)
        ro_cnt <= ro_cnt + CNT_W'(1);
    end
  end

  assign diff = $signed({1'b0, count}) - $signed({1'b0, cal_count});
  assign prod = diff * cal_slope;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= T_IDLE;
      wcnt        <= '0;
      valid       <= 1'b0;
      count       <= '0;
      temperature <= '0;
    end else begin
      valid <= 1'b0;
      unique case (state)
        T_IDLE: if (start) begin
          wcnt  <= W_W'(GATE_CYCLES - 1);
          state <= T_GATE;
        end
        T_GATE: begin
          if (wcnt == '0) begin
            wcnt  <= W_W'(SETTLE_CYCLES - 1);
            state <= T_SETTLE;
          end else
            wcnt <= wcnt - W_W'(1);
        end
        T_SETTLE: begin
          if (wcnt == '0) begin
            count <= ro_cnt;  // counter is idle: the copy is stable
            state <= T_CALC;
          end else
            wcnt <= wcnt - W_W'(1);
        end
        T_CALC: begin
          temperature <= cal_temp + temp_t'(prod >>> 8);
          valid       <= 1'b1;
          state       <= T_IDLE;
        end
        default: state <= T_IDLE;
      endcase
    end
  end

endmodule
