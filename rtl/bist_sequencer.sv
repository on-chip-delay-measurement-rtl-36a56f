`timescale 1ps/10fs
// bist_sequencer: one logic-BIST run at the current test timing.
//
// A run applies NUM_PATTERNS test patterns. For each pattern it requests
// CHAIN_LEN scan-shift pulses from the test timing generator (loading the
// pattern from the LFSR and unloading the previous response into the MISR),
// then makes the pass/fail decision for that pattern, then requests one
// launch/capture pulse pair. At the start of a run the LFSR is loaded with the
// seed and the MISR is cleared. The scan-out of pattern 1 is only the
// chains' initial contents, so the MISR does not compact it and pattern 1
// gets no decision; pattern p >= 2 is decided by comparing the MISR signature
// after its scan shift with golden signature p. Because the signature
// accumulates, once a pattern fails all later patterns fail as well.
// Everything above follows the measurement method. This design's own
// choices: the golden signatures are stored in an internal table that a run
// with learn = 1 fills instead of comparing (the reference run, made at the
// at-speed timing t0 under controlled conditions), and the response to the
// last capture is not unloaded.
//
// Interface: start (one cycle, while idle) begins a run; done pulses for one
// cycle at the end with pass valid until the next start. dec_valid pulses
// once per decided pattern with dec_pattern (1-based) and dec_pass.
// Timing: about NUM_PATTERNS * (2*CHAIN_LEN + 7) CLK cycles per run.
module bist_sequencer
  import dm_pkg::*;
#(
  parameter int unsigned NUM_PATTERNS = 32,
  parameter int unsigned CHAIN_LEN    = 14,
  parameter int unsigned SIG_W        = 16,
  localparam int unsigned PAT_W = $clog2(NUM_PATTERNS + 1),
  localparam int unsigned SH_W  = $clog2(CHAIN_LEN + 1),
  localparam int unsigned IDX_W = (NUM_PATTERNS > 1) ? $clog2(NUM_PATTERNS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             learn,
  output logic             busy,
  output logic             done,
  output logic             pass,
  // test timing generator
  output logic             tg_valid,
  output tg_op_e           tg_op,
  input  logic             tg_ready,
  input  logic             tg_busy,
  // pattern generator and signature register
  output logic             lfsr_load,
  output logic             misr_clear,
  output logic             misr_en,
  input  logic [SIG_W-1:0] signature,
  // decision log
  output logic             dec_valid,
  output logic [PAT_W-1:0] dec_pattern,
  output logic             dec_pass
);

  typedef enum logic [2:0] {
    S_IDLE, S_INIT, S_SHIFT, S_WAIT, S_DECIDE, S_CAPTURE, S_CAPWAIT, S_FINISH
  } state_e;
  state_e state;

  logic [PAT_W-1:0] pat;
  logic [SH_W-1:0]  sh_cnt;
  logic             wait_cnt;
  logic             learn_r, fail;
  logic [SIG_W-1:0] golden [NUM_PATTERNS];
  logic [IDX_W-1:0] gidx;    // table entry of pattern pat

  assign gidx = IDX_W'(pat - PAT_W'(1));

  assign busy       = (state != S_IDLE);
  assign lfsr_load  = (state == S_INIT);
  assign misr_clear = (state == S_INIT);
  assign misr_en    = (pat != PAT_W'(1));
  assign tg_valid   = (state == S_SHIFT) || (state == S_CAPTURE);
  assign tg_op      = (state == S_CAPTURE) ? TG_OP_CAPTURE : TG_OP_SHIFT;

  always_ff @(posedge clk) begin
    if (state == S_DECIDE && learn_r && pat != PAT_W'(1))
      golden[gidx] <= signature;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pat         <= PAT_W'(1);
      sh_cnt      <= '0;
      wait_cnt    <= 1'b0;
      learn_r     <= 1'b0;
      fail        <= 1'b0;
      pass        <= 1'b0;
      done        <= 1'b0;
      dec_valid   <= 1'b0;
      dec_pattern <= '0;
      dec_pass    <= 1'b0;
    end else begin
      done      <= 1'b0;
      dec_valid <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          state   <= S_INIT;
          learn_r <= learn;
          fail    <= 1'b0;
          pat     <= PAT_W'(1);
          sh_cnt  <= '0;
        end
        S_INIT: state <= S_SHIFT;
        S_SHIFT: if (tg_ready) begin
          if (sh_cnt == SH_W'(CHAIN_LEN - 1)) begin
            sh_cnt   <= '0;
            wait_cnt <= 1'b0;
            state    <= S_WAIT;
          end else
            sh_cnt <= sh_cnt + SH_W'(1);
        end
        S_WAIT: begin  // let the last shift reach the MISR
          wait_cnt <= 1'b1;
          if (wait_cnt) state <= S_DECIDE;
        end
        S_DECIDE: begin
          if (pat != PAT_W'(1)) begin
            dec_valid   <= 1'b1;
            dec_pattern <= pat;
            if (learn_r)
              dec_pass <= 1'b1;
            else begin
              dec_pass <= (signature == golden[gidx]);
              if (signature != golden[gidx]) fail <= 1'b1;
            end
          end
          state <= S_CAPTURE;
        end
        S_CAPTURE: if (tg_ready) state <= S_CAPWAIT;
        S_CAPWAIT: if (!tg_busy) begin
          if (pat == PAT_W'(NUM_PATTERNS))
            state <= S_FINISH;
          else begin
            pat   <= pat + PAT_W'(1);
            state <= S_SHIFT;
          end
        end
        S_FINISH: begin
          pass  <= !fail;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_op_held: assert property (@(posedge clk) disable iff (!rst_n)
      (tg_valid && !tg_ready) |=> (tg_valid && $stable(tg_op)));

endmodule
