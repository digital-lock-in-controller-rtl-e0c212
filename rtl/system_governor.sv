// system_governor: operation-mode control of the lock-in controller.
//
// The 10-bit OP word from the single-pin configuration is decoded into an
// op_cfg_t (enable, sampling method, dead-time, re-estimation interval
// N_est, LPF depth, light-load). A state machine then runs the
// converter:
//   OFF    -> START  when enable is set
//   START  : loads the initial on-times into the auto-tuner (one clock)
//            -> EST with single-sample sampling, else -> LOCKIN
//   EST    : inherent-delay estimation; the tanks are driven with the fixed
//            early-switching on-time est_time, tuning is frozen
//            -> LOCKIN when every sampling channel reports est_done
//   LOCKIN : closed-loop tuning -> RUN when the auto-tuner reports locked
//   RUN    : closed-loop fine tuning; back to LOCKIN if lock is lost, and,
//            with single-sample sampling, to EST every N_est cycles
//   any    -> STOP when enable clears; STOP lets the sequencer finish the
//            cycle in progress -> OFF when the sequencer is idle
// The governor also chooses the on-times given to the sequencer: est_time
// during EST, the tuned values otherwise.
// The list of decisions (start-up, turn-off, dead-time, light-load,
// re-estimation every N_est cycles, Locked feedback) follows the design;
// the OP field layout and the state machine itself are this design's own.
// OP[1:0] are deliberately not decoded (lint reports them unused): they
// absorb the count error of the configuration ADC.
// Timing: all outputs are registered state decodes or follow the state
// combinationally; a mode change takes effect at the next cycle boundary
// of the sequencer.
`timescale 1ps/1ps
module system_governor
  import lockin_pkg::*;
#(
  parameter int unsigned NT = N_TANKS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [OP_BITS-1:0] op,
  input  logic         locked,
  input  logic [NT-1:0] est_done,
  input  logic         cycle_start,
  input  logic         seq_idle,
  input  ontime_t      t_pulse  [NT][N_STATES],
  input  ontime_t      est_time,
  output ontime_t      seq_time [NT][N_STATES],
  output gov_state_t   gstate,
  output logic         seq_run,
  output logic         tune_en,
  output logic         load_init,
  output logic         est_req,
  output logic         single_mode,
  output logic [7:0]   dead_time,
  output logic [1:0]   skip,
  output logic [3:0]   lpf_depth
);
  op_cfg_t     cfg;
  logic [11:0] ncyc;
  logic [11:0] n_est;

  assign cfg         = op_cfg_t'(op);
  assign single_mode = cfg.single_samp;
  assign dead_time   = 8'({cfg.dt_code, 1'b0} + 3'd2);
  assign lpf_depth   = 4'({cfg.lpf_code, 1'b0} + 3'd2);
  assign skip        = cfg.light_load ? 2'(LL_SKIP) : 2'd0;
  assign n_est       = cfg.nest_code ? 12'd1024 : 12'd256;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gstate <= GOV_OFF;
      ncyc   <= '0;
    end else begin
      if (cycle_start) ncyc <= ncyc + 1'b1;
      unique case (gstate)
        GOV_OFF:    if (cfg.enable) gstate <= GOV_START;
        GOV_START:  gstate <= cfg.single_samp ? GOV_EST : GOV_LOCKIN;
        GOV_EST:    if (&est_done) gstate <= GOV_LOCKIN;
        GOV_LOCKIN: if (locked) begin
                      gstate <= GOV_RUN;
                      ncyc   <= '0;
                    end
        GOV_RUN:    if (cfg.single_samp && ncyc >= n_est) gstate <= GOV_EST;
                    else if (!locked)                     gstate <= GOV_LOCKIN;
        GOV_STOP:   if (seq_idle) gstate <= GOV_OFF;
        default:    gstate <= GOV_OFF;
      endcase
      if (!cfg.enable && gstate != GOV_OFF && gstate != GOV_STOP)
        gstate <= GOV_STOP;
    end
  end

  assign seq_run   = (gstate == GOV_EST) || (gstate == GOV_LOCKIN) || (gstate == GOV_RUN);
  assign tune_en   = (gstate == GOV_LOCKIN) || (gstate == GOV_RUN);
  assign load_init = (gstate == GOV_START);
  assign est_req   = (gstate == GOV_EST);

  always_comb
    for (int x = 0; x < NT; x++)
      for (int s = 0; s < N_STATES; s++)
        seq_time[x][s] = est_req ? est_time : t_pulse[x][s];
endmodule
