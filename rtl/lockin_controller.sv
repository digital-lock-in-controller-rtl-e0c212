// lockin_controller: digital lock-in controller for a resonant
// switched-capacitor converter with NT resonant tanks.
//
// The controller finds the resonant half-period of every tank in each of
// the two switching states and keeps each gate pulse exactly that long, so
// every tank is switched off at zero current. It is built from:
//   single_pin_config  sigma-delta bit-stream flip-flop and 1024-clock ones
//                      counter: pin voltage -> 10-bit OP word
//   system_governor    operation modes (start-up, delay estimation, lock-in,
//                      run, turn-off), OP decoding, Locked feedback
//   zcd_sampler [NT]   sampling block: reads each tank's 2-bit ZCD code after
//                      turn-off (continuous or single delayed sample, with
//                      inherent-delay estimation)
//   auto_tuner         compensator + shift-register LPF per tank and state,
//                      tune registers T_pulse, Locked
//   sequencer          coarse counter + delay-line high-resolution timer,
//                      dead-time and overlap protection, gate outputs
// The blocks and their connections follow the controller's block diagram.
// The analog parts of the configuration ADC (front-end inverter, RC
// integrator, inverter comparator), the ZCD sensors, the gate drivers and
// the clock source are outside this module: sd_cmp is the comparator output,
// sd_trg drives the front-end inverter, zcd[x] is the sensor code of tank x,
// q[x][s] is the gate command of tank x in switching state s (state 0
// charging, state 1 discharging).
//
// Parameters: INIT_TIME is the start-up on-time loaded into every tune
// register, EST_TIME the early-switching on-time applied during delay
// estimation; both are {coarse clocks, fine delay elements}. Their values
// (24 and 16 clocks of 50 ns against a resonant half-period of about 25.5
// clocks for 2.35 uF / 70 nH tanks) are this design's choice.
`timescale 1ps/1ps
module lockin_controller
  import lockin_pkg::*;
#(
  parameter int unsigned NT        = N_TANKS,
  parameter int unsigned DECIM     = 1024,
  parameter int unsigned DELAY_PS  = 3125,
  parameter ontime_t     INIT_TIME = ontime_t'(24 << FINE_BITS),
  parameter ontime_t     EST_TIME  = ontime_t'(16 << FINE_BITS)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                sd_cmp,
  output logic                sd_trg,
  output logic                sd_bit,     // clocked bit-stream
  input  logic [1:0]          zcd      [NT],
  output logic [N_STATES-1:0] q        [NT],
  output logic [OP_BITS-1:0]  op,
  output logic                op_valid,   // new OP word
  output gov_state_t          gstate,
  output logic                locked,
  output logic                masked,     // light-load idle cycle
  output ontime_t             t_pulse  [NT][N_STATES],
  output logic [9:0]          delta_s  [NT]
);
  // governor
  ontime_t    seq_time  [NT][N_STATES];
  ontime_t    init_time [NT][N_STATES];
  logic       seq_run, tune_en, load_init, est_req, single_mode;
  logic [7:0] dead_time;
  logic [1:0] skip;
  logic [3:0] lpf_depth;

  // sequencer
  logic [NT-1:0]        pre_off;
  logic [FINE_BITS-1:0] off_fine [NT];
  logic                 seq_state, dt_end, cycle_start, seq_idle;

  // sampling block
  logic [NT-1:0] samp_valid, samp_state, est_done;
  zcd_t          samp [NT];

  always_comb
    for (int x = 0; x < NT; x++)
      for (int s = 0; s < N_STATES; s++) init_time[x][s] = INIT_TIME;

  single_pin_config #(.DECIM(DECIM), .OP_BITS(OP_BITS)) u_cfg (
    .clk, .rst_n,
    .cmp_in   (sd_cmp),
    .bit_q    (sd_bit),
    .trg      (sd_trg),
    .op       (op),
    .op_valid (op_valid)
  );

  system_governor #(.NT(NT)) u_gov (
    .clk, .rst_n,
    .op          (op),
    .locked      (locked),
    .est_done    (est_done),
    .cycle_start (cycle_start),
    .seq_idle    (seq_idle),
    .t_pulse     (t_pulse),
    .est_time    (EST_TIME),
    .seq_time    (seq_time),
    .gstate      (gstate),
    .seq_run     (seq_run),
    .tune_en     (tune_en),
    .load_init   (load_init),
    .est_req     (est_req),
    .single_mode (single_mode),
    .dead_time   (dead_time),
    .skip        (skip),
    .lpf_depth   (lpf_depth)
  );

  for (genvar x = 0; x < NT; x++) begin : g_samp
    zcd_sampler #(.DW(10), .DELAY_PS(DELAY_PS)) u_samp (
      .clk, .rst_n,
      .zcd         (zcd[x]),
      .single_mode (single_mode),
      .est_req     (est_req),
      .pre_off     (pre_off[x]),
      .off_fine    (off_fine[x]),
      .state       (seq_state),
      .dt_end      (dt_end),
      .samp_valid  (samp_valid[x]),
      .samp        (samp[x]),
      .samp_state  (samp_state[x]),
      .est_done    (est_done[x]),
      .delta_s     (delta_s[x])
    );
  end

  auto_tuner #(.NT(NT)) u_tuner (
    .clk, .rst_n,
    .samp_valid  (samp_valid),
    .samp        (samp),
    .samp_state  (samp_state),
    .tune_en     (tune_en),
    .load_init   (load_init),
    .init_time   (init_time),
    .lpf_depth   (lpf_depth),
    .cycle_start (cycle_start),
    .t_pulse     (t_pulse),
    .locked      (locked)
  );

  sequencer #(.NT(NT), .DT_BITS(8), .DELAY_PS(DELAY_PS)) u_seq (
    .clk, .rst_n,
    .run         (seq_run),
    .on_time     (seq_time),
    .dead_time   (dead_time),
    .skip        (skip),
    .q           (q),
    .pre_off     (pre_off),
    .off_fine    (off_fine),
    .state       (seq_state),
    .dt_end      (dt_end),
    .cycle_start (cycle_start),
    .masked      (masked),
    .idle        (seq_idle)
  );
endmodule
