// auto_tuner: lock-in tuning of the on-time of every tank and switching state.
//
// Structure (one channel per tank x and switching state s):
//  * input registers hold the latest sampled ZCD reading of the channel;
//  * the digital compensator forms a candidate on-time from the on-time in
//    use: T_x = t_pulse + STEP after an early reading (current still
//    flowing forward at turn-off), t_pulse - STEP after a late reading, and
//    t_pulse unchanged after a ZCS reading, limited to [T_MIN, T_MAX];
//  * the LPF is a shift register of lpf_depth candidate words. At the start
//    of every switching cycle (cycle_start) each channel shifts its
//    candidate in; the tune register t_pulse takes the candidate only when
//    all lpf_depth stages hold the same value, so an isolated wrong reading
//    never moves the on-time;
//  * the "Locked" logic reports that every channel has read ZCS in at least
//    lpf_depth consecutive cycles.
// The compensator rule, the filter comparison and the shift at the start of
// every cycle follow the design. Basing the candidate on the on-time in use,
// the step of one delay element, the limits, and the Locked rule are this
// design's choices. A reading is used once; a channel without a new reading
// shifts in an unchanged candidate.
//
// load_init loads init_time into t_pulse and the whole filter (start-up
// with programmed initial values). Nothing is tuned while tune_en is low.
// Timing: t_pulse changes one clock after cycle_start.
`timescale 1ps/1ps
module auto_tuner
  import lockin_pkg::*;
#(
  parameter int unsigned NT    = N_TANKS,
  parameter int unsigned DEPTH = LPF_MAX,
  parameter int unsigned STEP  = 1,
  parameter ontime_t     T_MIN = ontime_t'(2 << FINE_BITS),
  parameter ontime_t     T_MAX = '1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [NT-1:0] samp_valid,
  input  zcd_t        samp       [NT],
  input  logic [NT-1:0] samp_state,
  input  logic        tune_en,
  input  logic        load_init,
  input  ontime_t     init_time  [NT][N_STATES],
  input  logic [3:0]  lpf_depth,              // 1 .. DEPTH stages compared
  input  logic        cycle_start,            // shift command
  output ontime_t     t_pulse    [NT][N_STATES],
  output logic        locked
);
  localparam int unsigned CW = $clog2(DEPTH + 1);

  zcd_t          rd     [NT][N_STATES];      // input registers
  ontime_t       lpf    [NT][N_STATES][DEPTH];
  logic [CW-1:0] zcnt   [NT][N_STATES];
  zcd_t          cur    [NT][N_STATES];
  ontime_t       cand   [NT][N_STATES];      // compensator output T_x
  logic          agree  [NT][N_STATES];
  logic [3:0]    depth;

  assign depth = (lpf_depth == 4'd0) ? 4'd1 :
                 (lpf_depth > 4'(DEPTH)) ? 4'(DEPTH) : lpf_depth;

  // digital compensator and comparison block
  always_comb begin
    for (int x = 0; x < NT; x++)
      for (int s = 0; s < N_STATES; s++) begin
        cur[x][s] = (samp_valid[x] && samp_state[x] == 1'(s)) ? samp[x] : rd[x][s];
        unique case (cur[x][s])
          ZCD_EARLY: cand[x][s] = (t_pulse[x][s] > T_MAX - ontime_t'(STEP))
                                  ? T_MAX : t_pulse[x][s] + ontime_t'(STEP);
          ZCD_LATE:  cand[x][s] = (t_pulse[x][s] < T_MIN + ontime_t'(STEP))
                                  ? T_MIN : t_pulse[x][s] - ontime_t'(STEP);
          default:   cand[x][s] = t_pulse[x][s];
        endcase
        // stage 0 after the shift is cand, stage i is lpf[i-1]
        agree[x][s] = 1'b1;
        for (int i = 1; i < DEPTH; i++)
          if (i < int'(depth) && lpf[x][s][i-1] != cand[x][s]) agree[x][s] = 1'b0;
      end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int x = 0; x < NT; x++)
        for (int s = 0; s < N_STATES; s++) begin
          rd[x][s]      <= ZCD_ZCS;
          zcnt[x][s]    <= '0;
          t_pulse[x][s] <= T_MIN;
          for (int i = 0; i < DEPTH; i++) lpf[x][s][i] <= T_MIN;
        end
    end else if (load_init) begin
      for (int x = 0; x < NT; x++)
        for (int s = 0; s < N_STATES; s++) begin
          rd[x][s]      <= ZCD_ZCS;
          zcnt[x][s]    <= '0;
          t_pulse[x][s] <= init_time[x][s];
          for (int i = 0; i < DEPTH; i++) lpf[x][s][i] <= init_time[x][s];
        end
    end else begin
      for (int x = 0; x < NT; x++)
        for (int s = 0; s < N_STATES; s++) begin
          if (tune_en && cycle_start) begin
            rd[x][s]     <= ZCD_ZCS;                  // reading consumed
            lpf[x][s][0] <= cand[x][s];
            for (int i = 1; i < DEPTH; i++) lpf[x][s][i] <= lpf[x][s][i-1];
            if (agree[x][s]) t_pulse[x][s] <= cand[x][s];
            if (cur[x][s] == ZCD_ZCS) begin
              if (zcnt[x][s] != CW'(DEPTH)) zcnt[x][s] <= zcnt[x][s] + 1'b1;
            end else begin
              zcnt[x][s] <= '0;
            end
          end else if (samp_valid[x] && samp_state[x] == 1'(s)) begin
            rd[x][s] <= samp[x];
          end
        end
    end
  end

  // Locked: every channel has CW-saturating count of ZCS cycles >= depth
  always_comb begin
    locked = tune_en;
    for (int x = 0; x < NT; x++)
      for (int s = 0; s < N_STATES; s++)
        if (zcnt[x][s] < CW'(depth)) locked = 1'b0;
  end
endmodule
