// sequencer: multi-phase high-resolution gating generator.
//
// A switching cycle is: state 0 (charging) on-time, dead-time, state 1
// (discharging) on-time, dead-time. In each state every tank x gets its own
// gating pulse whose length is on_time[x][state] = {coarse, fine}:
//   * a shared coarse counter and the compare logic (the "computational
//     block") keep the coarse pulse p[x] high for `coarse` clocks;
//   * p[x] also enters an hr_delay_line whose tap is `fine`; the stretched
//     pulse p[x] | delayed(p[x]) keeps the rising edge and moves the falling
//     edge fine * DELAY_PS later, giving one-delay-element resolution;
//   * the stretched pulse is steered to the gate output of the active state.
// Counter + delay line + per-tank tap multiplexer follow the design; how the
// delayed and undelayed pulses are combined is this design's choice.
//
// Protection: the state changes only after the longest pulse of the state
// has ended and dead_time clocks have passed, so the two gate outputs of a
// tank never overlap (checked by an assertion); when run falls the cycle in
// progress is completed before the sequencer idles. The on-times are
// latched when a state begins, so a tune update never cuts a pulse.
// Light-load: after each active cycle `skip` cycles run with all gates off.
//
// Timing: cycle_start is high in the first clock of every cycle. pre_off[x]
// is high in the clock before the edge at which p[x] falls (the turn-off
// command of tank x); off_fine[x] is that pulse's fine delay. dt_end is high
// in the last clock of a dead-time. The dead-time is counted from the
// coarse end of the longest pulse, so the gap seen at the gates is
// dead_time clocks less that pulse's fine part; dead_time must be >= 1.
// The reset also disables the overlap assertion, which is why lint sees
// rst_n used both asynchronously and synchronously.
`timescale 1ps/1ps
module sequencer
  import lockin_pkg::*;
#(
  parameter int unsigned NT       = N_TANKS,
  parameter int unsigned DT_BITS  = 8,
  parameter int unsigned DELAY_PS = 3125
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 run,
  input  ontime_t              on_time  [NT][N_STATES],
  input  logic [DT_BITS-1:0]   dead_time,
  input  logic [1:0]           skip,
  output logic [N_STATES-1:0]  q        [NT],   // gate drive per tank/state
  output logic [NT-1:0]        pre_off,
  output logic [FINE_BITS-1:0] off_fine [NT],
  output logic                 state,           // switching state in progress
  output logic                 dt_end,
  output logic                 cycle_start,
  output logic                 masked,          // light-load idle cycle
  output logic                 idle
);
  typedef enum logic [1:0] {SQ_IDLE, SQ_ON, SQ_DEAD} sq_t;

  sq_t                    sq;
  logic [COARSE_BITS:0]   cnt;
  logic [COARSE_BITS-1:0] crs_q [NT];
  logic [FINE_BITS-1:0]   fin_q [NT];
  logic [COARSE_BITS-1:0] crs_max;
  logic [NT-1:0]          p, dly;
  logic [1:0]             skip_cnt;
  logic                   last_on, next_masked;
  logic                   ns, nm;                // next state, next masked

  // longest latched coarse on-time of the state in progress
  always_comb begin
    crs_max = '0;
    for (int x = 0; x < NT; x++)
      if (crs_q[x] > crs_max) crs_max = crs_q[x];
  end

  assign last_on = (sq == SQ_ON) && (cnt >= {1'b0, crs_max});
  assign dt_end  = (sq == SQ_DEAD) && (cnt == (COARSE_BITS+1)'(dead_time));
  assign idle    = (sq == SQ_IDLE);
  // the cycle after an active one is masked while skip_cnt < skip
  assign next_masked = (skip != 2'd0) && (masked ? (skip_cnt != skip) : 1'b1);
  assign ns          = ~state;
  assign nm          = state ? next_masked : masked;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sq          <= SQ_IDLE;
      cnt         <= '0;
      state       <= 1'b0;
      masked      <= 1'b0;
      skip_cnt    <= '0;
      cycle_start <= 1'b0;
      p           <= '0;
      for (int x = 0; x < NT; x++) begin
        crs_q[x] <= '0;
        fin_q[x] <= '0;
      end
    end else begin
      cycle_start <= 1'b0;
      unique case (sq)
        SQ_IDLE: if (run) begin
          sq          <= SQ_ON;
          state       <= 1'b0;
          masked      <= 1'b0;
          skip_cnt    <= '0;
          cycle_start <= 1'b1;
          cnt         <= (COARSE_BITS+1)'(1);
          for (int x = 0; x < NT; x++) begin
            crs_q[x] <= on_time[x][0][T_BITS-1:FINE_BITS];
            fin_q[x] <= on_time[x][0][FINE_BITS-1:0];
            p[x]     <= (on_time[x][0][T_BITS-1:FINE_BITS] != '0);
          end
        end
        SQ_ON: begin
          cnt <= cnt + 1'b1;
          for (int x = 0; x < NT; x++)
            p[x] <= p[x] && (cnt < {1'b0, crs_q[x]});
          if (last_on) begin
            sq  <= SQ_DEAD;
            cnt <= (COARSE_BITS+1)'(1);
          end
        end
        SQ_DEAD: begin
          cnt <= cnt + 1'b1;
          if (dt_end) begin
            if (state == 1'b0 || run) begin
              if (state == 1'b1) begin      // a new switching cycle
                cycle_start <= 1'b1;
                skip_cnt    <= nm ? (masked ? skip_cnt + 1'b1 : 2'd1) : 2'd0;
              end
              sq     <= SQ_ON;
              state  <= ns;
              masked <= nm;
              cnt    <= (COARSE_BITS+1)'(1);
              for (int x = 0; x < NT; x++) begin
                crs_q[x] <= on_time[x][ns][T_BITS-1:FINE_BITS];
                fin_q[x] <= on_time[x][ns][FINE_BITS-1:0];
                p[x]     <= !nm && (on_time[x][ns][T_BITS-1:FINE_BITS] != '0);
              end
            end else begin
              sq     <= SQ_IDLE;
              state  <= 1'b0;
              masked <= 1'b0;
            end
          end
        end
        default: sq <= SQ_IDLE;
      endcase
    end
  end

  // fine stretch of every tank's pulse and steering to the active state
  for (genvar x = 0; x < NT; x++) begin : g_tank
    hr_delay_line #(.TAPS(1 << FINE_BITS), .DELAY_PS(DELAY_PS)) u_dl (
      .din (p[x]),
      .sel (fin_q[x]),
      .dly (dly[x])
    );
    assign q[x][0]     = (p[x] | dly[x]) & (state == 1'b0);
    assign q[x][1]     = (p[x] | dly[x]) & (state == 1'b1);
    assign pre_off[x]  = (sq == SQ_ON) && p[x] && (cnt >= {1'b0, crs_q[x]});
    assign off_fine[x] = fin_q[x];

    // protection: the two switching states of a tank never conduct together
    a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                   !(q[x][0] && q[x][1]));
  end
endmodule
