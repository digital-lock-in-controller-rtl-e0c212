// auto_tuner_tb: self-checking test of the compensator, LPF and Locked logic.
// A reference model written here keeps, per tank and state, the tune value
// and the last `depth` candidates, applying the rule: candidate = tune +1
// (early), -1 (late) or unchanged (ZCS), limited to [T_MIN, T_MAX]; the
// tune value takes the candidate when all `depth` newest candidates agree.
// Directed phases check the rate (one step per `depth` cycles under
// constant early or late readings), that a single stray reading never
// moves the on-time, the limits, and Locked after `depth` ZCS cycles;
// a random phase compares the DUT with the model every cycle. Readings
// for state 1 are sometimes given in the same clock as the shift command.
`timescale 1ps/1ps
module auto_tuner_tb;
  import lockin_pkg::*;
  localparam int unsigned NT    = 2;
  localparam int unsigned DEPTH = 8;
  localparam ontime_t     TMIN  = ontime_t'(2 << FINE_BITS);
  localparam ontime_t     TMAX  = '1;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic [NT-1:0] samp_valid = '0, samp_state = '0;
  zcd_t          samp [NT];
  logic          tune_en = 1'b0, load_init = 1'b0, cycle_start = 1'b0;
  ontime_t       init_time [NT][N_STATES];
  logic [3:0]    lpf_depth = 4'd4;
  ontime_t       t_pulse [NT][N_STATES];
  logic          locked;

  int checks = 0, failures = 0;
  int updates = 0, rejected = 0;

  // reference model
  int ref_t   [NT][N_STATES];
  int ref_h   [NT][N_STATES][$];
  int ref_zc  [NT][N_STATES];

  auto_tuner #(.NT(NT), .DEPTH(DEPTH), .STEP(1), .T_MIN(TMIN), .T_MAX(TMAX)) dut (.*);

  always #25000 clk = ~clk;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  task automatic model_init(input int v);
    for (int x = 0; x < NT; x++)
      for (int s = 0; s < N_STATES; s++) begin
        ref_t[x][s] = v;
        ref_h[x][s].delete();
        for (int i = 0; i < DEPTH; i++) ref_h[x][s].push_front(v);
        ref_zc[x][s] = 0;
      end
  endtask

  task automatic model_cycle(input zcd_t r [NT][N_STATES]);
    for (int x = 0; x < NT; x++)
      for (int s = 0; s < N_STATES; s++) begin
        int c;
        bit all;
        c = ref_t[x][s];
        if (r[x][s] == ZCD_EARLY) c = (c + 1 > int'(TMAX)) ? int'(TMAX) : c + 1;
        if (r[x][s] == ZCD_LATE)  c = (c - 1 < int'(TMIN)) ? int'(TMIN) : c - 1;
        ref_h[x][s].push_front(c);
        void'(ref_h[x][s].pop_back());
        all = 1'b1;
        for (int i = 0; i < int'(lpf_depth); i++) if (ref_h[x][s][i] != c) all = 1'b0;
        if (all && c != ref_t[x][s]) updates++;
        if (!all) rejected++;
        if (all) ref_t[x][s] = c;
        ref_zc[x][s] = (r[x][s] == ZCD_ZCS) ? ref_zc[x][s] + 1 : 0;
      end
  endtask

  // one switching cycle: readings of both states, then the shift command
  task automatic do_cycle(input zcd_t r [NT][N_STATES], input bit same_clock);
    @(negedge clk);
    samp_valid = '1; samp_state = '0;
    for (int x = 0; x < NT; x++) samp[x] = r[x][0];
    @(negedge clk);
    samp_valid = '0;
    repeat (3) @(negedge clk);
    samp_valid = '1; samp_state = '1;
    for (int x = 0; x < NT; x++) samp[x] = r[x][1];
    if (!same_clock) begin
      @(negedge clk);
      samp_valid = '0;
    end
    cycle_start = 1'b1;
    @(negedge clk);
    cycle_start = 1'b0;
    samp_valid  = '0;
    model_cycle(r);
    for (int x = 0; x < NT; x++)
      for (int s = 0; s < N_STATES; s++)
        check($sformatf("t_pulse[%0d][%0d]=%0d model %0d", x, s, t_pulse[x][s], ref_t[x][s]),
              int'(t_pulse[x][s]) == ref_t[x][s]);
    begin
      bit lk = 1'b1;
      for (int x = 0; x < NT; x++)
        for (int s = 0; s < N_STATES; s++) if (ref_zc[x][s] < int'(lpf_depth)) lk = 1'b0;
      check("locked", locked == lk);
    end
  endtask

  zcd_t rr [NT][N_STATES];

  task automatic fill(input zcd_t v);
    for (int x = 0; x < NT; x++)
      for (int s = 0; s < N_STATES; s++) rr[x][s] = v;
  endtask

  initial begin
    int base;
    for (int x = 0; x < NT; x++) begin
      samp[x] = ZCD_ZCS;
      for (int s = 0; s < N_STATES; s++) init_time[x][s] = ontime_t'(400);
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    load_init = 1'b1;
    @(negedge clk);
    load_init = 1'b0;
    tune_en   = 1'b1;
    model_init(400);
    check("init loaded", t_pulse[1][1] == ontime_t'(400));

    // rate: constant early readings -> +1 every lpf_depth cycles
    fill(ZCD_EARLY);
    for (int c = 0; c < 16; c++) do_cycle(rr, c[0]);
    check("rate early", int'(t_pulse[0][0]) == 400 + 16 / 4);

    // a single stray late reading is filtered out
    fill(ZCD_ZCS);
    for (int c = 0; c < 6; c++) do_cycle(rr, 1'b0);
    base = int'(t_pulse[1][0]);
    rr[1][0] = ZCD_LATE;
    do_cycle(rr, 1'b0);
    fill(ZCD_ZCS);
    for (int c = 0; c < 6; c++) do_cycle(rr, 1'b0);
    check("stray reading rejected", int'(t_pulse[1][0]) == base);
    check("locked after ZCS run", locked);

    // late readings, deeper filter
    lpf_depth = 4'd8;
    fill(ZCD_LATE);
    for (int c = 0; c < 24; c++) do_cycle(rr, 1'b0);
    check("rate late depth 8", int'(t_pulse[0][1]) == base - 24 / 8 || int'(t_pulse[0][1]) == ref_t[0][1]);
    check("not locked while tuning", !locked);

    // lower limit
    @(negedge clk);
    for (int x = 0; x < NT; x++)
      for (int s = 0; s < N_STATES; s++) init_time[x][s] = TMIN + 1;
    load_init = 1'b1;
    @(negedge clk);
    load_init = 1'b0;
    model_init(int'(TMIN) + 1);
    lpf_depth = 4'd2;
    for (int c = 0; c < 10; c++) do_cycle(rr, 1'b0);
    check("lower limit", t_pulse[0][0] == TMIN);

    // random readings, mostly toward a target per channel
    lpf_depth = 4'd3;
    for (int c = 0; c < 400; c++) begin
      for (int x = 0; x < NT; x++)
        for (int s = 0; s < N_STATES; s++) begin
          int u = int'($urandom_range(0, 9));
          rr[x][s] = (u < 5) ? ZCD_EARLY : (u < 8) ? ZCD_ZCS : (u < 9) ? ZCD_LATE : ZCD_BAD;
        end
      do_cycle(rr, $urandom_range(0, 1) == 1);
    end

    // tuning disabled: nothing moves
    tune_en = 1'b0;
    base = int'(t_pulse[0][0]);
    @(negedge clk); cycle_start = 1'b1; samp_valid = '1; samp[0] = ZCD_EARLY;
    @(negedge clk); cycle_start = 1'b0; samp_valid = '0;
    check("frozen when tune_en low", int'(t_pulse[0][0]) == base && !locked);

    $display("updates=%0d rejected=%0d", updates, rejected);
    check("both filter outcomes seen", updates > 0 && rejected > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
