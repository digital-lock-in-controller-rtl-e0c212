// lockin_controller_tb: closed-loop, end-to-end test of the controller at
// its default parameters.
// The configuration pin voltage is set through a sigma-delta front-end
// model; two tank models with mismatched resonators (2.62 uF / 70 nH and
// 2.35 uF / 50 nH, half-periods about 1345 ns and 1077 ns; state 1 is
// given a 2 % longer half-period to exercise per-state tuning) and
// different inherent delays answer the gate pulses with ZCD codes.
// Scenario:
//   1. enable with single-sample sampling: OP conversion, start-up, delay
//      estimation (estimates checked against the model delays), lock-in
//      from off-tune start values (both early and late corrections), RUN;
//      every tuned on-time must lie within the sensor's ZCS band;
//   2. re-estimation after N_est cycles in RUN;
//   3. component drift of tank 0: re-tuning and relock;
//   4. continuous sampling with light-load: idle cycles appear, lock holds;
//   5. disable: the cycle completes, the governor returns to OFF.
// Each mechanism is counted and a failure is counted for one that never
// happened. The two gates of a tank must never overlap.
`timescale 1ps/1ps
module lockin_controller_tb;
  import lockin_pkg::*;
  localparam int      NT  = 2;
  localparam realtime TCK = 50000.0;
  localparam realtime TAU = 3125.0;
  localparam real     PI  = 3.14159265358979;
  localparam real     VTH = 2.5;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                sd_cmp, sd_trg, sd_bit, op_valid, locked, masked;
  logic [1:0]          zcd [NT];
  logic [N_STATES-1:0] q   [NT];
  logic [OP_BITS-1:0]  op;
  gov_state_t          gstate;
  ontime_t             t_pulse [NT][N_STATES];
  logic [9:0]          delta_s [NT];

  real v_op = 0.5;
  real half [NT][N_STATES];
  real dly  [NT] = '{83000.0, 97000.0};
  real tol  = 2500.0;

  int checks = 0, failures = 0;
  int n_op = 0, n_est = 0, n_lock = 0, n_early = 0, n_late = 0, n_zcs = 0;
  int n_update = 0, n_masked = 0, n_cont = 0, n_stop = 0, n_off = 0;

  lockin_controller dut (.*);

  sd_frontend_model #(.RC_CLK(2048.0), .V_TH(VTH)) u_sd (
    .clk, .v_op, .trg(sd_trg), .cmp(sd_cmp));

  for (genvar x = 0; x < NT; x++) begin : g_tank
    tank_zcd_model u_tank (
      .q(q[x]), .half0_ps(half[x][0]), .half1_ps(half[x][1]),
      .dly_ps(dly[x]), .tol_ps(tol), .zcd(zcd[x]));
  end

  always #25000 clk = ~clk;      // 20 MHz

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  function automatic real width_of(ontime_t t);
    return real'(t[T_BITS-1:FINE_BITS]) * TCK + real'(t[FINE_BITS-1:0]) * TAU;
  endfunction

  // pin voltage that makes the ADC count about code + 2 ones, the middle of
  // the four counts that decode to the same configuration
  function automatic real vpin(int code);
    return VTH * 1024.0 / (real'(code) + 2.0);
  endfunction

  function automatic int mkop(bit en, bit single, int dt, int ne, int lp, bit ll);
    return (int'(en) << 9) | (int'(single) << 8) | (dt << 6) | (ne << 5) | (lp << 3) | (int'(ll) << 2);
  endfunction

  // ---------------- event counters ----------------
  gov_state_t gprev = GOV_OFF;
  logic       lprev = 1'b0;
  ontime_t    tprev [NT][N_STATES];
  always @(posedge clk) if (rst_n) begin
    if (op_valid) n_op++;
    if (gstate == GOV_EST && gprev != GOV_EST) n_est++;
    if (gstate == GOV_STOP && gprev != GOV_STOP) n_stop++;
    if (gstate == GOV_OFF && gprev == GOV_STOP) n_off++;
    if (locked && !lprev) n_lock++;
    if (dut.cycle_start && masked) n_masked++;
    if (dut.cycle_start && !dut.single_mode && dut.tune_en) n_cont++;
    for (int x = 0; x < NT; x++) begin
      if (dut.samp_valid[x] && dut.tune_en) begin
        if (dut.samp[x] == ZCD_EARLY) n_early++;
        if (dut.samp[x] == ZCD_LATE)  n_late++;
        if (dut.samp[x] == ZCD_ZCS)   n_zcs++;
      end
      for (int s = 0; s < N_STATES; s++) begin
        if (t_pulse[x][s] != tprev[x][s]) n_update++;
        tprev[x][s] = t_pulse[x][s];
      end
      check("gates of a tank never overlap", !(q[x][0] && q[x][1]));
    end
    gprev = gstate;
    lprev = locked;
  end

  task automatic check_tuned(input string tag);
    for (int x = 0; x < NT; x++)
      for (int s = 0; s < N_STATES; s++) begin
        real w = width_of(t_pulse[x][s]);
        check($sformatf("%s: tank %0d state %0d on-time %0.1f ns, half-period %0.1f ns",
                        tag, x, s, w / 1000.0, half[x][s] / 1000.0),
              w >= half[x][s] - tol && w <= half[x][s] + tol);
      end
  endtask

  task automatic wait_state(input gov_state_t st, input int max_clk, input string what);
    int n = 0;
    while (gstate != st && n < max_clk) begin
      @(posedge clk);
      n++;
    end
    check($sformatf("%s (reached %s after %0d clocks)", what, gstate.name(), n), gstate == st);
  endtask

  initial begin
    half[0][0] = PI * $sqrt(2.62e-6 * 70e-9) * 1.0e12;
    half[1][0] = PI * $sqrt(2.35e-6 * 50e-9) * 1.0e12;
    half[0][1] = half[0][0] * 1.02;
    half[1][1] = half[1][0] * 1.02;
    for (int x = 0; x < NT; x++)
      for (int s = 0; s < N_STATES; s++) tprev[x][s] = '0;

    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // 1. single-sample sampling, dead-time 4 clocks, N_est 256, LPF depth 4
    v_op = vpin(mkop(1, 1, 1, 0, 1, 0));
    wait_state(GOV_START, 5000, "OP conversion enables the controller");
    check($sformatf("OP word %0d", op), (int'(op) & ~3) == mkop(1, 1, 1, 0, 1, 0));
    wait_state(GOV_EST, 10, "delay estimation after start-up");
    wait_state(GOV_LOCKIN, 20000, "estimation finished");
    for (int x = 0; x < NT; x++)
      check($sformatf("tank %0d delay estimate %0d elements for %0.1f ns", x, delta_s[x], dly[x] / 1000.0),
            int'(delta_s[x]) == int'($ceil(dly[x] / TAU)));
    wait_state(GOV_RUN, 200000, "lock-in");
    check_tuned("locked");

    // 2. periodic re-estimation
    wait_state(GOV_EST, 40000, "re-estimation after N_est cycles");
    wait_state(GOV_RUN, 40000, "back to run after re-estimation");
    check_tuned("after re-estimation");

    // 3. drift of tank 0
    half[0][0] = half[0][0] * 0.96;
    half[0][1] = half[0][1] * 0.96;
    repeat (200) @(posedge clk);
    wait_state(GOV_RUN, 200000, "relock after drift");
    repeat (2000) @(posedge clk);
    wait_state(GOV_RUN, 200000, "running after drift");
    check_tuned("after drift");

    // 4. continuous sampling and light-load
    v_op = vpin(mkop(1, 0, 1, 0, 1, 1));
    repeat (3000) @(posedge clk);
    check($sformatf("OP word %0d", op), (int'(op) & ~3) == mkop(1, 0, 1, 0, 1, 1));
    repeat (20000) @(posedge clk);
    wait_state(GOV_RUN, 100000, "running with continuous sampling");
    check_tuned("continuous sampling, light-load");

    // 5. turn-off
    v_op = vpin(mkop(0, 0, 1, 0, 1, 0));
    wait_state(GOV_OFF, 5000, "turn-off");
    repeat (200) @(posedge clk);
    check("gates quiet when off", q[0] == '0 && q[1] == '0);

    $display("op=%0d est=%0d lock=%0d early=%0d late=%0d zcs=%0d updates=%0d masked=%0d cont=%0d stop=%0d off=%0d",
             n_op, n_est, n_lock, n_early, n_late, n_zcs, n_update, n_masked, n_cont, n_stop, n_off);
    check("OP conversions happened", n_op > 2);
    check("delay estimation happened at least twice", n_est >= 2);
    check("lock-in happened", n_lock >= 1);
    check("early corrections happened", n_early > 0);
    check("late corrections happened", n_late > 0);
    check("ZCS readings happened", n_zcs > 0);
    check("tune-register updates happened", n_update > 0);
    check("light-load idle cycles happened", n_masked > 0);
    check("continuous sampling ran", n_cont > 0);
    check("turn-off happened", n_stop == 1 && n_off == 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1500000) @(posedge clk);
    failures++;
    $display("watchdog expired in state %s", gstate.name());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
