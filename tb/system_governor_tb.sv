// system_governor_tb: self-checking test of the operation-mode state machine.
// It checks the OP decoding (dead-time, LPF depth, skip, N_est), the
// start-up path with and without delay estimation, that tuning is frozen
// and the estimation on-time applied during estimation, the move to RUN on
// Locked and back to LOCKIN on loss of lock, re-estimation after exactly
// N_est cycles in RUN, and that turn-off waits for the sequencer to idle.
`timescale 1ps/1ps
module system_governor_tb;
  import lockin_pkg::*;
  localparam int unsigned NT = 2;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [9:0]   op = '0;
  logic         locked = 1'b0, cycle_start = 1'b0, seq_idle = 1'b1;
  logic [NT-1:0] est_done = '0;
  ontime_t      t_pulse [NT][N_STATES];
  ontime_t      est_time = ontime_t'(16 << FINE_BITS);
  ontime_t      seq_time [NT][N_STATES];
  gov_state_t   gstate;
  logic         seq_run, tune_en, load_init, est_req, single_mode;
  logic [7:0]   dead_time;
  logic [1:0]   skip;
  logic [3:0]   lpf_depth;

  int checks = 0, failures = 0;

  system_governor #(.NT(NT)) dut (.*);

  always #25000 clk = ~clk;

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (state %s) at %0t", what, gstate.name(), $realtime);
    end
  endtask

  function automatic logic [9:0] mk(bit en, bit single, int dt, int ne, int lp, int sk);
    op_cfg_t c;
    c.enable = en; c.single_samp = single; c.dt_code = 2'(dt);
    c.nest_code = 1'(ne); c.lpf_code = 2'(lp); c.light_load = 1'(sk); c.guard = 2'b00;
    return 10'(c);
  endfunction

  task automatic cycles(input int n);
    repeat (n) begin
      @(negedge clk); cycle_start = 1'b1;
      @(negedge clk); cycle_start = 1'b0;
    end
  endtask

  initial begin
    for (int x = 0; x < NT; x++)
      for (int s = 0; s < N_STATES; s++) t_pulse[x][s] = ontime_t'(400 + 10 * x + s);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    check("off after reset", gstate == GOV_OFF && !seq_run && !tune_en);

    // decoding
    op = mk(0, 1, 3, 0, 1, 1);
    @(negedge clk);
    check("dead_time decode", dead_time == 8'd8);
    check("lpf decode", lpf_depth == 4'd4);
    check("skip decode", skip == 2'd2);
    check("still off", gstate == GOV_OFF);

    // start-up with delay estimation
    op = mk(1, 1, 1, 0, 1, 0);
    @(negedge clk);
    check("start loads init", gstate == GOV_START && load_init && !seq_run);
    @(negedge clk);
    check("estimation", gstate == GOV_EST && est_req && seq_run && !tune_en);
    check("est on-time applied", seq_time[1][0] == est_time && seq_time[0][1] == est_time);
    cycles(5);
    est_done = 2'b01;
    @(negedge clk);
    check("waits for all channels", gstate == GOV_EST);
    est_done = 2'b11;
    @(negedge clk);
    check("lock-in", gstate == GOV_LOCKIN && tune_en && !est_req);
    check("tuned on-time applied", seq_time[1][1] == t_pulse[1][1] && seq_time[0][0] == t_pulse[0][0]);
    est_done = 2'b00;
    cycles(10);
    check("stays in lock-in", gstate == GOV_LOCKIN);
    locked = 1'b1;
    @(negedge clk);
    check("run", gstate == GOV_RUN && tune_en);

    // re-estimation after N_est = 256 cycles
    cycles(255);
    @(negedge clk);
    check("no early re-estimation", gstate == GOV_RUN);
    cycles(1);
    @(negedge clk);
    check("re-estimation after N_est", gstate == GOV_EST && est_req);
    est_done = 2'b11;
    @(negedge clk);
    @(negedge clk);
    check("back to run via lock-in", gstate == GOV_RUN);
    est_done = 2'b00;

    // loss of lock
    locked = 1'b0;
    @(negedge clk);
    check("lock lost", gstate == GOV_LOCKIN);
    locked = 1'b1;
    @(negedge clk);

    // turn-off waits for the sequencer
    seq_idle = 1'b0;
    op = mk(0, 1, 1, 0, 1, 0);
    @(negedge clk);
    check("stop", gstate == GOV_STOP && !seq_run && !tune_en);
    repeat (5) @(negedge clk);
    check("stop holds while busy", gstate == GOV_STOP);
    seq_idle = 1'b1;
    @(negedge clk);
    check("off", gstate == GOV_OFF);

    // continuous sampling: no estimation, N_est ignored
    op = mk(1, 0, 0, 0, 0, 0);
    repeat (2) @(negedge clk);
    check("continuous start goes to lock-in", gstate == GOV_LOCKIN && !est_req);
    @(negedge clk);
    check("run", gstate == GOV_RUN);
    cycles(300);
    check("no re-estimation in continuous mode", gstate == GOV_RUN);

    // N_est code 1 -> 1024 cycles, counted from the entry into RUN (300 so far)
    op = mk(1, 1, 0, 1, 0, 0);
    cycles(700);
    check("N_est 1024 not yet", gstate == GOV_RUN);
    cycles(30);
    check("N_est 1024 reached", gstate == GOV_EST);

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
