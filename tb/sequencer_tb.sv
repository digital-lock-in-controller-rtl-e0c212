// sequencer_tb: self-checking test of the high-resolution gating sequencer.
// Two tanks get different {coarse, fine} on-times in the two switching
// states. For every gate pulse the test measures, in simulated time, its
// width (coarse * 50 ns + fine * 3.125 ns), the switching period
// ((max coarse of state 0 + max coarse of state 1 + 2 * dead_time) clocks),
// the lead of pre_off before the falling edge (fine * 3.125 ns), that the
// two states of a tank never overlap, that a light-load setting of skip = 2
// leaves two empty cycles after every active one, and that dropping run
// finishes the cycle in progress before the outputs go idle.
`timescale 1ps/1ps
module sequencer_tb;
  import lockin_pkg::*;
  localparam int unsigned NT  = 2;
  localparam realtime     TCK = 50000.0;
  localparam realtime     TAU = 3125.0;

  logic                 clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  ontime_t              on_time [NT][N_STATES];
  logic [7:0]           dead_time = 8'd4;
  logic [1:0]           skip = 2'd0;
  logic [N_STATES-1:0]  q [NT];
  logic [NT-1:0]        pre_off;
  logic [FINE_BITS-1:0] off_fine [NT];
  logic                 state, dt_end, cycle_start, masked, idle;

  int checks = 0, failures = 0;
  int pulses = 0, cycles = 0, masked_cycles = 0, pulses_in_cycle = 0;
  realtime t_cs_last = 0.0;
  realtime t_pre [NT];
  int      expect_period;
  int      run_len;
  logic    prev_masked;

  sequencer #(.NT(NT), .DT_BITS(8), .DELAY_PS(3125)) dut (.*);

  always #25000 clk = ~clk;

  function automatic realtime width_of(ontime_t t);
    return real'(t[T_BITS-1:FINE_BITS]) * TCK + real'(t[FINE_BITS-1:0]) * TAU;
  endfunction

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // pulse-width and pre_off lead, per tank and state
  for (genvar x = 0; x < NT; x++) begin : g_mon
    for (genvar s = 0; s < N_STATES; s++) begin : g_st
      realtime tr;
      always @(posedge q[x][s]) tr = $realtime;
      always @(negedge q[x][s]) begin
        pulses++;
        pulses_in_cycle++;
        check($sformatf("width tank%0d state%0d %0t", x, s, $realtime - tr),
              ($realtime - tr) == width_of(on_time[x][s]));
        check($sformatf("pre_off lead tank%0d state%0d", x, s),
              ($realtime - t_pre[x]) == real'(on_time[x][s][FINE_BITS-1:0]) * TAU);
      end
    end
    always @(posedge clk) if (pre_off[x]) t_pre[x] = $realtime;
    always @(posedge clk) check("no overlap", !(q[x][0] && q[x][1]));
  end

  // cycle bookkeeping
  always @(posedge clk) if (cycle_start && rst_n) begin
    if (t_cs_last > 0.0)
      check($sformatf("period %0t", $realtime - t_cs_last),
            ($realtime - t_cs_last) == real'(expect_period) * TCK);
    t_cs_last = $realtime;
    cycles++;
    if (masked) masked_cycles++;
  end

  function automatic int maxc(int s);
    int m = 0;
    for (int x = 0; x < NT; x++)
      if (int'(on_time[x][s][T_BITS-1:FINE_BITS]) > m) m = int'(on_time[x][s][T_BITS-1:FINE_BITS]);
    return m;
  endfunction

  initial begin
    on_time[0][0] = {8'd25, 4'd5};
    on_time[1][0] = {8'd21, 4'd9};
    on_time[0][1] = {8'd26, 4'd15};
    on_time[1][1] = {8'd20, 4'd0};
    expect_period = maxc(0) + maxc(1) + 2 * int'(dead_time);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    run = 1'b1;
    repeat (8) @(posedge clk iff cycle_start);
    check("pulses per cycle", pulses >= 8 * 4 - 4);

    // new on-times and dead-time
    @(posedge clk iff dt_end && state);
    on_time[0][0] = {8'd10, 4'd1};
    on_time[1][0] = {8'd12, 4'd14};
    on_time[0][1] = {8'd9,  4'd7};
    on_time[1][1] = {8'd11, 4'd3};
    dead_time     = 8'd2;
    expect_period = maxc(0) + maxc(1) + 2 * int'(dead_time);
    t_cs_last     = 0.0;
    repeat (6) @(posedge clk iff cycle_start);

    // light-load: two idle cycles after every active one
    @(posedge clk iff dt_end && state);
    skip = 2'd2;
    t_cs_last = 0.0;
    run_len = 0;
    for (int c = 0; c < 12; c++) begin
      @(negedge clk iff cycle_start);
      if (c > 0)
        check($sformatf("pulses of a %s cycle: %0d", prev_masked ? "masked" : "active", pulses_in_cycle),
              prev_masked ? (pulses_in_cycle == 0) : (pulses_in_cycle == 4));
      if (c > 1) begin
        if (masked) run_len++;
        else begin
          check($sformatf("two idle cycles between active ones (%0d)", run_len),
                run_len == 2 || c < 4);
          run_len = 0;
        end
      end
      prev_masked     = masked;
      pulses_in_cycle = 0;
    end
    skip = 2'd0;
    repeat (3) @(posedge clk iff cycle_start);

    // stop in the middle of state 0: the cycle completes
    @(negedge clk iff cycle_start);
    pulses = 0;
    repeat (3) @(negedge clk);
    run = 1'b0;
    @(posedge clk iff idle);
    check("cycle completed after stop", pulses == 4 && !state);
    repeat (50) @(posedge clk);
    check("idle stays quiet", pulses == 4 && idle);

    $display("cycles=%0d masked=%0d", cycles, masked_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
