// zcd_sampler_tb: self-checking test of one sampling-block channel.
// The test plays the sequencer (turn-off command, fine delay, dead-time)
// and a sensor model: after each gate turn-off the ZCD code stays 01 for an
// inherent delay D, then shows the tank's code until the next state turns
// on, then returns to 01. Checked are: continuous-sampling readings for
// early, late and ZCS codes and the state tag; the inherent-delay
// estimate, which must equal the smallest number of delay elements whose
// total delay reaches D (with the pulse's fine delay varying from event to
// event); single-sample readings taken with that estimate; a ZCS reading
// when the window has moved past the strobe; and the report latency.
`timescale 1ps/1ps
module zcd_sampler_tb;
  import lockin_pkg::*;
  localparam realtime TCK = 50000.0;
  localparam realtime TAU = 3125.0;
  localparam int      DT  = 8;            // dead-time, clocks

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic [1:0]           zcd = 2'b01;
  logic                 single_mode = 1'b0, est_req = 1'b0;
  logic                 pre_off = 1'b0, state = 1'b0, dt_end = 1'b0;
  logic [FINE_BITS-1:0] off_fine = '0;
  logic                 samp_valid, samp_state, est_done;
  zcd_t                 samp;
  logic [9:0]           delta_s;

  int      checks = 0, failures = 0;
  realtime dly_d = 137000.0;               // inherent delay
  logic [1:0] code = 2'b11;
  zcd_t    last;
  logic    last_state;
  int      last_lat, cyc = 0, t_dt = 0;

  zcd_sampler #(.DW(10), .SYNC(2), .DELAY_PS(3125)) dut (.*);

  always #25000 clk = ~clk;
  always @(negedge clk) cyc++;
  always @(posedge clk) if (samp_valid && rst_n) begin
    last       = samp;
    last_state = samp_state;
    last_lat   = cyc - t_dt;
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $realtime);
    end
  endtask

  // one turn-off event followed by a dead-time; returns after the report
  task automatic event_(input logic st, input logic [FINE_BITS-1:0] f);
    realtime tq;
    @(negedge clk);
    pre_off = 1'b1; off_fine = f; state = st;
    @(posedge clk);
    tq = $realtime + real'(f) * TAU;         // real gate edge
    fork
      begin
        #(tq + dly_d - $realtime);
        zcd = code;                          // valid window opens
      end
    join_none
    @(negedge clk);
    pre_off = 1'b0;
    repeat (DT - 2) @(negedge clk);
    dt_end = 1'b1;
    @(posedge clk);
    t_dt = cyc;
    #1;
    zcd = 2'b01;                             // next state turns on
    @(negedge clk);
    dt_end = 1'b0;
    repeat (6) @(negedge clk);
  endtask

  int exp_delta;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);

    // continuous sampling
    code = 2'b11; event_(1'b0, 4'd3);
    check("continuous early", last == ZCD_EARLY && last_state == 1'b0);
    check($sformatf("report latency %0d", last_lat), last_lat == 4);   // high from the 3rd edge, seen at the 4th
    code = 2'b00; event_(1'b1, 4'd9);
    check("continuous late", last == ZCD_LATE && last_state == 1'b1);
    code = 2'b01; event_(1'b0, 4'd0);
    check("continuous zcs", last == ZCD_ZCS);

    // inherent-delay estimation in single-sample mode
    single_mode = 1'b1;
    code        = 2'b11;
    est_req     = 1'b1;
    exp_delta   = int'($ceil(dly_d / TAU));
    for (int i = 0; i < 80 && !est_done; i++) event_(1'(i), 4'($urandom_range(0, 15)));
    check($sformatf("estimate %0d expected %0d", delta_s, exp_delta),
          est_done && int'(delta_s) == exp_delta);
    est_req = 1'b0;
    @(negedge clk);
    check("est_done re-armed", !est_done);

    // single sample at the estimate
    for (int i = 0; i < 12; i++) begin
      code = (i % 3 == 0) ? 2'b11 : (i % 3 == 1) ? 2'b00 : 2'b01;
      event_(1'(i), 4'($urandom_range(0, 15)));
      check($sformatf("single-sample reading %0d", i), 2'(last) == code);
    end

    // window moved later than the strobe: no correction
    dly_d = dly_d + 20000.0;
    code  = 2'b11;
    event_(1'b0, 4'd7);
    check("stale window reads ZCS", last == ZCD_ZCS);

    // re-estimation finds the new delay
    est_req   = 1'b1;
    exp_delta = int'($ceil(dly_d / TAU));
    for (int i = 0; i < 80 && !est_done; i++) event_(1'(i), 4'($urandom_range(0, 15)));
    check($sformatf("re-estimate %0d expected %0d", delta_s, exp_delta),
          est_done && int'(delta_s) == exp_delta);
    est_req = 1'b0;

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
