// stc_workloads_tb: closed-loop lock-in of the controller, at its default
// parameters, on the three resonator sets of the 4:1 switched-tank
// converter:
//   A  simulation case    2.35 uF / 70 nH  and 2.10 uF / 63 nH
//   B  symmetric board    2.35 uF / 70 nH  and 2.35 uF / 70 nH
//   C  deliberate mismatch 2.62 uF / 70 nH and 2.35 uF / 50 nH
// Each set is run from reset twice, once with single-sample sampling and
// delay estimation, once with continuous sampling. The half-period of a
// tank is pi * sqrt(L * C) in both switching states; the inherent delays
// (83 ns and 97 ns) are test choices. A run passes when the governor
// reaches RUN and every tuned on-time lies within the sensor's ZCS band
// (+-2.5 ns) of its half-period. The number of switching cycles to lock is
// printed.
`timescale 1ps/1ps
module stc_workloads_tb;
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
  real cr [3][NT] = '{'{2.35e-6, 2.10e-6}, '{2.35e-6, 2.35e-6}, '{2.62e-6, 2.35e-6}};
  real lr [3][NT] = '{'{70e-9,   63e-9},   '{70e-9,   70e-9},   '{70e-9,   50e-9}};
  string name [3] = '{"A simulation case", "B symmetric board", "C mismatch"};

  int checks = 0, failures = 0, ncyc = 0;

  lockin_controller dut (.*);

  sd_frontend_model #(.RC_CLK(2048.0), .V_TH(VTH)) u_sd (
    .clk, .v_op, .trg(sd_trg), .cmp(sd_cmp));

  for (genvar x = 0; x < NT; x++) begin : g_tank
    tank_zcd_model u_tank (
      .q(q[x]), .half0_ps(half[x][0]), .half1_ps(half[x][1]),
      .dly_ps(dly[x]), .tol_ps(tol), .zcd(zcd[x]));
  end

  always #25000 clk = ~clk;
  always @(posedge clk) if (dut.cycle_start) ncyc++;

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

  function automatic real vpin(bit single);
    // enable, method, dead-time 4 clocks, N_est 1024, filter depth 4
    int code = (1 << 9) | (int'(single) << 8) | (1 << 6) | (1 << 5) | (1 << 3);
    return VTH * 1024.0 / (real'(code) + 2.0);
  endfunction

  initial begin
    for (int w = 0; w < 3; w++)
      for (int m = 0; m < 2; m++) begin
        int n = 0;
        rst_n = 1'b0;
        for (int x = 0; x < NT; x++)
          for (int s = 0; s < N_STATES; s++)
            half[x][s] = PI * $sqrt(cr[w][x] * lr[w][x]) * 1.0e12;
        v_op = vpin(m == 0);
        repeat (4) @(posedge clk);
        rst_n = 1'b1;
        ncyc = 0;
        while (gstate != GOV_RUN && n < 400000) begin
          @(posedge clk);
          n++;
        end
        check($sformatf("%s, %s: reached RUN", name[w], m == 0 ? "single sample" : "continuous"),
              gstate == GOV_RUN);
        for (int x = 0; x < NT; x++)
          for (int s = 0; s < N_STATES; s++) begin
            automatic real wd = width_of(t_pulse[x][s]);
            check($sformatf("%s tank %0d state %0d: %0.1f ns vs %0.1f ns", name[w], x, s,
                            wd / 1000.0, half[x][s] / 1000.0),
                  wd >= half[x][s] - tol && wd <= half[x][s] + tol);
          end
        $display("%s, %s: locked after %0d switching cycles, on-times %0.1f / %0.1f ns",
                 name[w], m == 0 ? "single sample" : "continuous", ncyc,
                 width_of(t_pulse[0][0]) / 1000.0, width_of(t_pulse[1][0]) / 1000.0);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
