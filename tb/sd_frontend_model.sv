// sd_frontend_model: behavioural model of the analog half of the
// single-pin configuration ADC, for simulation only.
// The front-end inverter is supplied from the configuration pin (v_op
// volts): its output S_i is v_op while its input trg is low and 0 while trg
// is high. S_i charges the RC integrator, modelled once per clock as
// S_o += (S_i - S_o) / RC_CLK (RC_CLK = RC time constant in clock periods;
// 64 puts the corner 400 times below the clock). The inverter-threshold
// comparator drives cmp high while S_o is below v_th. In steady state the
// mean of S_o equals v_th, so the fraction of high bits is v_th / v_op.
`timescale 1ps/1ps
module sd_frontend_model #(
  parameter real RC_CLK = 64.0,
  parameter real V_TH   = 2.5
) (
  input  logic clk,
  input  real  v_op,
  input  logic trg,
  output logic cmp
);
  real s_o = V_TH;

  always @(posedge clk) s_o <= s_o + ((trg ? 0.0 : v_op) - s_o) / RC_CLK;
  assign cmp = (s_o < V_TH);
endmodule
