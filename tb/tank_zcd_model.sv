// tank_zcd_model: behavioural model of one resonant tank, its switches and
// its zero-current-detection sensor, for simulation only.
// The tank conducts for the width of each gate pulse (turn-on and turn-off
// are both delayed by the same inherent delay, so the width is kept). When
// the switches open, the current is still positive if the pulse was
// shorter than the resonant half-period of that switching state (early:
// the switch node clamps high, code 11), negative if it was longer (late:
// code 00), and zero within +-tol_ps of it (code 01). The code appears
// dly_ps after the gate's falling edge and lasts until the tank's next gate
// pulse starts; otherwise the sensor shows 01.
`timescale 1ps/1ps
module tank_zcd_model (
  input  logic [1:0] q,          // gate of state 0 / state 1
  input  real        half0_ps,   // resonant half-period, state 0
  input  real        half1_ps,   // resonant half-period, state 1
  input  real        dly_ps,     // inherent gate-to-switch delay
  input  real        tol_ps,     // ZCS band of the sensor
  output logic [1:0] zcd
);
  logic    g;
  realtime t_rise = 0.0;
  logic    st = 1'b0;
  int      epoch = 0;

  assign g = q[0] | q[1];
  initial zcd = 2'b01;

  always @(posedge g) begin
    t_rise = $realtime;
    st     = q[1];
    epoch++;
    zcd    = 2'b01;
  end

  always @(negedge g) begin
    automatic real        w    = $realtime - t_rise;
    automatic real        h    = st ? half1_ps : half0_ps;
    automatic logic [1:0] c    = (w < h - tol_ps) ? 2'b11 : (w > h + tol_ps) ? 2'b00 : 2'b01;
    automatic int         mine = epoch;
    fork
      begin
        #(dly_ps);
        if (epoch == mine) zcd = c;
      end
    join_none
  end
endmodule
