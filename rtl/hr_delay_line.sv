// hr_delay_line: fine part of the high-resolution timer.
//
// The input travels along a chain of TAPS-1 delay elements; the tap chosen
// by sel (0 = undelayed input, k = after k elements) drives dly. The
// chain-plus-multiplexer arrangement and the per-output sel follow the
// sequencer diagram of the design; the number of taps and the element delay
// are this design's choice (16 taps of 3125 ps cover one 50 ns clock).
// sel must be stable while an edge is travelling along the chain.
`timescale 1ps/1ps
module hr_delay_line #(
  parameter int unsigned TAPS     = 16,
  parameter int unsigned DELAY_PS = 3125,
  localparam int unsigned SW      = $clog2(TAPS)
) (
  input  logic          din,
  input  logic [SW-1:0] sel,
  output logic          dly
);
  logic [TAPS-1:0] tap;

  assign tap[0] = din;
  for (genvar i = 1; i < TAPS; i++) begin : g_chain
    delay_cell #(.DELAY_PS(DELAY_PS)) u_cell (.a(tap[i-1]), .y(tap[i]));
  end

  assign dly = tap[sel];
endmodule
