// delay_cell: behavioural model of one element of the high-resolution delay
// line (a standard-cell buffer). It reproduces only the propagation delay,
// DELAY_PS, so that simulations show the sub-clock edge placement; in a
// synthesized netlist the cell is a plain buffer and the delay is that of
// the library cell. The value of the delay is this design's own choice:
// 3125 ps makes 16 elements span one 50 ns period of the 20 MHz clock.
`timescale 1ps/1ps
module delay_cell #(
  parameter int unsigned DELAY_PS = 3125
) (
  input  logic a,
  output logic y
);
  assign #(DELAY_PS) y = a;
endmodule
