// single_pin_config: digital half of the single-pin configuration ADC.
//
// A first-order sigma-delta loop turns the voltage on the configuration pin
// into a bit-stream: an inverter supplied from the pin drives an RC
// integrator, an inverter-threshold comparator quantizes it, and the D
// flip-flop in this module clocks the comparator output. Its inverted output,
// trg, closes the loop by driving the front-end inverter. The inverter, RC
// and comparator are analog and outside this module (cmp_in is the
// comparator output).
//
// The ones of the bit-stream are counted over DECIM clocks (a sinc
// decimation filter); the counter then restarts, and the count, limited to
// OP_BITS, is published as op with a one-clock op_valid strobe. With
// DECIM = 1024 the pin voltage becomes a 10-bit word every 1024 clocks, as
// the design specifies. Saturating the count 1024 to 1023 and the reset
// value of op (all zero, converter disabled) are this design's choices.
//
// Timing: op updates DECIM clocks after the previous update; the first word
// appears DECIM clocks after reset.
`timescale 1ps/1ps
module single_pin_config #(
  parameter int unsigned DECIM   = 1024,
  parameter int unsigned OP_BITS = 10
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               cmp_in,    // comparator output (D input)
  output logic               bit_q,     // clocked bit-stream
  output logic               trg,       // inverted bit-stream to the front-end
  output logic [OP_BITS-1:0] op,
  output logic               op_valid
);
  localparam int unsigned CW = $clog2(DECIM + 1);
  localparam int unsigned WW = $clog2(DECIM);

  logic [CW-1:0] ones;
  logic [WW-1:0] win;
  logic [CW-1:0] total;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) bit_q <= 1'b0;
    else        bit_q <= cmp_in;

  assign trg   = ~bit_q;
  assign total = ones + CW'(bit_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ones     <= '0;
      win      <= '0;
      op       <= '0;
      op_valid <= 1'b0;
    end else begin
      op_valid <= 1'b0;
      if (win == WW'(DECIM - 1)) begin
        win      <= '0;
        ones     <= '0;
        op_valid <= 1'b1;
        if (total > CW'((1 << OP_BITS) - 1)) op <= '1;
        else                                 op <= OP_BITS'(total);
      end else begin
        win  <= win + 1'b1;
        ones <= total;
      end
    end
  end
endmodule
