// mult_stage0: processing logic of pipeline stage 0 of the 4x4 multiplier.
//
// Forms partial-product row 0 (a AND b[0], one AND gate per bit) and passes
// both operands on, so that the latch after this stage holds the 12-bit
// bundle l0_t. The published multiplier names this stage without giving
// its insides; the AND row is this implementation's choice.
// Interface: operands a, b in; bundle out. Purely combinational: the bundle
// is valid one logic delay after a and b, which the bundling delay on the
// request path that accompanies the operands must cover.
`timescale 1ps / 1ps
module mult_stage0
  import mp_pkg::*;
(
  input  logic [3:0] a,
  input  logic [3:0] b,
  output l0_t        y
);
  always_comb begin
    y.a  = a;
    y.b  = b;
    y.pp = a & {4{b[0]}};
  end
endmodule
