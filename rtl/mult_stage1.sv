// mult_stage1: processing logic of pipeline stage 1 of the 4x4 multiplier.
//
// Adds partial-product row 1 (a AND b[1], weights 1..4) to row 0 with a row
// of half adders, since there is no carry vector yet. Bit 0 of row 0 is
// already product bit 0; the sum bit of weight 1 is product bit 1. What is
// left is a 3-bit sum vector and a 3-bit carry vector, both of weights 2..4,
// which with the operands still needed make the 14-bit bundle l1_t.
// The published multiplier names this stage only; the half-adder row is
// this implementation's choice. Purely combinational.
`timescale 1ps / 1ps
module mult_stage1
  import mp_pkg::*;
(
  input  l0_t x,
  output l1_t y
);
  logic [3:0] pp1;
  logic [3:0] sum;
  logic [2:0] cy;

  always_comb begin
    pp1 = x.a & {4{x.b[1]}};
    for (int j = 0; j < 3; j++) begin
      sum[j] = pp1[j] ^ x.pp[j+1];   // half adder at weight 1+j
      cy[j]  = pp1[j] & x.pp[j+1];   // carry of weight 2+j
    end
    sum[3] = pp1[3];                 // weight 4: nothing to add yet

    y.a = x.a;
    y.b = x.b[3:2];
    y.p = {sum[0], x.pp[0]};
    y.s = sum[3:1];
    y.c = cy;
  end
endmodule
