// mult_stage4: processing logic of pipeline stage 4, the final
// carry-propagate adder of the 4x4 multiplier.
//
// Adds the carry-save sum and carry vectors (weights 4..6) with a 4-bit
// ripple-carry adder whose top operand bits are 0, giving product bits 4..7.
// The finished product bits 0..3 pass through. COUT is the adder's carry
// out; it is brought out of the multiplier unlatched, as in the published
// block diagram. With these operand widths it is 0 for every input, so
// synthesis reports it as a constant output; it is kept because the
// published multiplier has the pin. The stage itself is only named there;
// the ripple-carry adder is this implementation's choice. Combinational.
`timescale 1ps / 1ps
module mult_stage4
  import mp_pkg::*;
(
  input  l3_t        x,
  output l4_t        prod,
  output logic       cout
);
  logic       cy;
  logic [3:0] sum;
  logic [3:0] op_s, op_c;

  always_comb begin
    op_s  = {1'b0, x.s};
    op_c  = {1'b0, x.c};
    cy    = 1'b0;
    for (int j = 0; j < 4; j++)
      {cy, sum[j]} = full_add(op_s[j], op_c[j], cy);
    prod = {sum, x.p};
    cout = cy;
  end
endmodule
