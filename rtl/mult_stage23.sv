// mult_stage23: one carry-save row of the 4x4 array multiplier; used as
// pipeline stage 2 (with b[2]) and again, unchanged, as stage 3 (with b[3]).
//
// Row i adds partial products a[j] & bi (weight i+j) to the incoming sum
// vector s_in[m] and carry vector c_in[m] (weight i+m) with four full
// adders. The sum of weight i leaves the array as a finished product bit
// (p_out); the other three sums form the new sum vector and the carries of
// the first three adders the new carry vector, both of weight i+1+m. The
// fourth adder's carry is always 0 (two of its inputs are 0) and is not
// kept. That stages 2 and 3 are one and the same circuit follows the
// published multiplier; the full-adder row is this implementation's
// choice. Purely combinational.
`timescale 1ps / 1ps
module mult_stage23
  import mp_pkg::*;
(
  input  logic [3:0] a,
  input  logic       bi,
  input  logic [2:0] s_in,
  input  logic [2:0] c_in,
  output logic       p_out,
  output logic [2:0] s_out,
  output logic [2:0] c_out
);
  logic [3:0] sum;

  always_comb begin
    for (int j = 0; j < 3; j++)
      {c_out[j], sum[j]} = full_add(a[j] & bi, s_in[j], c_in[j]);
    sum[3] = a[3] & bi;
    p_out  = sum[0];
    s_out  = sum[3:1];
  end
endmodule
