// mp_ref_pkg: reference model of the multiplier's five processing stages,
// used by the testbenches to work out expected latch contents.
//
// Written column by column, independently of the RTL: each column of the
// carry-save array counts its 1 bits, the count's low bit is the sum and
// its high bit the carry. Only the bundle layouts (mp_pkg) are shared.
`timescale 1ps / 1ps
package mp_ref_pkg;
  import mp_pkg::*;

  function automatic l0_t ref_stage0(logic [3:0] a, logic [3:0] b);
    l0_t r;
    r.a = a;
    r.b = b;
    for (int j = 0; j < 4; j++) r.pp[j] = a[j] && b[0];
    return r;
  endfunction

  // One array row: partial products a[j]&bi plus s_in[j] and c_in[j].
  function automatic void ref_row(input logic [3:0] a, input logic bi,
                                  input logic [2:0] s_in, input logic [2:0] c_in,
                                  output logic p, output logic [2:0] s, output logic [2:0] c);
    int n;
    logic [3:0] col_sum;
    for (int j = 0; j < 4; j++) begin
      n = int'(a[j] && bi);
      if (j < 3) n += int'(s_in[j]) + int'(c_in[j]);
      col_sum[j] = n[0];
      if (j < 3) c[j] = n[1];
    end
    p = col_sum[0];
    s = col_sum[3:1];
  endfunction

  function automatic l1_t ref_stage1(l0_t x);
    l1_t r;
    logic p1;
    ref_row(x.a, x.b[1], x.pp[3:1], 3'b000, p1, r.s, r.c);
    r.a = x.a;
    r.b = x.b[3:2];
    r.p = {p1, x.pp[0]};
    return r;
  endfunction

  function automatic l2_t ref_stage2(l1_t x);
    l2_t r;
    logic p2;
    ref_row(x.a, x.b[2], x.s, x.c, p2, r.s, r.c);
    r.a  = x.a;
    r.b3 = x.b[3];
    r.p  = {p2, x.p};
    return r;
  endfunction

  function automatic l3_t ref_stage3(l2_t x);
    l3_t r;
    logic p3;
    ref_row(x.a, x.b3, x.s, x.c, p3, r.s, r.c);
    r.p = {p3, x.p};
    return r;
  endfunction

  // Returns {cout, product}.
  function automatic logic [8:0] ref_stage4(l3_t x);
    int unsigned v;
    v = int'(x.s) + int'(x.c);
    return {v[4], v[3:0], x.p};
  endfunction
endpackage
