// mp_pkg: types and constants shared by the micropipelined 4x4 multiplier.
//
// The multiplier is an unsigned 4x4 carry-save array split into five
// processing stages (stage 0 .. stage 4), each followed by a scan
// transition latch. The packed structs below are the bundles those five
// latches hold; their widths (12, 14, 14, 10 and 8 bits) are the latch
// widths printed in the multiplier's block diagram. How the bits inside each
// bundle are used (operands carried forward, finished product bits, a
// carry-save sum vector and a carry vector) is this design's own
// decomposition, chosen so that it reproduces those widths and so that
// stages 2 and 3 are the same circuit, as in the published multiplier.
//
// Weights: after array row i the bundle holds product bits p[i:0], a sum
// vector s[m] of weight i+1+m and a carry vector c[m] of weight i+1+m
// (m = 0..2). Timing: none; these are data types only.
`timescale 1ps / 1ps
package mp_pkg;

  localparam int unsigned PROD_W = 8;   // product width
  localparam int unsigned NSTAGE = 5;   // pipeline stages / latches

  // Bundle held by latch 0 (12 bits): operands and partial-product row 0.
  typedef struct packed {
    logic [3:0] a;
    logic [3:0] b;
    logic [3:0] pp;   // a & {4{b[0]}}, weights 0..3
  } l0_t;

  // Bundle held by latch 1 (14 bits): after array row 1.
  typedef struct packed {
    logic [3:0] a;
    logic [3:2] b;
    logic [1:0] p;    // finished product bits
    logic [2:0] s;    // sum vector, weights 2..4
    logic [2:0] c;    // carry vector, weights 2..4
  } l1_t;

  // Bundle held by latch 2 (14 bits): after array row 2.
  typedef struct packed {
    logic [3:0] a;
    logic       b3;
    logic [2:0] p;
    logic [2:0] s;    // weights 3..5
    logic [2:0] c;    // weights 3..5
  } l2_t;

  // Bundle held by latch 3 (10 bits): after array row 3.
  typedef struct packed {
    logic [3:0] p;
    logic [2:0] s;    // weights 4..6
    logic [2:0] c;    // weights 4..6
  } l3_t;

  // Latch 4 holds the 8-bit product.
  typedef logic [PROD_W-1:0] l4_t;

  localparam int unsigned L0_W = $bits(l0_t);
  localparam int unsigned L1_W = $bits(l1_t);
  localparam int unsigned L2_W = $bits(l2_t);
  localparam int unsigned L3_W = $bits(l3_t);
  localparam int unsigned L4_W = $bits(l4_t);
  localparam int unsigned SCAN_LEN = L0_W + L1_W + L2_W + L3_W + L4_W;  // 58

  // Full adder, used by the array rows and the final adder.
  function automatic logic [1:0] full_add(input logic x, input logic y, input logic z);
    full_add = {(x & y) | (x & z) | (y & z), x ^ y ^ z};  // {carry, sum}
  endfunction

endpackage
