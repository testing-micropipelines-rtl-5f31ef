// bundle_delay: behavioural model of a bundling delay element (not
// synthesizable as written; a real implementation is a matched chain of
// gates or a layout-tuned delay line).
//
// The output repeats the input DELAY_PS picoseconds later. In the
// micropipeline it sits on each request path, so that a request reaches the
// next C-element only after the data it bundles has settled through that
// stage's logic, and inside each latch between pass and capture. The delay
// values are parameters set by the instantiating design.
`timescale 1ps / 1ps
module bundle_delay #(
  parameter int unsigned DELAY_PS = 1000
) (
  input  logic a,
  output logic y
);
  assign #(DELAY_PS) y = a;
endmodule
