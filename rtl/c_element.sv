// c_element: scan-testable Muller C-element of the micropipeline control
// network, with its second input inverted as used between pipeline stages.
//
// Normal mode (scan = 0): z follows the request b when b and the inverted
// acknowledge ~a agree, and holds otherwise; for two-phase signalling this
// lets a stage take a new request only when the previous stage has one and
// the next stage has acknowledged the last one. Scan mode (scan = 1): the b
// input is bypassed and z = ~a, so the chain of C-elements becomes a clock
// line that carries the scan clock from AOUT back towards AIN, inverting at
// every stage. clr forces z to 0 (the empty-pipeline state), as the clear
// line of the published multiplier does; its active-high polarity is this
// implementation's choice. The scan bypass of the b input follows the
// published transistor circuit, modelled here at gate level.
//
// The C-element is a state-holding gate, so it is written as a latch on
// purpose: the latch that tools report here is the element itself.
// Timing: zero delay; the delays of the pipeline sit in bundle_delay.
`timescale 1ps / 1ps
module c_element (
  input  logic a,     // inverted input: acknowledge from the next stage
  input  logic b,     // request from the previous stage
  input  logic scan,  // 1: scan mode, z = ~a
  input  logic clr,   // 1: clear, z = 0
  output logic z
);
  logic en, d;

  // The element is open while cleared, in scan mode, or when its inputs
  // agree (b == ~a); otherwise it holds.
  always_comb begin
    en = clr | scan | (b != a);
    d  = clr ? 1'b0 : (scan ? ~a : b);
  end

  always_latch begin
    if (en)
      z = d;
  end
endmodule
