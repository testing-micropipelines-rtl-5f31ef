// scan_tlatch: W-bit scan transition latch with capture/pass interface.
//
// Each bit holds two level-sensitive latches. Half T is transparent while
// capture (c) is 1, half B while c is 0; the output q is taken from B while
// pass (p) is 1 and from T while p is 0. With c == p the latch is opaque,
// with c != p transparent, so a transition on p opens it and the following
// transition on c closes it on the current din: a transition latch that is
// normally opaque. Driving c from p through a bundling delay gives it a
// request (p) / acknowledge (delayed c) interface.
//
// In scan mode (scan = 1) the input multiplexers turn the two halves into a
// master/slave flip-flop: T (master) loads the scan input, which is sin for
// bit 0 and the B half of the bit below for the others, and B (slave) loads
// T. The slave of the top bit is sout, so the bits of one latch form a
// shift register from sin (bit 0) to sout (bit W-1). The slave takes the
// master's value when c goes from 1 to 0.
//
// INV = 1 inverts p and c at the input. Micropipeline stages alternate
// between the two kinds, because the scan clock is inverted at each
// C-element; with INV matched to the stage, every latch of the pipeline
// shifts on the same edge of the scan clock. The two-half structure, the
// muxed scan inputs and sout from the B half follow the published
// circuit; the exact polarities of the halves and of INV are this
// implementation's reading of it.
//
// Tool notes: the latches that synthesis reports are the storage of this
// element. Lint reports a combinational cycle through t_half and b_half: in
// scan mode T loads from B of the bit below and B from T, but T is open
// only while cc = 1 and B only while cc = 0, so the cycle is never
// transparent all the way round.
`timescale 1ps / 1ps
module scan_tlatch #(
  parameter int unsigned W   = 8,
  parameter bit          INV = 1'b0
) (
  input  logic [W-1:0] din,
  input  logic         sin,
  input  logic         scan,
  input  logic         p,     // pass
  input  logic         c,     // capture
  output logic [W-1:0] q,
  output logic         sout
);
  logic         pp, cc;
  logic [W-1:0] t_half, b_half;
  logic [W-1:0] t_in, b_in;

  assign pp = p ^ INV;
  assign cc = c ^ INV;

  always_comb begin
    t_in[0] = scan ? sin : din[0];
    for (int i = 1; i < W; i++)
      t_in[i] = scan ? b_half[i-1] : din[i];
    b_in = scan ? t_half : din;
  end

  always_latch begin
    if (cc)
      t_half = t_in;
  end

  always_latch begin
    if (!cc)
      b_half = b_in;
  end

  assign q    = pp ? b_half : t_half;
  assign sout = b_half[W-1];
endmodule
