// mp_mult4x4: self-timed, scan-testable micropipelined 4x4 multiplier.
//
// Five stages, each made of processing logic, a bundling delay on its
// request path, a scan C-element and a scan transition latch:
//
//   a,b -> stage0 -> L0(12) -> stage1 -> L1(14) -> stage2 -> L2(14)
//       -> stage3 -> L3(10) -> stage4 -> L4(8) -> o      (stage4 also: cout)
//
// Control (two-phase, bundled data; module mp_control). C-element k fires
// when its request (rin for k = 0, otherwise the acknowledge of latch k-1,
// each through a bundling delay of STAGE_DLY_PS) differs from the
// C-element's output while the acknowledge of latch k+1 (aout for the last
// stage) equals that output. The new output reaches the pass input of
// latch k after CEL_DLY_PS and, LATCH_DLY_PS later, its capture input,
// which is also the latch's acknowledge. ain is the acknowledge of latch 0,
// rout that of latch 4. clr empties the pipeline (all control signals 0).
//
// Scan (scan = 1). The C-elements invert their acknowledge input, so the
// control network carries aout backwards from the last latch to ain, a
// scan clock that reaches the output end first. The latches form one scan
// chain, sin -> L0 bit 0 .. L0 bit 11 -> L1 .. -> L4 bit 7 -> sout (58
// bits). Latches alternate in polarity (INV = 1 in stages 1 and 3) so that
// all shift on the rising edge of aout; one aout pulse 0 -> 1 -> 0 shifts
// the chain by one bit, and while aout is 0 every latch presents its slave
// (the shifted value) to the logic after it.
//
// The stage structure, the latch widths, the clear line, the five delays
// and the scan wiring follow the published multiplier; the arithmetic
// inside the stages, the bit order of the chain and the stage delay value
// are this implementation's choices.
// LATCH_DLY_PS defaults to the request-to-acknowledge delay measured for the
// scan latch (3.63 ns) and CEL_DLY_PS to that of the scan C-element
// (2.25 ns). The C-element delay also gives the hold margin a capture needs:
// a latch closes (its acknowledge) CEL_DLY_PS before the latch feeding it
// opens. STAGE_DLY_PS must exceed the worst-case delay of any stage's logic,
// which the bundling-delay test checks on silicon; its value is assumed.
// The control network (mp_control) also checks the handshake rules at
// rin/ain and rout/aout with assertions.
//
// Tool notes: synthesis drops the delays of bundle_delay and then reports
// logic loops through the C-elements of mp_control. They are the self-timed
// control ring itself (each C-element waits on its neighbours), which in a
// real circuit and in simulation is broken by those delays; it stands by
// design. The constant output that synthesis reports is cout (see
// mult_stage4).
`timescale 1ps / 1ps
module mp_mult4x4
  import mp_pkg::*;
#(
  parameter int unsigned LATCH_DLY_PS = 3630,
  parameter int unsigned CEL_DLY_PS   = 2250,
  parameter int unsigned STAGE_DLY_PS = 5000
) (
  input  logic       clr,
  input  logic       scan,
  input  logic       sin,
  output logic       sout,
  input  logic       rin,
  output logic       ain,
  output logic       rout,
  input  logic       aout,
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] o,
  output logic       cout
);
  localparam int unsigned N = NSTAGE;

  logic [N-1:0] ctl;     // latch pass inputs
  logic [N-1:0] ack;     // latch capture inputs / acknowledges
  logic [N:0]   sc;      // scan chain

  // ---------------- control network ----------------
  mp_control #(
    .N(N), .LATCH_DLY_PS(LATCH_DLY_PS), .CEL_DLY_PS(CEL_DLY_PS), .STAGE_DLY_PS(STAGE_DLY_PS)
  ) u_ctl (
    .clr(clr), .scan(scan), .rin(rin), .ain(ain), .rout(rout), .aout(aout),
    .pass(ctl), .cap(ack)
  );

  // ---------------- data path ----------------
  l0_t d0, q0;
  l1_t d1, q1;
  l2_t d2, q2;
  l3_t d3, q3;
  l4_t d4, q4;

  mult_stage0 u_stage0 (.a(a), .b(b), .y(d0));
  mult_stage1 u_stage1 (.x(q0), .y(d1));

  mult_stage23 u_stage2 (
    .a(q1.a), .bi(q1.b[2]), .s_in(q1.s), .c_in(q1.c),
    .p_out(d2.p[2]), .s_out(d2.s), .c_out(d2.c)
  );
  assign d2.a      = q1.a;
  assign d2.b3     = q1.b[3];
  assign d2.p[1:0] = q1.p;

  mult_stage23 u_stage3 (
    .a(q2.a), .bi(q2.b3), .s_in(q2.s), .c_in(q2.c),
    .p_out(d3.p[3]), .s_out(d3.s), .c_out(d3.c)
  );
  assign d3.p[2:0] = q2.p;

  mult_stage4 u_stage4 (.x(q3), .prod(d4), .cout(cout));

  // ---------------- latches and scan chain ----------------
  // INV is 1 for the stages an odd number of places from the output end.
  assign sc[0] = sin;

  scan_tlatch #(.W(L0_W), .INV(((N-1-0) % 2) == 1)) u_l0 (
    .din(d0), .sin(sc[0]), .scan(scan), .p(ctl[0]), .c(ack[0]), .q(q0), .sout(sc[1]));
  scan_tlatch #(.W(L1_W), .INV(((N-1-1) % 2) == 1)) u_l1 (
    .din(d1), .sin(sc[1]), .scan(scan), .p(ctl[1]), .c(ack[1]), .q(q1), .sout(sc[2]));
  scan_tlatch #(.W(L2_W), .INV(((N-1-2) % 2) == 1)) u_l2 (
    .din(d2), .sin(sc[2]), .scan(scan), .p(ctl[2]), .c(ack[2]), .q(q2), .sout(sc[3]));
  scan_tlatch #(.W(L3_W), .INV(((N-1-3) % 2) == 1)) u_l3 (
    .din(d3), .sin(sc[3]), .scan(scan), .p(ctl[3]), .c(ack[3]), .q(q3), .sout(sc[4]));
  scan_tlatch #(.W(L4_W), .INV(((N-1-4) % 2) == 1)) u_l4 (
    .din(d4), .sin(sc[4]), .scan(scan), .p(ctl[4]), .c(ack[4]), .q(q4), .sout(sc[5]));

  assign sout = sc[N];
  assign o    = q4;
endmodule
