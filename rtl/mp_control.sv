// mp_control: control network of an N-stage scan-testable micropipeline.
//
// One scan C-element per stage, a bundling delay in front of each
// C-element's request input, a delay for each C-element and, per stage, the
// delay from a latch's pass input to its capture input, which is also the
// latch's acknowledge. Stage k: the request is rin (k = 0) or ack[k-1],
// delayed by STAGE_DLY_PS; the inverted input is ack[k+1] (aout for the
// last stage); the C-element output, CEL_DLY_PS later, is pass[k], and
// LATCH_DLY_PS after that it is cap[k] = ack[k]. ain = ack[0], rout =
// ack[N-1].
//
// Normal mode: a two-phase micropipeline control that holds up to N items;
// an item moves into stage k when stage k-1 has one and stage k+1 has taken
// the previous one. Scan mode: every C-element inverts its acknowledge
// input, so an aout transition runs back through all stages to ain as a
// scan clock, reaching stage N-1 first and inverted at each stage. clr sets
// every C-element to 0 (empty).
//
// Structure and the scan behaviour follow the published micropipeline
// scheme. LATCH_DLY_PS (3.63 ns) and CEL_DLY_PS (2.25 ns) default to the
// published scan-cell delays; the STAGE_DLY_PS value is this
// implementation's assumption and must cover the slowest stage logic.
//
// Tool notes: synthesis drops the delays and then reports logic loops
// through the C-elements; they are the self-timed control ring and stand by
// design. The C-elements are latches on purpose.
`timescale 1ps / 1ps
module mp_control #(
  parameter int unsigned N            = 5,
  parameter int unsigned LATCH_DLY_PS = 3630,
  parameter int unsigned CEL_DLY_PS   = 2250,
  parameter int unsigned STAGE_DLY_PS = 5000
) (
  input  logic         clr,
  input  logic         scan,
  input  logic         rin,
  output logic         ain,
  output logic         rout,
  input  logic         aout,
  output logic [N-1:0] pass,
  output logic [N-1:0] cap
);
  logic [N-1:0] cz;      // C-element outputs
  logic [N-1:0] req_d;   // delayed requests
  logic [N-1:0] ack_nx;  // acknowledge seen by each C-element
  logic [N-1:0] ack;

  for (genvar k = 0; k < N; k++) begin : g_ctl
    if (k == 0) begin : g_first
      bundle_delay #(.DELAY_PS(STAGE_DLY_PS)) u_rdly (.a(rin), .y(req_d[k]));
    end else begin : g_rest
      bundle_delay #(.DELAY_PS(STAGE_DLY_PS)) u_rdly (.a(ack[k-1]), .y(req_d[k]));
    end
    if (k == N-1) begin : g_last
      assign ack_nx[k] = aout;
    end else begin : g_mid
      assign ack_nx[k] = ack[k+1];
    end
    c_element u_c (.a(ack_nx[k]), .b(req_d[k]), .scan(scan), .clr(clr), .z(cz[k]));
    bundle_delay #(.DELAY_PS(CEL_DLY_PS))   u_cdly (.a(cz[k]),   .y(pass[k]));
    bundle_delay #(.DELAY_PS(LATCH_DLY_PS)) u_ldly (.a(pass[k]), .y(ack[k]));
  end

  assign cap  = ack;
  assign ain  = ack[0];
  assign rout = ack[N-1];

  // Two-phase handshake rules at the two ends, in normal operation: a new
  // request on rin only after ain has acknowledged the previous one, and an
  // acknowledge on aout only while rout has an unacknowledged request.
  always @(rin) begin
    if (!clr && !scan)
      assert (ain != rin) else $error("rin changed before ain acknowledged the previous request");
  end

  always @(aout) begin
    if (!clr && !scan)
      assert (rout == aout) else $error("aout changed with no request pending on rout");
  end
endmodule
