// mp_delay_test_tb: bundling-constraint (delay-fault) test of the
// micropipelined multiplier.
//
// A two-pattern test per stage. The first pattern v1 is what a stage's
// input latch holds before the test, set up through the scan chain; the
// second pattern v2 is computed by the stages in front of it. Sequence:
//  1. scan a random vector into the 58-bit chain;
//  2. normal mode with no request pending, then pulse clr: the control
//     network becomes empty; latches 0, 2 and 4 (whose control falls)
//     capture their logic's response to the scanned data, latches 1 and 3
//     keep the scanned data;
//  3. one request event on rin runs forward through the empty pipeline:
//     each latch k-1 launches v2 into stage k and latch k captures stage k's
//     response one bundling budget later,
//     STAGE_DLY + CEL_DLY + 2 x LATCH_DLY (checked to the picosecond);
//  4. the result is read at the product output o. Every carry-save bit
//     has a weight below 2^8, so a wrong captured bit in any latch always
//     changes o. The testbench also compares every latch with its
//     reference through hierarchical references.
// The result is not scanned out. After a forward wave all five
// C-elements are 1. Scan mode settles to alternating values, so entering
// it from this state makes C-elements 0 and 2 pulse on stale acknowledges,
// and the pulses shift their latches.
// A slow path is emulated by holding one output bit of stage k at its
// v1 value until X ps after the launch. X below the budget must pass; X
// above it must be caught. Operands are drawn until the held bit actually
// differs between v1 and v2.
`timescale 1ps / 1ps
module mp_delay_test_tb;
  import mp_pkg::*;
  import mp_ref_pkg::*;

  localparam int unsigned LATCH_DLY = 3630;
  localparam int unsigned CEL_DLY   = 2250;
  localparam int unsigned STAGE_DLY = 5000;
  localparam int unsigned BUDGET    = STAGE_DLY + CEL_DLY + 2 * LATCH_DLY;
  localparam int unsigned TSET      = 40000;

  logic       clr, scan, sin, sout, rin, ain, rout, aout;
  logic [3:0] a, b;
  logic [7:0] o;
  logic       cout;

  int checks = 0, failures = 0;
  int n_detect = 0, n_pass = 0;

  mp_mult4x4 dut (
    .clr(clr), .scan(scan), .sin(sin), .sout(sout), .rin(rin), .ain(ain),
    .rout(rout), .aout(aout), .a(a), .b(b), .o(o), .cout(cout)
  );

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic shift(input logic din, output logic dout);
    dout = sout;
    sin  = din;
    #1000;
    aout = 1;
    #TSET;
    aout = 0;
    #TSET;
  endtask

  // Bit offsets of each latch in the chain.
  function automatic int unsigned lofs(int k);
    case (k)
      0: return 0;
      1: return L0_W;
      2: return L0_W + L1_W;
      3: return L0_W + L1_W + L2_W;
      default: return L0_W + L1_W + L2_W + L3_W;
    endcase
  endfunction

  // Held bit of stage k's output (bit index within latch k's bundle).
  function automatic int unsigned held_bit(int k);
    case (k)
      1: return 0;      // l1_t.c[0]
      2: return 4;      // l2_t.s[1]
      3: return 5;      // l3_t.s[2]
      default: return 6;
    endcase
  endfunction

  task automatic hold_bit(input int k, input logic v);
    case (k)
      1: force dut.d1.c[0] = v;
      2: force dut.d2.s[1] = v;
      3: force dut.d3.s[2] = v;
      default: force dut.d4[6] = v;
    endcase
  endtask

  task automatic release_bit(input int k);
    case (k)
      1: release dut.d1.c[0];
      2: release dut.d2.s[1];
      3: release dut.d3.s[2];
      default: release dut.d4[6];
    endcase
  endtask

  // One test. k = 0: no slow path; otherwise stage k is slow by x ps.
  task automatic run(input int k, input int unsigned x);
    logic [SCAN_LEN-1:0] v, got, exp_w;
    logic [3:0] a0, b0, a1, b1;
    l0_t s0, w0; l1_t s1, w1; l2_t s2, w2; l3_t s3, w3;
    logic [8:0] s4, w4;
    logic bo, oldb, newb;
    time t_launch, t_cap;
    int tries = 0;

    // Draw operands and scan data until the held bit changes from v1 to v2.
    do begin
      for (int i = 0; i < SCAN_LEN; i++) v[i] = 1'($urandom);
      a0 = 4'($urandom); b0 = 4'($urandom);
      a1 = 4'($urandom); b1 = 4'($urandom);
      {s3, s2, s1, s0} = v[SCAN_LEN-L4_W-1:0];
      // Contents after the clear: even latches take their logic's response.
      s0 = ref_stage0(a0, b0);
      s2 = ref_stage2(s1);
      s4 = ref_stage4(s3);
      // Wave values.
      w0 = ref_stage0(a1, b1);
      w1 = ref_stage1(w0);
      w2 = ref_stage2(w1);
      w3 = ref_stage3(w2);
      w4 = ref_stage4(w3);
      exp_w = {w4[7:0], w3, w2, w1, w0};
      if (k == 0) break;
      // Stage k's response to v1 (its input latch before the wave).
      case (k)
        1: oldb = ref_stage1(s0)[held_bit(1)];
        2: oldb = ref_stage2(s1)[held_bit(2)];
        3: oldb = ref_stage3(s2)[held_bit(3)];
        default: begin logic [8:0] r; r = ref_stage4(s3); oldb = r[held_bit(4)]; end
      endcase
      newb = exp_w[lofs(k) + held_bit(k)];
      tries++;
    end while (oldb == newb && tries < 200);
    if (k != 0) check(oldb != newb, "a sensitising pattern was found");

    // 1. Scan in.
    scan = 1; aout = 0; clr = 0;
    #TSET;
    for (int i = SCAN_LEN - 1; i >= 0; i--) shift(v[i], bo);
    // 2. Normal mode, no request pending (rin equals the first C-element).
    a = a0; b = b0;
    rin = 1'b1;
    #TSET;
    scan = 0;
    #TSET;
    rin = 1'b0;
    clr = 1;
    #TSET;
    clr = 0;
    #TSET;
    check(dut.q0 == s0 && dut.q1 == s1 && dut.q2 == s2 && dut.q3 == s3 && dut.q4 == s4[7:0],
          "latch contents after the clear");
    // 3. One request event with the slow path in place.
    a = a1; b = b1;
    #1000;
    if (k != 0) hold_bit(k, oldb);
    rin = 1'b1;
    if (k != 0) begin
      logic pv;
      case (k)
        1: pv = dut.ctl[0];
        2: pv = dut.ctl[1];
        3: pv = dut.ctl[2];
        default: pv = dut.ctl[3];
      endcase
      wait (dut.ctl[k-1] != pv);        // latch k-1 launches v2
      t_launch = $time;
      fork
        begin #(x); release_bit(k); end
        begin wait (dut.ack[k] == 1'b1); t_cap = $time; end
      join
      check(t_cap - t_launch == time'(BUDGET), $sformatf("budget %0t", t_cap - t_launch));
    end
    wait (rout == 1'b1);
    #TSET;
    got = {dut.q4, dut.q3, dut.q2, dut.q1, dut.q0};
    if (k == 0 || x < BUDGET) begin
      check(got == exp_w, $sformatf("slow stage %0d by %0d ps: got %h expected %h", k, x, got, exp_w));
      check(o == 8'(a1 * b1), "product of the request");
      n_pass++;
    end else begin
      // Latches 0..k: only the slow bit is wrong (later latches were
      // computed from it and are checked through o).
      logic [SCAN_LEN-1:0] upto;
      upto = (k == 4) ? '1 : ((58'd1 << lofs(k + 1)) - 1);
      check((got & upto) == ((exp_w ^ (58'd1 << (lofs(k) + held_bit(k)))) & upto),
            $sformatf("stage %0d latch holds the stale bit", k));
      check(o != 8'(a1 * b1), $sformatf("delay fault in stage %0d (%0d ps) caught at o", k, x));
      n_detect++;
    end
    // Back to a clean normal state.
    scan = 0; rin = 0; aout = 0; clr = 1;
    #TSET;
    clr = 0;
    #TSET;
  endtask

  initial begin
    #(64'd5_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sin = 0; a = 0; b = 0; scan = 0; rin = 0; aout = 0; clr = 1;
    #TSET;
    clr = 0;
    #TSET;
    run(0, 0);
    for (int k = 1; k <= 4; k++) begin
      run(k, BUDGET - 1500);
      run(k, BUDGET + 1500);
    end
    check(n_detect == 4 && n_pass == 5, "all runs made");
    $display("passing runs %0d, delay faults caught %0d", n_pass, n_detect);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
