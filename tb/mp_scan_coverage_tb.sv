// mp_scan_coverage_tb: shows that the three scan-based tests of the
// micropipelined multiplier detect stuck-at faults.
//
// For each fault the testbench clears the pipeline, forces one node to a
// constant and runs the full test program:
//   control test  - one acknowledge in normal mode must toggle ain, from
//                   the full state with aout = 0 and with aout = 1;
//   latch test    - alternating, all-0 and all-1 patterns flushed through
//                   the 58-bit scan chain must come out unchanged;
//   logic test    - random vectors are scanned in, captured by one
//                   acknowledge and scanned out, compared with a reference.
// Faults: every C-element output stuck at 0 and at 1 (must be caught by the
// control test), one storage bit of every latch stuck at 0 and at 1
// (stuck-at-capture; latch test), one bit of every latch stuck at pass, with
// both halves forced to follow their inputs (must be caught by the
// alternating pattern of the latch test, as it loses one chain position;
// the constant patterns must pass it unchanged),
// and two output bits of every stage's logic stuck at 0 and at 1 (logic
// test). The fault-free circuit must pass all three tests. The
// top's handshake assertions are switched off for the faulty runs, since a
// faulty circuit breaks the handshake by nature.
`timescale 1ps / 1ps
module mp_scan_coverage_tb;
  import mp_pkg::*;
  import mp_ref_pkg::*;

  localparam int unsigned TSET = 40000;
  localparam int          NVEC = 19;     // scan loads, the largest per-stage test set

  logic       clr, scan, sin, sout, rin, ain, rout, aout;
  logic [3:0] a, b;
  logic [7:0] o;
  logic       cout;

  int checks = 0, failures = 0;
  int ctl_err, latch_err, alt_err, logic_err;

  mp_mult4x4 dut (
    .clr(clr), .scan(scan), .sin(sin), .sout(sout), .rin(rin), .ain(ain),
    .rout(rout), .aout(aout), .a(a), .b(b), .o(o), .cout(cout)
  );

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic do_clear();
    scan = 0; rin = 0; aout = 0; clr = 1;
    #TSET;
    clr = 0;
    #TSET;
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

  function automatic logic [SCAN_LEN-1:0] expected_capture(logic [SCAN_LEN-1:0] v,
                                                           logic [3:0] ea, logic [3:0] eb);
    l0_t v0; l1_t v1; l2_t v2; l3_t v3;
    logic [8:0] r4;
    {v3, v2, v1, v0} = v[SCAN_LEN-L4_W-1:0];
    r4 = ref_stage4(v3);
    return {r4[7:0], ref_stage3(v2), ref_stage2(v1), ref_stage1(v0), ref_stage0(ea, eb)};
  endfunction

  // The whole test program; counts mismatches of each test.
  task automatic run_tests();
    logic bo, ain0;
    logic [SCAN_LEN-1:0] v, nextv, exp_c, got;
    ctl_err = 0; latch_err = 0; alt_err = 0; logic_err = 0;
    scan = 1;
    #TSET;
    // Latch test.
    for (int pat = 0; pat < 3; pat++) begin
      logic [2*SCAN_LEN-1:0] s;
      for (int i = 0; i < 2 * SCAN_LEN; i++)
        s[i] = (pat == 0) ? logic'(i % 2) : (pat == 1 ? 1'b0 : 1'b1);
      for (int i = 0; i < 2 * SCAN_LEN; i++) begin
        shift(s[i], bo);
        if (i >= SCAN_LEN && bo != s[i-SCAN_LEN]) begin
          latch_err++;
          if (pat == 0) alt_err++;
        end
      end
    end
    // Logic test with the first control-test state.
    for (int i = 0; i < SCAN_LEN; i++) v[i] = 1'($urandom);
    for (int i = SCAN_LEN - 1; i >= 0; i--) shift(v[i], bo);
    for (int t = 0; t < NVEC; t++) begin
      a = 4'($urandom); b = 4'($urandom);
      exp_c = expected_capture(v, a, b);
      rin = 1'b0;
      #TSET;
      scan = 0;
      #TSET;
      ain0 = ain;
      aout = 1;
      #TSET;
      if (ain == ain0) ctl_err++;
      scan = 1;
      #TSET;
      aout = 0;
      #TSET;
      for (int i = 0; i < SCAN_LEN; i++) nextv[i] = 1'($urandom);
      for (int i = 0; i < SCAN_LEN; i++) begin
        shift(nextv[SCAN_LEN-1-i], bo);
        got[SCAN_LEN-1-i] = bo;
      end
      for (int i = 0; i < SCAN_LEN; i++) if (got[i] != exp_c[i]) logic_err++;
      v = nextv;
    end
    // Second control-test state.
    aout = 1;
    #TSET;
    rin = 1'b1;
    #TSET;
    scan = 0;
    #TSET;
    ain0 = ain;
    aout = 0;
    #TSET;
    if (ain == ain0) ctl_err++;
  endtask

  // Input of the bit chosen for a stuck-at-pass fault: the previous slave
  // bit in scan mode, the stage output in normal mode. Whenever it changes,
  // both halves of that bit are forced to it again, so the bit passes its
  // input straight through.
  int   pass_idx = -1;
  logic pass_v;
  always_comb begin
    case (pass_idx)
      0: pass_v = scan ? dut.u_l0.b_half[4] : dut.d0[5];
      1: pass_v = scan ? dut.u_l1.b_half[5] : dut.d1[6];
      2: pass_v = scan ? dut.u_l2.b_half[6] : dut.d2[7];
      3: pass_v = scan ? dut.u_l3.b_half[3] : dut.d3[4];
      4: pass_v = scan ? dut.u_l4.b_half[2] : dut.d4[3];
      default: pass_v = 1'b0;
    endcase
  end

  task automatic force_pass(input int idx, input logic v);
    case (idx)
      0: if (v) begin force dut.u_l0.t_half[5] = 1'b1; force dut.u_l0.b_half[5] = 1'b1; end
         else   begin force dut.u_l0.t_half[5] = 1'b0; force dut.u_l0.b_half[5] = 1'b0; end
      1: if (v) begin force dut.u_l1.t_half[6] = 1'b1; force dut.u_l1.b_half[6] = 1'b1; end
         else   begin force dut.u_l1.t_half[6] = 1'b0; force dut.u_l1.b_half[6] = 1'b0; end
      2: if (v) begin force dut.u_l2.t_half[7] = 1'b1; force dut.u_l2.b_half[7] = 1'b1; end
         else   begin force dut.u_l2.t_half[7] = 1'b0; force dut.u_l2.b_half[7] = 1'b0; end
      3: if (v) begin force dut.u_l3.t_half[4] = 1'b1; force dut.u_l3.b_half[4] = 1'b1; end
         else   begin force dut.u_l3.t_half[4] = 1'b0; force dut.u_l3.b_half[4] = 1'b0; end
      default:
         if (v) begin force dut.u_l4.t_half[3] = 1'b1; force dut.u_l4.b_half[3] = 1'b1; end
         else   begin force dut.u_l4.t_half[3] = 1'b0; force dut.u_l4.b_half[3] = 1'b0; end
    endcase
  endtask

  always @(pass_v or pass_idx)
    if (pass_idx >= 0) force_pass(pass_idx, pass_v);

  // Fault injection. kind: 0 C-element output, 1 latch slave bit, 2 stage
  // output bit, 3 latch bit stuck at pass (val unused).
  task automatic inject(input int kind, input int idx, input logic val);
    case (kind)
      0: case (idx)
           0: force dut.u_ctl.g_ctl[0].u_c.z = val;
           1: force dut.u_ctl.g_ctl[1].u_c.z = val;
           2: force dut.u_ctl.g_ctl[2].u_c.z = val;
           3: force dut.u_ctl.g_ctl[3].u_c.z = val;
           default: force dut.u_ctl.g_ctl[4].u_c.z = val;
         endcase
      1: case (idx)
           0: force dut.u_l0.b_half[5] = val;
           1: force dut.u_l1.b_half[6] = val;
           2: force dut.u_l2.b_half[7] = val;
           3: force dut.u_l3.b_half[4] = val;
           default: force dut.u_l4.b_half[3] = val;
         endcase
      3: ;                            // applied by the process below
      default: case (idx)
           0: force dut.d0.pp[2] = val;
           1: force dut.d0.pp[3] = val;
           2: force dut.d1.s[1] = val;
           3: force dut.d1.c[0] = val;
           4: force dut.d2.s[2] = val;
           5: force dut.d2.c[1] = val;
           6: force dut.d3.p[3] = val;
           7: force dut.d3.c[2] = val;
           8: force dut.d4[5] = val;
           default: force dut.d4[7] = val;
         endcase
    endcase
  endtask

  task automatic release_all();
    release dut.u_ctl.g_ctl[0].u_c.z; release dut.u_ctl.g_ctl[1].u_c.z; release dut.u_ctl.g_ctl[2].u_c.z;
    release dut.u_ctl.g_ctl[3].u_c.z; release dut.u_ctl.g_ctl[4].u_c.z;
    release dut.u_l0.b_half[5]; release dut.u_l1.b_half[6]; release dut.u_l2.b_half[7];
    release dut.u_l3.b_half[4]; release dut.u_l4.b_half[3];
    release dut.u_l0.t_half[5]; release dut.u_l1.t_half[6]; release dut.u_l2.t_half[7];
    release dut.u_l3.t_half[4]; release dut.u_l4.t_half[3];
    release dut.d0.pp[2]; release dut.d0.pp[3]; release dut.d1.s[1]; release dut.d1.c[0];
    release dut.d2.s[2]; release dut.d2.c[1]; release dut.d3.p[3]; release dut.d3.c[2];
    release dut.d4[5]; release dut.d4[7];
  endtask

  initial begin
    #(64'd20_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_ctl = 0, n_latch = 0, n_pass = 0, n_logic = 0;
    sin = 0; a = 0; b = 0;
    do_clear();
    run_tests();
    check(ctl_err == 0 && latch_err == 0 && logic_err == 0,
          $sformatf("fault-free circuit: ctl %0d latch %0d logic %0d", ctl_err, latch_err, logic_err));

    for (int kind = 0; kind < 4; kind++) begin
      for (int idx = 0; idx < (kind == 2 ? 10 : 5); idx++) begin
        for (int sv = 0; sv < (kind == 3 ? 1 : 2); sv++) begin
          pass_idx = -1;               // stop re-forcing before releasing
          release_all();
          $assertoff;                  // a faulty circuit breaks the handshake rules
          do_clear();
          inject(kind, idx, logic'(sv));
          if (kind == 3) pass_idx = idx;
          run_tests();
          case (kind)
            0: begin check(ctl_err > 0, $sformatf("C-element %0d stuck-at-%0d not seen by control test", idx, sv)); n_ctl++; end
            1: begin check(latch_err > 0, $sformatf("latch %0d bit stuck-at-%0d not seen by latch test", idx, sv)); n_latch++; end
            3: begin
              check(alt_err > 0, $sformatf("latch %0d bit stuck-at-pass not seen by the alternating pattern", idx));
              check(alt_err == latch_err, $sformatf("latch %0d bit stuck-at-pass changed a constant pattern", idx));
              n_pass++;
            end
            default: begin check(logic_err > 0, $sformatf("logic fault %0d stuck-at-%0d not seen by logic test", idx, sv)); n_logic++; end
          endcase
        end
      end
    end
    pass_idx = -1;
    release_all();
    check(n_ctl == 10 && n_latch == 10 && n_pass == 5 && n_logic == 20, "all faults injected");
    $display("faults injected: C-element %0d, latch stuck-at %0d, latch stuck-at-pass %0d, logic %0d",
             n_ctl, n_latch, n_pass, n_logic);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
