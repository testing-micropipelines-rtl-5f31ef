// mp_mult4x4_tb: end-to-end test of the scan-testable micropipelined 4x4
// multiplier at its default parameters.
//
// Part 1, self-timed operation: a producer sends random operand pairs with
// two-phase requests on rin, a consumer with random response times takes
// products from rout/aout and checks them (and cout = 0). The consumer is
// sometimes slow enough that the pipeline fills and the producer must wait.
// The forward latency of an empty pipeline is checked against
// 5 x (stage delay + C-element delay + latch delay).
// Part 2, scan test: the latch test (alternating, all-0 and all-1 patterns
// through the 58-bit chain), the processing-logic test (shift a vector in,
// one acknowledge in normal mode captures every stage's response, shift it
// out and compare with a reference model) with the control test on ain
// folded in, and the second control-network state (aout = 1).
// Every mechanism is counted; one that never happens counts a failure.
`timescale 1ps / 1ps
module mp_mult4x4_tb;
  import mp_pkg::*;
  import mp_ref_pkg::*;

  localparam int unsigned LATCH_DLY = 3630;
  localparam int unsigned CEL_DLY   = 2250;
  localparam int unsigned STAGE_DLY = 5000;
  localparam int unsigned TSET      = 40000;   // > a full control ripple
  localparam int          NITEMS    = 200;
  localparam int          NVEC      = 19;      // scan loads (largest per-stage test set)

  logic       clr, scan, sin, sout, rin, ain, rout, aout;
  logic [3:0] a, b;
  logic [7:0] o;
  logic       cout;

  int checks = 0, failures = 0;
  int n_items = 0, n_full = 0, n_shift = 0, n_capture = 0, n_ctl_a = 0, n_ctl_b = 0,
      n_flush = 0;

  mp_mult4x4 dut (
    .clr(clr), .scan(scan), .sin(sin), .sout(sout), .rin(rin), .ain(ain),
    .rout(rout), .aout(aout), .a(a), .b(b), .o(o), .cout(cout)
  );

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------- self-timed operation ----------------
  logic [7:0] expq[$];
  bit         producer_done;

  task automatic producer(input int n);
    for (int i = 0; i < n; i++) begin
      int waited = 0;
      while (ain != rin) begin
        #1000;
        waited++;
      end
      if (waited > 20) n_full++;     // had to wait for a slot: pipeline full
      a = 4'($urandom);
      b = 4'($urandom);
      expq.push_back(8'(a * b));
      #100;                          // operands settle before the request
      rin = ~rin;
      #($urandom_range(0, 4000));
    end
    producer_done = 1;
  endtask

  task automatic consumer(input int n);
    for (int i = 0; i < n; i++) begin
      logic [7:0] e;
      wait (rout != aout);
      #100;
      e = expq.pop_front();
      check(o == e, $sformatf("product %0d: got %0d expected %0d", i, o, e));
      check(cout == 1'b0, "cout");
      n_items++;
      if (i % 40 < 15) #($urandom_range(60000, 120000));  // slow reader: pipeline fills
      else             #($urandom_range(0, 3000));
      aout = ~aout;
    end
  endtask

  task automatic do_clear();
    scan = 0; rin = 0; aout = 0; clr = 1;
    #TSET;
    clr = 0;
    #TSET;
  endtask

  // ---------------- scan helpers ----------------
  // One scan clock: aout 0 -> 1 -> 0. Returns the bit on sout before it.
  task automatic shift(input logic din, output logic dout);
    dout = sout;
    sin  = din;
    #1000;
    aout = 1;
    #TSET;
    aout = 0;
    #TSET;
    n_shift++;
  endtask

  // Chain index p: latch 0 bit 0 is 0, latch 4 bit 7 is SCAN_LEN-1.
  function automatic logic [SCAN_LEN-1:0] expected_capture(logic [SCAN_LEN-1:0] v,
                                                           logic [3:0] ea, logic [3:0] eb);
    l0_t v0; l1_t v1; l2_t v2; l3_t v3;
    logic [8:0] r4;
    {v3, v2, v1, v0} = v[SCAN_LEN-L4_W-1:0];
    r4 = ref_stage4(v3);
    return {r4[7:0], ref_stage3(v2), ref_stage2(v1), ref_stage1(v0), ref_stage0(ea, eb)};
  endfunction

  // ---------------- watchdog ----------------
  initial begin
    #2_000_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- main ----------------
  initial begin
    logic bo;
    logic [SCAN_LEN-1:0] v, nextv, exp_c, got;
    logic [3:0] ta, tb;
    logic ain0;
    time  t0;

    sin = 0; a = 0; b = 0; producer_done = 0;
    do_clear();

    // Forward latency of an empty pipeline.
    a = 4'd7; b = 4'd9;
    #100;
    t0  = $time;
    rin = 1;
    wait (rout == 1'b1);
    check($time - t0 == time'(5 * (STAGE_DLY + CEL_DLY + LATCH_DLY)),
          $sformatf("empty-pipeline latency %0t", $time - t0));
    check(o == 8'd63, "latency item product");
    aout = 1;
    wait (ain == rin);
    #TSET;

    // Part 1: concurrent producer and consumer.
    expq.delete();
    fork
      producer(NITEMS);
      consumer(NITEMS);
    join
    #TSET;

    // Part 2a: latch test, scan flush of three patterns.
    scan = 1; #TSET;
    for (int pat = 0; pat < 3; pat++) begin
      logic [2*SCAN_LEN-1:0] s;
      for (int i = 0; i < 2 * SCAN_LEN; i++)
        s[i] = (pat == 0) ? logic'(i % 2) : (pat == 1 ? 1'b0 : 1'b1);
      for (int i = 0; i < 2 * SCAN_LEN; i++) begin
        shift(s[i], bo);
        if (i >= SCAN_LEN) check(bo == s[i-SCAN_LEN], $sformatf("flush pattern %0d bit %0d", pat, i));
      end
      n_flush++;
    end

    // Part 2b: processing-logic and control test, NVEC scan loads.
    // Load the first vector; bit SCAN_LEN-1 goes in first.
    for (int i = 0; i < SCAN_LEN; i++) v[i] = 1'($urandom);
    for (int i = SCAN_LEN - 1; i >= 0; i--) shift(v[i], bo);
    for (int t = 0; t < NVEC; t++) begin
      ta = 4'($urandom); tb = 4'($urandom);
      a = ta; b = tb;
      exp_c = expected_capture(v, ta, tb);
      rin = 1'b0;                       // odd number of stages
      #TSET;
      scan = 0;                         // normal mode: pipeline full
      #TSET;
      check(rout == 1'b1 && aout == 1'b0, "full state: rout high, unacknowledged");
      ain0 = ain;
      aout = 1;                         // one acknowledge ripples to ain
      #TSET;
      check(ain != ain0, "control test: ain transition");
      if (ain != ain0) n_ctl_a++;
      n_capture++;
      scan = 1;
      #TSET;
      aout = 0;
      #TSET;
      // Unload the responses while loading the next vector.
      for (int i = 0; i < SCAN_LEN; i++) nextv[i] = 1'($urandom);
      for (int i = 0; i < SCAN_LEN; i++) begin
        shift(nextv[SCAN_LEN-1-i], bo);
        got[SCAN_LEN-1-i] = bo;
      end
      check(got == exp_c, $sformatf("scan response %0d: got %h expected %h", t, got, exp_c));
      v = nextv;
    end

    // Part 2c: second control state, pipeline full with aout = 1.
    aout = 1;
    #TSET;
    rin = 1'b1;
    #TSET;
    scan = 0;
    #TSET;
    ain0 = ain;
    aout = 0;
    #TSET;
    check(ain != ain0, "control test, second state: ain transition");
    if (ain != ain0) n_ctl_b++;

    // Back to self-timed operation after a clear.
    do_clear();
    fork
      producer(20);
      consumer(20);
    join

    check(n_items > 0,   "mechanism: item transfers");
    check(n_full > 0,    "mechanism: pipeline full, producer waits");
    check(n_shift > 0,   "mechanism: scan shift");
    check(n_flush == 3,  "mechanism: latch test flushes");
    check(n_capture > 0, "mechanism: capture in normal mode");
    check(n_ctl_a > 0,   "mechanism: control test, first state");
    check(n_ctl_b > 0,   "mechanism: control test, second state");
    $display("items=%0d full_waits=%0d shifts=%0d flushes=%0d captures=%0d ctl1=%0d ctl2=%0d",
             n_items, n_full, n_shift, n_flush, n_capture, n_ctl_a, n_ctl_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
