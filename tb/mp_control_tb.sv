// mp_control_tb: checks the micropipeline control network on its own.
//
// Normal mode, with a producer on rin/ain and a consumer on rout/aout:
//  * latency: an event on rin reaches rout after
//    N x (stage + C-element + latch delay) in an empty pipeline;
//  * capacity: with the consumer stalled exactly N requests are accepted
//    (acknowledged on ain) and request N+1 is not;
//  * order: after each pass[k] event the latch's capture follows exactly
//    LATCH_DLY_PS later;
//  * conservation: every request comes out once, under random speeds.
// Scan mode: an aout edge must reach pass[N-1] first and pass[0] last, at
// fixed intervals, each pass[k] = ~cap[k+1] (~aout for the last stage).
// Clear: all outputs return to 0.
`timescale 1ps / 1ps
module mp_control_tb;
  localparam int unsigned N  = 5;
  localparam int unsigned LD = 3630;
  localparam int unsigned CD = 2250;
  localparam int unsigned SD = 5000;
  localparam int unsigned TSET = 60000;

  logic clr, scan, rin, ain, rout, aout;
  logic [N-1:0] pass, cap;
  int checks = 0, failures = 0;
  int n_in = 0, n_out = 0;

  mp_control #(.N(N), .LATCH_DLY_PS(LD), .CEL_DLY_PS(CD), .STAGE_DLY_PS(SD)) dut (
    .clr(clr), .scan(scan), .rin(rin), .ain(ain), .rout(rout), .aout(aout),
    .pass(pass), .cap(cap));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Capture follows pass by exactly LD.
  for (genvar k = 0; k < N; k++) begin : g_mon
    time tp = 0;
    always @(posedge pass[k] or negedge pass[k]) tp = $time;
    always @(posedge cap[k] or negedge cap[k]) if (!clr) check(cap[k] == pass[k] && $time - tp == time'(LD),
                                      $sformatf("stage %0d capture %0t after pass", k, $time - tp));
  end

  task automatic do_clear();
    scan = 0; rin = 0; aout = 0; clr = 1;
    #TSET;
    check(pass == '0 && cap == '0 && ain == 0 && rout == 0, "cleared");
    clr = 0;
    #TSET;
  endtask

  initial begin
    #(64'd1_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    time t0;
    do_clear();

    // Latency of an empty pipeline.
    t0 = $time;
    rin = 1;
    wait (rout == 1);
    check($time - t0 == time'(N * (SD + CD + LD)), $sformatf("latency %0t", $time - t0));
    aout = 1;
    #TSET;
    check(ain == rin, "first item acknowledged");

    // Capacity: consumer stalled, N items accepted, N+1st not.
    for (int i = 0; i < N; i++) begin
      rin = ~rin;
      #TSET;
      check(ain == rin, $sformatf("item %0d accepted", i));
    end
    rin = ~rin;
    #TSET;
    check(ain != rin, "item N+1 held back while the pipeline is full");
    check(rout != aout, "output request pending");
    // Drain: N+1 items leave, one per acknowledge.
    for (int i = 0; i <= N; i++) begin
      wait (rout != aout);
      #1000;
      aout = ~aout;
      #TSET;
    end
    check(rout == aout && ain == rin, "drained");

    // Conservation under random speeds.
    fork
      for (int i = 0; i < 100; i++) begin
        wait (ain == rin);
        #($urandom_range(0, 20000));
        rin = ~rin;
        n_in++;
      end
      for (int i = 0; i < 100; i++) begin
        wait (rout != aout);
        #($urandom_range(0, 40000));
        aout = ~aout;
        n_out++;
      end
    join
    #TSET;
    check(n_in == 100 && n_out == 100 && rout == aout && ain == rin, "all items through");

    // Scan mode: the scan clock runs from aout back to ain.
    scan = 1;
    #TSET;
    for (int e = 0; e < 4; e++) begin
      logic [N-1:0] prev_pass;
      prev_pass = pass;
      t0 = $time;
      aout = ~aout;
      for (int k = N - 1; k >= 0; k--) begin
        wait (pass[k] != prev_pass[k]);
        check($time - t0 == time'((N - k) * CD + (N - 1 - k) * LD),
              $sformatf("scan clock reaches stage %0d at %0t", k, $time - t0));
      end
      #TSET;
      for (int k = 0; k < N; k++)
        check(pass[k] == ~((k == N - 1) ? aout : cap[k+1]), $sformatf("scan level stage %0d", k));
    end

    do_clear();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
