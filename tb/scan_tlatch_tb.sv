// scan_tlatch_tb: checks the scan transition latch in both polarities.
//
// Normal mode: the capture input follows the pass input after a bundling
// delay. After a pass transition the latch must be transparent (q follows
// din); after the capture transition it must hold the value din had then,
// whatever din does next, for many request events in a row.
// Scan mode: pass and capture are driven together as a scan clock; one
// pulse (away from the rest level and back) must shift the W-bit register
// sin -> bit 0 .. bit W-1 -> sout by one place, and at rest q must show the
// shifted contents. Compared with a reference shift register.
// Finally the test-mode hand-over: a value captured in normal mode must be
// kept through the switch to scan mode and come out of sout.
`timescale 1ps / 1ps
module scan_tlatch_tb;
  localparam int unsigned W = 8;
  localparam int unsigned BD = 500;   // bundling delay pass -> capture

  logic [W-1:0] din;
  logic         sin, scan;
  logic [1:0]   p, c;
  logic [W-1:0] q [2];
  logic [1:0]   sout;
  int checks = 0, failures = 0;

  scan_tlatch #(.W(W), .INV(1'b0)) u_e (.din(din), .sin(sin), .scan(scan), .p(p[0]), .c(c[0]),
                                        .q(q[0]), .sout(sout[0]));
  scan_tlatch #(.W(W), .INV(1'b1)) u_o (.din(din), .sin(sin), .scan(scan), .p(p[1]), .c(c[1]),
                                        .q(q[1]), .sout(sout[1]));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Normal-mode request event on latch k: pass, then capture after BD.
  task automatic event_k(input int k, input logic [W-1:0] v);
    din = v;
    #50;
    p[k] = ~p[k];
    #50;
    check(q[k] == v, $sformatf("latch %0d transparent after pass", k));
    din = ~v;
    #50;
    check(q[k] == ~v, $sformatf("latch %0d follows din", k));
    din = v;
    #(BD - 100);
    c[k] = ~c[k];
    #50;
    din = W'($urandom);
    #50;
    check(q[k] == v, $sformatf("latch %0d holds after capture", k));
  endtask

  // Scan clock pulse on latch k: rest level is 1 for INV=0 and 0 for INV=1.
  task automatic pulse_k(input int k);
    p[k] = ~p[k]; c[k] = ~c[k];
    #100;
    p[k] = ~p[k]; c[k] = ~c[k];
    #100;
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] r;
    logic [W-1:0] held;
    scan = 0; sin = 0; din = '0;
    p = 2'b00; c = 2'b00;            // opaque initial state (c == p)
    #100;
    for (int k = 0; k < 2; k++)
      for (int i = 0; i < 20; i++) event_k(k, W'($urandom));

    // Scan mode.
    for (int k = 0; k < 2; k++) begin
      p[k] = (k == 0); c[k] = (k == 0);   // rest level of the scan clock
      scan = 1;
      #100;
      r = q[k];                            // whatever the slave holds now
      for (int i = 0; i < 3 * W; i++) begin
        logic bi;
        bi  = 1'($urandom);
        sin = bi;
        #20;
        check(sout[k] == r[W-1], $sformatf("latch %0d sout before shift %0d", k, i));
        pulse_k(k);
        r = {r[W-2:0], bi};
        check(q[k] == r, $sformatf("latch %0d contents after shift %0d", k, i));
      end
      scan = 0;
      #100;
    end

    // Hand-over: capture in normal mode, switch to scan, read out.
    for (int k = 0; k < 2; k++) begin
      scan = 0;
      held = W'($urandom);
      event_k(k, held);                    // leaves the scan-clock rest level inverted
      #100;
      scan = 1;
      #100;
      din = W'($urandom);
      p[k] = ~p[k]; c[k] = ~c[k];          // back to the rest level
      #100;
      r = held;
      for (int i = 0; i < W; i++) begin
        check(sout[k] == r[W-1], $sformatf("latch %0d unload bit %0d", k, i));
        sin = 0;
        pulse_k(k);
        r = {r[W-2:0], 1'b0};
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
