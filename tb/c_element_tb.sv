// c_element_tb: checks the scan C-element against a behavioural rule.
//
// Random sequences of a, b, scan and clr are applied; after each step z is
// compared with a reference state updated by the rules: clear gives 0, scan
// gives ~a, otherwise the state takes b when b equals ~a and holds when they
// differ. A directed sequence first walks through a two-phase handshake.
`timescale 1ps / 1ps
module c_element_tb;
  logic a, b, scan, clr, z;
  logic ref_z;
  int checks = 0, failures = 0;
  int n_hold = 0, n_fire = 0, n_scan = 0, n_clr = 0;

  c_element dut (.a(a), .b(b), .scan(scan), .clr(clr), .z(z));

  task automatic step(input logic na, input logic nb, input logic ns, input logic nc);
    a = na; b = nb; scan = ns; clr = nc;
    #10;
    if (nc) begin ref_z = 1'b0; n_clr++; end
    else if (ns) begin ref_z = ~na; n_scan++; end
    else if (nb == ~na) begin
      if (ref_z != nb) n_fire++;
      ref_z = nb;
    end else n_hold++;
    checks++;
    if (z !== ref_z) begin
      failures++;
      $display("FAIL a=%b b=%b scan=%b clr=%b z=%b expected %b", na, nb, ns, nc, z, ref_z);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    step(0, 0, 0, 1);         // clear
    step(0, 0, 0, 0);         // b=0, ~a=1: hold 0
    step(0, 1, 0, 0);         // request, next stage free: fire to 1
    step(1, 1, 0, 0);         // next stage acknowledges: hold 1
    step(1, 0, 0, 0);         // new request: fire to 0
    step(0, 0, 0, 0);         // hold 0
    step(0, 0, 1, 0);         // scan: z = ~a = 1
    step(1, 0, 1, 0);         // scan: z = 0
    step(1, 1, 0, 0);         // normal, b=1 ~a=0: hold
    for (int i = 0; i < 2000; i++)
      step(1'($urandom), 1'($urandom), ($urandom % 5) == 0, ($urandom % 23) == 0);
    checks++;
    if (n_hold == 0 || n_fire == 0 || n_scan == 0 || n_clr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
