// bundle_delay_tb: checks that the delay element repeats each input
// transition exactly DELAY_PS later and not earlier.
`timescale 1ps / 1ps
module bundle_delay_tb;
  localparam int unsigned D = 3630;
  logic a, y;
  int checks = 0, failures = 0;

  bundle_delay #(.DELAY_PS(D)) dut (.a(a), .y(y));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 0;
    #(2 * D);
    check(y == 1'b0, "initial");
    for (int i = 0; i < 20; i++) begin
      a = ~a;
      #(D - 1);
      check(y != a, "too early");
      #1;
      check(y == a, "on time");
      #($urandom_range(D, 3 * D));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
