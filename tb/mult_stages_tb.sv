// mult_stages_tb: exhaustive test of the multiplier's processing stages.
//
// Every operand pair is pushed through stage0 -> stage1 -> stage2 ->
// stage3 -> stage4 (stage2 and stage3 being the same module), and each
// stage's output is compared with a column-count reference model; the
// product must equal a*b and cout must be 0. Each stage is also fed random
// bundles that the array never produces, so the logic is checked beyond the
// reachable values.
`timescale 1ps / 1ps
module mult_stages_tb;
  import mp_pkg::*;
  import mp_ref_pkg::*;

  logic [3:0] a, b;
  l0_t x0, y0;
  l1_t x1, y1;
  l2_t x2, y2;
  l3_t x3, y3;
  l4_t prod;
  logic cout;
  int checks = 0, failures = 0;

  mult_stage0 u_s0 (.a(a), .b(b), .y(y0));
  mult_stage1 u_s1 (.x(x0), .y(y1));
  mult_stage23 u_s2 (.a(x1.a), .bi(x1.b[2]), .s_in(x1.s), .c_in(x1.c),
                     .p_out(y2.p[2]), .s_out(y2.s), .c_out(y2.c));
  assign y2.a = x1.a;
  assign y2.b3 = x1.b[3];
  assign y2.p[1:0] = x1.p;
  mult_stage23 u_s3 (.a(x2.a), .bi(x2.b3), .s_in(x2.s), .c_in(x2.c),
                     .p_out(y3.p[3]), .s_out(y3.s), .c_out(y3.c));
  assign y3.p[2:0] = x2.p;
  mult_stage4 u_s4 (.x(x3), .prod(prod), .cout(cout));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic check_all();
    logic [8:0] r4;
    #1;
    check(y0 == ref_stage0(a, b), $sformatf("stage0 a=%0d b=%0d", a, b));
    check(y1 == ref_stage1(x0), $sformatf("stage1 %h", x0));
    check(y2 == ref_stage2(x1), $sformatf("stage2 %h", x1));
    check(y3 == ref_stage3(x2), $sformatf("stage3 %h", x2));
    r4 = ref_stage4(x3);
    check({cout, prod} == r4, $sformatf("stage4 %h", x3));
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a = 4'(i); b = 4'(i >> 4);
      x0 = ref_stage0(a, b);
      x1 = ref_stage1(x0);
      x2 = ref_stage2(x1);
      x3 = ref_stage3(x2);
      check_all();
      check({cout, prod} == 9'(a * b), $sformatf("product %0d*%0d", a, b));
    end
    for (int i = 0; i < 2000; i++) begin
      a = 4'($urandom); b = 4'($urandom);
      x0 = l0_t'($urandom);
      x1 = l1_t'($urandom);
      x2 = l2_t'($urandom);
      x3 = l3_t'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
