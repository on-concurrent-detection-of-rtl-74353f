// Self-checking testbench for alpha_mul: random operands, and the corner
// operands 0, 1, x^(m-1) and all-ones, in two configurations: the default
// GF(2^163) with F = x^163+x^7+x^6+x^3+1, and GF(2^233) with F = x^233+x^74+1.
// Each output is compared with x*A mod F from the reference package.
module tb_alpha_mul;
  import tb_ref_pkg::*;

  localparam int M2 = 233;
  localparam logic [M2-1:0] F2 = (M2'(1) << 74) | M2'(1);

  int checks = 0, failures = 0;
  logic [162:0] a1, y1;
  logic [M2-1:0] a2, y2;
  vec_t f1, f2;

  alpha_mul dut1 (.a(a1), .y(y1));
  alpha_mul #(.M(M2), .K(8), .F(F2)) dut2 (.a(a2), .y(y2));

  task automatic check1(input vec_t a);
    vec_t exp1, exp2;
    a1 = a[162:0];
    a2 = a[M2-1:0];
    #1;
    exp1 = ref_xtime(vec_t'(a1), f1, 163);
    exp2 = ref_xtime(vec_t'(a2), f2, M2);
    checks += 2;
    if (y1 !== exp1[162:0]) begin failures++; $display("FAIL m=163 a=%h", a1); end
    if (y2 !== exp2[M2-1:0]) begin failures++; $display("FAIL m=233 a=%h", a2); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    f1 = vec_t'(163'hC9);
    f2 = vec_t'(F2);
    check1('0);
    check1(vec_t'(1));
    check1(vec_t'(1) << 162);
    check1(vec_t'(1) << 232);
    check1(~vec_t'(0));
    for (int n = 0; n < 500; n++) check1(rand_vec(M2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
