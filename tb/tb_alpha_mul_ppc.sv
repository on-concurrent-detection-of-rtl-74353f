// Self-checking testbench for alpha_mul_ppc. For random A with its correct
// k-bit parity, the predicted parity must equal the actual parity of x*A mod F
// (reference model). Two configurations: the default GF(2^163), k = 8, where
// every part of F has even parity, and GF(2^233), k = 8, F = x^233+x^74+1,
// where parts 0 and 2 of F have odd parity so the reduction term is used.
// A flipped input parity bit must flip the same predicted bit (errors are
// carried, not repaired). The prediction is also checked for k = 1 and k = 7
// (unequal part lengths), and for the interleaved (vertical) partitioning:
// GF(2^163), k = 8 (parts 0, 3, 6, 7 of F odd), GF(2^233) with k = 8 and
// k = 7 (m not a multiple of k).
module tb_alpha_mul_ppc;
  import tb_ref_pkg::*;

  localparam int M2 = 233;
  localparam logic [M2-1:0] F2 = (M2'(1) << 74) | M2'(1);

  int checks = 0, failures = 0;
  int n_red = 0;
  logic [162:0] a1;
  logic [7:0] pa1, py1;
  logic [M2-1:0] a2;
  logic [7:0] pa2, py2;
  logic [0:0] pa3, py3;
  logic [6:0] pa4, py4;
  logic [7:0] pa5, py5, pa6, py6;
  logic [6:0] pa7, py7;
  vec_t f1, f2;

  alpha_mul_ppc dut1 (.a(a1), .pa(pa1), .py(py1));
  alpha_mul_ppc #(.M(M2), .K(8), .F(F2)) dut2 (.a(a2), .pa(pa2), .py(py2));
  alpha_mul_ppc #(.M(M2), .K(1), .F(F2)) dut3 (.a(a2), .pa(pa3), .py(py3));
  alpha_mul_ppc #(.M(M2), .K(7), .F(F2)) dut4 (.a(a2), .pa(pa4), .py(py4));
  alpha_mul_ppc #(.M(163), .K(8), .PART(pb_ced_pkg::PART_VERTICAL)) dut5 (.a(a1), .pa(pa5), .py(py5));
  alpha_mul_ppc #(.M(M2), .K(8), .F(F2), .PART(pb_ced_pkg::PART_VERTICAL)) dut6 (.a(a2), .pa(pa6), .py(py6));
  alpha_mul_ppc #(.M(M2), .K(7), .F(F2), .PART(pb_ced_pkg::PART_VERTICAL)) dut7 (.a(a2), .pa(pa7), .py(py7));

  task automatic run(input vec_t a, input int flip);
    vec_t y1, y2;
    logic [63:0] e1, e2, e3, e4, e5, e6, e7;
    a1 = a[162:0];
    a2 = a[M2-1:0];
    pa1 = ref_parity(vec_t'(a1), 163, 8);
    pa2 = ref_parity(vec_t'(a2), M2, 8);
    pa3 = ref_parity(vec_t'(a2), M2, 1);
    pa4 = ref_parity(vec_t'(a2), M2, 7);
    pa5 = ref_parity(vec_t'(a1), 163, 8, 1);
    pa6 = ref_parity(vec_t'(a2), M2, 8, 1);
    pa7 = ref_parity(vec_t'(a2), M2, 7, 1);
    if (flip >= 0) begin
      pa1[flip] = ~pa1[flip];
      pa2[flip] = ~pa2[flip];
    end
    #1;
    y1 = ref_xtime(vec_t'(a1), f1, 163);
    y2 = ref_xtime(vec_t'(a2), f2, M2);
    e1 = ref_parity(y1, 163, 8);
    e2 = ref_parity(y2, M2, 8);
    e3 = ref_parity(y2, M2, 1);
    e4 = ref_parity(y2, M2, 7);
    e5 = ref_parity(y1, 163, 8, 1);
    e6 = ref_parity(y2, M2, 8, 1);
    e7 = ref_parity(y2, M2, 7, 1);
    checks += 3;
    if (py5 !== e5[7:0]) begin failures++; $display("FAIL vertical m=163 a=%h", a1); end
    if (py6 !== e6[7:0]) begin failures++; $display("FAIL vertical m=233 k=8 a=%h", a2); end
    if (py7 !== e7[6:0]) begin failures++; $display("FAIL vertical m=233 k=7 a=%h", a2); end
    if (flip >= 0) begin
      e1[flip] = ~e1[flip];
      e2[flip] = ~e2[flip];
    end
    if (a2[M2-1]) n_red++;
    checks += 4;
    if (py1 !== e1[7:0]) begin failures++; $display("FAIL m=163 a=%h py=%h exp=%h", a1, py1, e1[7:0]); end
    if (py2 !== e2[7:0]) begin failures++; $display("FAIL m=233 a=%h py=%h exp=%h", a2, py2, e2[7:0]); end
    if (py3 !== e3[0:0]) begin failures++; $display("FAIL k=1 a=%h", a2); end
    if (py4 !== e4[6:0]) begin failures++; $display("FAIL k=7 a=%h", a2); end
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
    run(~vec_t'(0), -1);
    for (int n = 0; n < 400; n++) run(rand_vec(M2), -1);
    for (int n = 0; n < 200; n++) run(rand_vec(M2), int'($urandom_range(7)));
    checks++;
    if (n_red == 0) begin failures++; $display("FAIL reduction never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
