// Self-checking testbench for alpha_mul_p: applies the module repeatedly
// (A, alpha*A, alpha^2*A, ...) as the multiplier's alpha chain does, and at
// every step compares the data with x^i*A mod F and the carried parity with
// the parity of that value. Default GF(2^163) and GF(2^233) with
// F = x^233+x^74+1.
module tb_alpha_mul_p;
  import tb_ref_pkg::*;

  localparam int M2 = 233;
  localparam logic [M2-1:0] F2 = (M2'(1) << 74) | M2'(1);

  int checks = 0, failures = 0;
  logic [162:0] a1, y1;
  logic [7:0] pa1, py1;
  logic [M2-1:0] a2, y2;
  logic [7:0] pa2, py2;
  vec_t f1, f2;

  alpha_mul_p dut1 (.a(a1), .pa(pa1), .y(y1), .py(py1));
  alpha_mul_p #(.M(M2), .K(8), .F(F2)) dut2 (.a(a2), .pa(pa2), .y(y2), .py(py2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t r1, r2;
    logic [63:0] p1, p2;
    f1 = vec_t'(163'hC9);
    f2 = vec_t'(F2);
    for (int n = 0; n < 8; n++) begin
      r1 = rand_vec(163);
      r2 = rand_vec(M2);
      a1 = r1[162:0];
      a2 = r2[M2-1:0];
      p1 = ref_parity(r1, 163, 8);
      p2 = ref_parity(r2, M2, 8);
      pa1 = p1[7:0];
      pa2 = p2[7:0];
      for (int i = 0; i < 300; i++) begin
        #1;
        r1 = ref_xtime(r1, f1, 163);
        r2 = ref_xtime(r2, f2, M2);
        p1 = ref_parity(r1, 163, 8);
        p2 = ref_parity(r2, M2, 8);
        checks += 2;
        if (y1 !== r1[162:0] || py1 !== p1[7:0]) begin
          failures++; $display("FAIL m=163 step %0d", i);
        end
        if (y2 !== r2[M2-1:0] || py2 !== p2[7:0]) begin
          failures++; $display("FAIL m=233 step %0d", i);
        end
        a1 = y1; pa1 = py1;
        a2 = y2; pa2 = py2;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
