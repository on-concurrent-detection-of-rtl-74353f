// Self-checking testbench for parallel_mult_ppc (combinational), in the
// default GF(2^163), k = 8, and in GF(2^233), k = 8, F = x^233+x^74+1. For
// random operands (parity supplied from the reference model) every row's
// partial sum s[i] must equal sum_{t<=i} b_t*x^t*A mod F and its carried
// parity ps[i] the actual parity of s[i]; s[m-1] is the product, compared
// with the independent Horner-order reference product.
module tb_parallel_mult_ppc;
  import tb_ref_pkg::*;
  import pb_ced_pkg::*;

  localparam int M1 = 163;
  localparam int M2 = 233;
  localparam logic [M2-1:0] F2 = (M2'(1) << 74) | M2'(1);

  int checks = 0, failures = 0;
  logic [M1-1:0] a1, b1;
  logic [7:0] pa1;
  logic [M1-1:0] s1 [M1];
  logic [7:0] ps1 [M1];
  logic [M2-1:0] a2, b2;
  logic [7:0] pa2;
  logic [M2-1:0] s2 [M2];
  logic [7:0] ps2 [M2];

  parallel_mult_ppc dut1 (
    .a(a1), .pa(pa1), .b(b1), .fi_row('0), .fi_loc(LOC_NONE), .fi_en('0), .fi_val('0),
    .s(s1), .ps(ps1));
  parallel_mult_ppc #(.M(M2), .K(8), .F(F2)) dut2 (
    .a(a2), .pa(pa2), .b(b2), .fi_row('0), .fi_loc(LOC_NONE), .fi_en('0), .fi_val('0),
    .s(s2), .ps(ps2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input vec_t av, input vec_t bv, input vec_t f, input int m, input bit second);
    vec_t xr, s, prod;
    logic [63:0] p;
    int bad;
    p = ref_parity(av, m, 8);
    if (second) begin a2 = av[M2-1:0]; b2 = bv[M2-1:0]; pa2 = p[7:0]; end
    else        begin a1 = av[M1-1:0]; b1 = bv[M1-1:0]; pa1 = p[7:0]; end
    #1;
    xr = av;
    s = '0;
    bad = 0;
    for (int i = 0; i < m; i++) begin
      if (bv[i]) s ^= xr;
      xr = ref_xtime(xr, f, m);
      p = ref_parity(s, m, 8);
      if (second) begin
        if (s2[i] !== s[M2-1:0] || ps2[i] !== p[7:0]) bad++;
      end else begin
        if (s1[i] !== s[M1-1:0] || ps1[i] !== p[7:0]) bad++;
      end
    end
    prod = ref_mul(av, bv, f, m);
    checks += 2;
    if (bad != 0) begin failures++; $display("FAIL m=%0d: %0d rows wrong", m, bad); end
    if (second ? (s2[M2-1] !== prod[M2-1:0]) : (s1[M1-1] !== prod[M1-1:0])) begin
      failures++; $display("FAIL m=%0d product", m);
    end
  endtask

  initial begin
    run(~vec_t'(0) >> (1024 - M1), ~vec_t'(0) >> (1024 - M1), vec_t'(163'hC9), M1, 0);
    for (int n = 0; n < 15; n++) run(rand_vec(M1), rand_vec(M1), vec_t'(163'hC9), M1, 0);
    for (int n = 0; n < 10; n++) run(rand_vec(M2), rand_vec(M2), vec_t'(F2), M2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
