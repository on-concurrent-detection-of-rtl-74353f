// Self-checking testbench for ced_parallel_mult (default GF(2^163), k = 8).
//
// 1. Fault-free products: reference product, no checker fires.
// 2. Stuck-at faults at one location of one row r (alpha-Mul-P, SM-P or
//    VA-P output), single-bit and random multiple-bit. The fault-free value
//    of the location comes from the reference model (x^r*A, b_r*x^r*A or
//    sum_{t<=r} b_t*x^t*A, with its parity), hence the error pattern e.
//    Expected:
//    - SM-P / VA-P: the checkers of rows r .. m-1 fire exactly when some part
//      of e has odd weight, those of rows < r never; product = reference +
//      data part of e.
//    - alpha-Mul-P: rows < r never fire; e = 0 gives a correct, unflagged
//      product; if b_r = 1 and e has an odd part, the row-r checker fires.
module tb_ced_parallel_mult;
  import tb_ref_pkg::*;
  import pb_ced_pkg::*;

  localparam int M = 163;
  localparam int K = 8;
  localparam int W = M + K;

  int checks = 0, failures = 0;
  int n_eff = 0, n_det = 0;
  logic [M-1:0] a, b, c, row_err;
  logic [$clog2(M)-1:0] fi_row;
  fi_loc_e fi_loc;
  logic [W-1:0] fi_en, fi_val;
  logic error;
  vec_t f;

  ced_parallel_mult dut (
    .a(a), .b(b), .fi_row(fi_row), .fi_loc(fi_loc), .fi_en(fi_en), .fi_val(fi_val),
    .c(c), .error(error), .row_err(row_err));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] rnd_w();
    vec_t r;
    r = rand_vec(W);
    return r[W-1:0];
  endfunction

  function automatic logic [W-1:0] loc_value(input vec_t av, input vec_t bv,
                                             input fi_loc_e loc, input int r);
    vec_t xr, s;
    logic [63:0] p;
    xr = av;
    s = '0;
    for (int t = 0; t <= r; t++) begin
      if (bv[t]) s ^= xr;
      if (t < r) xr = ref_xtime(xr, f, M);
    end
    case (loc)
      LOC_ALPHA: ;
      LOC_SM:    xr = bv[r] ? xr : '0;
      default:   xr = s;
    endcase
    p = ref_parity(xr, M, K);
    return {p[K-1:0], xr[M-1:0]};
  endfunction

  task automatic run(input vec_t av, input vec_t bv, input fi_loc_e loc, input int r,
                     input logic [W-1:0] en, input logic [W-1:0] val);
    vec_t exp_c;
    logic [W-1:0] v, e;
    logic [M-1:0] lo_mask, hi_mask;
    logic und;
    a = av[M-1:0]; b = bv[M-1:0];
    fi_loc = loc; fi_row = $clog2(M)'(r); fi_en = en; fi_val = val;
    #1;
    exp_c = ref_mul(av, bv, f, M);
    if (loc == LOC_NONE) begin
      checks += 3;
      if (c !== exp_c[M-1:0]) begin failures++; $display("FAIL product"); end
      if (error !== 1'b0 || row_err !== '0) begin failures++; $display("FAIL false alarm"); end
      return;
    end
    v = loc_value(av, bv, loc, r);
    e = v ^ ((v & ~en) | (val & en));
    und = ref_undetected(vec_t'(e[M-1:0]), 64'(e[W-1:M]), M, K);
    lo_mask = (M'(1) << r) - 1'b1;
    hi_mask = ~lo_mask;
    if (e != 0) n_eff++;
    if (e != 0 && error) n_det++;
    checks++;
    if ((row_err & lo_mask) !== '0) begin failures++; $display("FAIL checker before row %0d fired", r); end
    if (loc == LOC_SM || loc == LOC_VA) begin
      checks += 3;
      if (row_err !== ((e != 0 && !und) ? hi_mask : '0)) begin
        failures++; $display("FAIL row_err loc=%s r=%0d", loc.name(), r);
      end
      if (error !== (e != 0 && !und)) begin failures++; $display("FAIL error loc=%s r=%0d", loc.name(), r); end
      if (c !== (exp_c[M-1:0] ^ e[M-1:0])) begin failures++; $display("FAIL faulty product"); end
    end else if (e == 0) begin
      checks += 2;
      if (c !== exp_c[M-1:0]) begin failures++; $display("FAIL masked alpha fault changed c"); end
      if (error !== 1'b0) begin failures++; $display("FAIL masked alpha fault flagged"); end
    end else if (bv[r] && !und) begin
      checks++;
      if (row_err[r] !== 1'b1) begin failures++; $display("FAIL alpha fault row %0d missed", r); end
    end
  endtask

  initial begin
    fi_loc_e loc;
    logic [W-1:0] en;
    f = vec_t'(163'hC9);
    for (int n = 0; n < 10; n++) run(rand_vec(M), rand_vec(M), LOC_NONE, 0, '0, '0);
    for (int n = 0; n < 150; n++) begin
      loc = fi_loc_e'(1 + n % 3);
      en = W'(1) << $urandom_range(W - 1);
      run(rand_vec(M), rand_vec(M), loc, int'($urandom_range(M - 1)), en, rnd_w());
    end
    for (int n = 0; n < 150; n++) begin
      loc = fi_loc_e'(1 + n % 3);
      en = (n % 2 == 0) ? rnd_w() : (rnd_w() & rnd_w() & rnd_w() & rnd_w());
      run(rand_vec(M), rand_vec(M), loc, int'($urandom_range(M - 1)), en, rnd_w());
    end
    $display("faults with an effect %0d, detected %0d", n_eff, n_det);
    checks++;
    if (n_det == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
