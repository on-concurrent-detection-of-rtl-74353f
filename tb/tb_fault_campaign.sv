// Stuck-at fault injection campaign on the GF(2^163), k = 8 multipliers with
// CED, after the scheme's own evaluation: faults are injected in one round
// of the bit-serial multiplier and one row of the bit-parallel multiplier.
//
// Fault sites are the m+k output bits of the alpha-Mul-P, SM-P and VA-P
// modules of that round/row, 3*(m+k) = 513 sites and 1026 single-bit
// stuck-at faults. For every operand pair, every single-bit fault is run,
// then NMULTI multiple-bit faults (random sites, each site enabled with
// probability 1/2, random stuck-at values).
//
// A fault is counted as causing an error when the product is wrong or the
// predicted and actual parities of any checked word disagree (the flag may
// legitimately rise for an error confined to parity bits). Checks:
//   - no flag and a correct product when the fault changes nothing;
//   - every single-bit fault that corrupts the product is flagged;
//   - the fraction of multiple-bit faults with a wrong product that are
//     flagged is at least 0.98 (the multiple parity code with k = 8 leaves
//     about 2^-8 of random error patterns undetected).
// NSER / NPAR operand pairs keep the run short; the published campaign used
// one million.
module tb_fault_campaign;
  import tb_ref_pkg::*;
  import pb_ced_pkg::*;

  localparam int M = 163;
  localparam int K = 8;
  localparam int W = M + K;
  localparam int NSER = 2;
  localparam int NPAR = 1;
  localparam int NMULTI = 300;

  int checks = 0, failures = 0;
  int cycle = 0;
  // [0] serial, [1] parallel; single-bit / multiple-bit
  int s_wrong [2], s_det_wrong [2], m_wrong [2], m_det_wrong [2], n_faults [2];

  logic clk = 0, rst_n = 0;
  logic load;
  logic [M-1:0] sa, sb, sc;
  fi_loc_e s_loc;
  logic [W-1:0] s_en, s_val;
  logic s_busy, s_done, s_error, s_err_now;
  logic [$clog2(M+1)-1:0] s_round;

  logic [M-1:0] pa, pb, pc, p_row_err;
  logic [$clog2(M)-1:0] p_row;
  fi_loc_e p_loc;
  logic [W-1:0] p_en, p_val;
  logic p_error;
  vec_t f;

  ced_serial_mult u_ser (
    .clk(clk), .rst_n(rst_n), .load(load), .a(sa), .b(sb),
    .fi_loc(s_loc), .fi_en(s_en), .fi_val(s_val),
    .c(sc), .busy(s_busy), .done(s_done), .error(s_error), .err_now(s_err_now), .round(s_round));

  ced_parallel_mult u_par (
    .a(pa), .b(pb), .fi_row(p_row), .fi_loc(p_loc), .fi_en(p_en), .fi_val(p_val),
    .c(pc), .error(p_error), .row_err(p_row_err));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    wait (cycle == 2000000);
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

  // score one faulty run of either multiplier
  task automatic score(input int which, input bit multi, input logic [M-1:0] c,
                       input logic err, input logic [M-1:0] exp_c, input logic changed);
    n_faults[which]++;
    if (!changed) begin
      checks++;
      if (err || c !== exp_c) begin
        failures++; $display("FAIL %0d: fault without effect changed the result", which);
      end
      return;
    end
    if (c !== exp_c) begin
      if (multi) begin
        m_wrong[which]++;
        if (err) m_det_wrong[which]++;
      end else begin
        s_wrong[which]++;
        if (err) s_det_wrong[which]++;
        checks++;
        if (!err) begin failures++; $display("FAIL %0d: single-bit fault not detected", which); end
      end
    end
  endtask

  // does the fault change the location's value at all? Observed on the
  // fault-free signal in front of the injection multiplexer.
  logic s_changed;

  task automatic ser_run(input vec_t av, input vec_t bv, input fi_loc_e loc, input int r,
                         input logic [W-1:0] en, input logic [W-1:0] val, input bit multi,
                         input logic [M-1:0] exp_c);
    @(negedge clk);
    sa = av[M-1:0]; sb = bv[M-1:0];
    load = 1;
    s_changed = 0;
    @(negedge clk);
    load = 0;
    while (!s_done) begin
      if (int'(s_round) == r) begin
        s_loc = loc; s_en = en; s_val = val;
        #1;
        case (loc)
          LOC_ALPHA: s_changed = (u_ser.u_mult.u_fi_l1.q != u_ser.u_mult.u_fi_l1.d);
          LOC_SM:    s_changed = (u_ser.u_mult.u_fi_l2.q != u_ser.u_mult.u_fi_l2.d);
          default:   s_changed = (u_ser.u_mult.u_fi_l3.q != u_ser.u_mult.u_fi_l3.d);
        endcase
      end else begin
        s_loc = LOC_NONE; s_en = '0; s_val = '0;
      end
      @(negedge clk);
    end
    s_loc = LOC_NONE; s_en = '0; s_val = '0;
    score(0, multi, sc, s_error, exp_c, s_changed);
  endtask

  task automatic par_run(input fi_loc_e loc, input logic [W-1:0] en, input logic [W-1:0] val,
                         input bit multi, input logic [M-1:0] exp_c, input logic [W-1:0] v);
    p_loc = loc; p_en = en; p_val = val;
    #1;
    score(1, multi, pc, p_error, exp_c, ((v & ~en) | (val & en)) != v);
  endtask

  // fault-free value {parity, data} of a location of row r (parallel)
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

  initial begin
    vec_t av, bv, pr;
    int r;
    logic [W-1:0] v [4];
    f = vec_t'(163'hC9);
    for (int i = 0; i < 2; i++) begin
      s_wrong[i] = 0; s_det_wrong[i] = 0; m_wrong[i] = 0; m_det_wrong[i] = 0; n_faults[i] = 0;
    end
    load = 0; sa = '0; sb = '0; s_loc = LOC_NONE; s_en = '0; s_val = '0;
    pa = '0; pb = '0; p_row = '0; p_loc = LOC_NONE; p_en = '0; p_val = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // bit-serial: one round r per operand pair (never the last, so that an
    // alpha-Mul-P fault can still reach the product)
    for (int n = 0; n < NSER; n++) begin
      av = rand_vec(M); bv = rand_vec(M);
      pr = ref_mul(av, bv, f, M);
      r = int'($urandom_range(M - 2));
      for (int l = 1; l <= 3; l++)
        for (int i = 0; i < W; i++)
          for (int sv = 0; sv < 2; sv++)
            ser_run(av, bv, fi_loc_e'(l), r, W'(1) << i, sv ? '1 : '0, 0, pr[M-1:0]);
      for (int t = 0; t < NMULTI; t++)
        ser_run(av, bv, fi_loc_e'(1 + t % 3), r, rnd_w(), rnd_w(), 1, pr[M-1:0]);
    end

    // bit-parallel: one row r per operand pair
    for (int n = 0; n < NPAR; n++) begin
      av = rand_vec(M); bv = rand_vec(M);
      pr = ref_mul(av, bv, f, M);
      r = int'($urandom_range(1, M - 1));
      pa = av[M-1:0]; pb = bv[M-1:0]; p_row = $clog2(M)'(r);
      for (int l = 1; l <= 3; l++) v[l] = loc_value(av, bv, fi_loc_e'(l), r);
      for (int l = 1; l <= 3; l++)
        for (int i = 0; i < W; i++)
          for (int sv = 0; sv < 2; sv++)
            par_run(fi_loc_e'(l), W'(1) << i, sv ? '1 : '0, 0, pr[M-1:0], v[l]);
      for (int t = 0; t < NMULTI; t++)
        par_run(fi_loc_e'(1 + t % 3), rnd_w(), rnd_w(), 1, pr[M-1:0], v[1 + t % 3]);
      p_loc = LOC_NONE; p_en = '0; p_val = '0;
    end

    for (int i = 0; i < 2; i++) begin
      $display("%s: faults run %0d; single-bit: %0d wrong products, %0d detected; multiple-bit: %0d wrong products, %0d detected (%0d ppm)",
               i ? "bit-parallel" : "bit-serial", n_faults[i], s_wrong[i], s_det_wrong[i],
               m_wrong[i], m_det_wrong[i],
               m_wrong[i] ? (m_det_wrong[i] * 1000000 / m_wrong[i]) : 0);
      checks += 2;
      if (s_wrong[i] == 0 || m_wrong[i] == 0) begin failures++; $display("FAIL no faults took effect"); end
      if (m_det_wrong[i] * 100 < m_wrong[i] * 98) begin failures++; $display("FAIL multiple-bit detection rate too low"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
