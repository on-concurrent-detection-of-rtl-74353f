// Self-checking testbench for ced_serial_mult with the interleaved
// ("vertical") partitioning: part j holds bits j, j+k, j+2k, ... GF(2^163),
// k = 8, default F, for which parts 0, 3, 6 and 7 of F have odd parity so
// the reduction term of the alpha-Mul parity prediction is active.
// Same checks as the horizontal testbench: fault-free products, latency, and
// stuck-at faults in one round with the exact detection rule (an error is
// flagged exactly when one of its interleaved parts has odd weight) for
// SM-P and VA-P faults.
module tb_ced_serial_vertical;
  import tb_ref_pkg::*;
  import pb_ced_pkg::*;

  localparam int M = 163;
  localparam int K = 8;
  localparam int W = M + K;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_eff = 0, n_det = 0, n_esc = 0, n_odd = 0;
  logic clk = 0, rst_n = 0;
  logic load;
  logic [M-1:0] a, b, c;
  fi_loc_e fi_loc;
  logic [W-1:0] fi_en, fi_val;
  logic busy, done, error, err_now;
  logic [$clog2(M+1)-1:0] round;
  vec_t f;

  ced_serial_mult #(.PART(PART_VERTICAL)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .a(a), .b(b),
    .fi_loc(fi_loc), .fi_en(fi_en), .fi_val(fi_val),
    .c(c), .busy(busy), .done(done), .error(error), .err_now(err_now), .round(round));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    wait (cycle == 400000);
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

  // fault-free value {parity, data} at location loc in round r
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
      LOC_ALPHA: xr = ref_xtime(xr, f, M);
      LOC_SM:    xr = bv[r] ? xr : '0;
      default:   xr = s;
    endcase
    p = ref_parity(xr, M, K, 1);
    return {p[K-1:0], xr[M-1:0]};
  endfunction

  // one multiplication; a fault (loc != LOC_NONE) is applied in round r only
  task automatic run(input vec_t av, input vec_t bv, input fi_loc_e loc, input int r,
                     input logic [W-1:0] en, input logic [W-1:0] val);
    vec_t exp_c;
    logic [W-1:0] v, e;
    logic und;
    int n;
    @(negedge clk);
    a = av[M-1:0]; b = bv[M-1:0];
    fi_loc = LOC_NONE; fi_en = '0; fi_val = '0;
    load = 1;
    @(negedge clk);
    load = 0;
    n = 1;
    while (!done && n < 2 * M) begin
      if (loc != LOC_NONE && int'(round) == r) begin
        fi_loc = loc; fi_en = en; fi_val = val;
      end else begin
        fi_loc = LOC_NONE; fi_en = '0; fi_val = '0;
      end
      @(negedge clk);
      n++;
    end
    fi_loc = LOC_NONE; fi_en = '0; fi_val = '0;
    exp_c = ref_mul(av, bv, f, M);
    checks++;
    if (n != M + 1) begin failures++; $display("FAIL latency %0d", n); end
    if (loc == LOC_NONE) begin
      checks += 2;
      if (c !== exp_c[M-1:0]) begin failures++; $display("FAIL product"); end
      if (error !== 1'b0) begin failures++; $display("FAIL false alarm"); end
      return;
    end
    v = loc_value(av, bv, loc, r);
    e = v ^ ((v & ~en) | (val & en));
    und = ref_undetected(vec_t'(e[M-1:0]), 64'(e[W-1:M]), M, K, 1);
    if (e != 0) n_eff++;
    if (e != 0 && !und) n_odd++;
    if (e != 0 && error) n_det++;
    if (e != 0 && !error) n_esc++;
    if (loc == LOC_SM || loc == LOC_VA) begin
      checks += 2;
      if (error !== (e != 0 && !und)) begin
        failures++; $display("FAIL detect loc=%s r=%0d error=%0d", loc.name(), r, error);
      end
      if (c !== (exp_c[M-1:0] ^ e[M-1:0])) begin
        failures++; $display("FAIL faulty product loc=%s r=%0d", loc.name(), r);
      end
    end else begin
      if (e == 0 || r == M - 1) begin
        checks += 2;
        if (c !== exp_c[M-1:0]) begin failures++; $display("FAIL masked alpha fault changed c"); end
        if (error !== 1'b0) begin failures++; $display("FAIL masked alpha fault flagged"); end
      end else if (bv[r+1] && !und) begin
        checks++;
        if (error !== 1'b1) begin failures++; $display("FAIL alpha fault r=%0d missed", r); end
      end
    end
  endtask

  initial begin
    fi_loc_e loc;
    logic [W-1:0] en;
    int r;
    f = vec_t'(163'hC9);
    load = 0; a = '0; b = '0;
    fi_loc = LOC_NONE; fi_en = '0; fi_val = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 10; n++) run(rand_vec(M), rand_vec(M), LOC_NONE, 0, '0, '0);
    // single-bit stuck-at faults
    for (int n = 0; n < 120; n++) begin
      loc = fi_loc_e'(1 + n % 3);
      r = (n % 7 == 0) ? M - 1 : int'($urandom_range(M - 1));
      en = W'(1) << $urandom_range(W - 1);
      run(rand_vec(M), rand_vec(M), loc, r, en, rnd_w());
    end
    // multiple-bit stuck-at faults
    for (int n = 0; n < 120; n++) begin
      loc = fi_loc_e'(1 + n % 3);
      r = int'($urandom_range(M - 1));
      en = (n % 2 == 0) ? rnd_w() : (rnd_w() & rnd_w() & rnd_w() & rnd_w());
      run(rand_vec(M), rand_vec(M), loc, r, en, rnd_w());
    end
    $display("faults with an effect %0d, detected %0d, escaped %0d, odd-part patterns %0d",
             n_eff, n_det, n_esc, n_odd);
    checks++;
    if (n_det == 0 || n_eff == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
