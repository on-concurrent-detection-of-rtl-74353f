// End-to-end testbench for pb_ced_top at its default parameters
// (GF(2^163), k = 8, F = x^163+x^7+x^6+x^3+1). The bit-serial and the
// bit-parallel multipliers run side by side on their own operands.
//
// Each mechanism of the design is made to happen and counted; one that never
// happens is a failure:
//   ser_encode   operand parity produced by the shared generator in a load
//   ser_sm_zero  a round with b_i = 0 (SM-P output forced to zero)
//   ser_sm_pass  a round with b_i = 1
//   ser_reduce   a round whose alpha-Mul-P reduces (a_{m-1} = 1)
//   ser_restart  a load while a multiplication is running
//   ser_detect   an injected error flagged, with the product corrupted
//   ser_escape   an error with even weight in every part, not flagged, as the
//                multiple parity code predicts
//   par_product  a fault-free product with no checker firing
//   par_detect   an injected error flagged by the row checkers
//   par_escape   an even-in-every-part error, not flagged
// Products are compared with an independent reference; the serial latency is
// m cycles after the load cycle.
module tb_pb_ced_top;
  import tb_ref_pkg::*;
  import pb_ced_pkg::*;

  localparam int M = 163;
  localparam int K = 8;
  localparam int W = M + K;

  int checks = 0, failures = 0;
  int cycle = 0;
  int ser_encode = 0, ser_sm_zero = 0, ser_sm_pass = 0, ser_reduce = 0, ser_restart = 0;
  int ser_detect = 0, ser_escape = 0, par_product = 0, par_detect = 0, par_escape = 0;

  logic clk = 0, rst_n = 0;
  logic ser_load;
  logic [M-1:0] ser_a, ser_b, ser_c;
  fi_loc_e ser_fi_loc;
  logic [W-1:0] ser_fi_en, ser_fi_val;
  logic ser_busy, ser_done, ser_error, ser_err_now;
  logic [$clog2(M+1)-1:0] ser_round;
  logic [M-1:0] par_a, par_b, par_c, par_row_err;
  logic [$clog2(M)-1:0] par_fi_row;
  fi_loc_e par_fi_loc;
  logic [W-1:0] par_fi_en, par_fi_val;
  logic par_error;
  vec_t f;

  pb_ced_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    wait (cycle == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters observed on the running serial datapath
  always @(posedge clk) if (rst_n) begin
    if (ser_load) ser_encode++;
    if (ser_load && ser_busy) ser_restart++;
    if (ser_busy && !ser_load) begin
      if (dut.u_serial.u_mult.b_q[0]) ser_sm_pass++; else ser_sm_zero++;
      if (dut.u_serial.u_mult.d_q[M-1]) ser_reduce++;
    end
  end

  // fault-free value {parity, data} of the VA-P output after round / row r
  function automatic logic [W-1:0] va_value(input vec_t av, input vec_t bv, input int r);
    vec_t xr, s;
    logic [63:0] p;
    xr = av;
    s = '0;
    for (int t = 0; t <= r; t++) begin
      if (bv[t]) s ^= xr;
      xr = ref_xtime(xr, f, M);
    end
    p = ref_parity(s, M, K);
    return {p[K-1:0], s[M-1:0]};
  endfunction

  // serial multiplication, optionally with a VA-P fault in round r;
  // abort_after >= 0 abandons it after that many cycles
  task automatic ser_run(input vec_t av, input vec_t bv, input int r,
                         input logic [W-1:0] en, input logic [W-1:0] val,
                         input int abort_after);
    vec_t exp_c;
    logic [W-1:0] e;
    logic expect_err;
    int n;
    ser_a = av[M-1:0]; ser_b = bv[M-1:0];
    ser_load = 1;
    @(negedge clk);
    ser_load = 0;
    n = 1;
    while (!ser_done && n < 2 * M) begin
      if (n == abort_after) return;
      if (r >= 0 && int'(ser_round) == r) begin
        ser_fi_loc = LOC_VA; ser_fi_en = en; ser_fi_val = val;
      end else begin
        ser_fi_loc = LOC_NONE; ser_fi_en = '0; ser_fi_val = '0;
      end
      @(negedge clk);
      n++;
    end
    ser_fi_loc = LOC_NONE; ser_fi_en = '0; ser_fi_val = '0;
    exp_c = ref_mul(av, bv, f, M);
    e = '0;
    if (r >= 0) begin
      logic [W-1:0] v;
      v = va_value(av, bv, r);
      e = v ^ ((v & ~en) | (val & en));
    end
    expect_err = (e != 0) && !ref_undetected(vec_t'(e[M-1:0]), 64'(e[W-1:M]), M, K);
    checks += 3;
    if (n != M + 1) begin failures++; $display("FAIL serial latency %0d", n); end
    if (ser_c !== (exp_c[M-1:0] ^ e[M-1:0])) begin failures++; $display("FAIL serial product"); end
    if (ser_error !== expect_err) begin failures++; $display("FAIL serial error flag"); end
    if (e != 0 && ser_error) ser_detect++;
    if (e[M-1:0] != 0 && !ser_error) ser_escape++;
  endtask

  task automatic par_run(input vec_t av, input vec_t bv, input int r,
                         input logic [W-1:0] en, input logic [W-1:0] val);
    vec_t exp_c;
    logic [W-1:0] e;
    logic expect_err;
    par_a = av[M-1:0]; par_b = bv[M-1:0];
    par_fi_loc = (r >= 0) ? LOC_VA : LOC_NONE;
    par_fi_row = (r >= 0) ? $clog2(M)'(r) : '0;
    par_fi_en = en; par_fi_val = val;
    #1;
    exp_c = ref_mul(av, bv, f, M);
    e = '0;
    if (r >= 0) begin
      logic [W-1:0] v;
      v = va_value(av, bv, r);
      e = v ^ ((v & ~en) | (val & en));
    end
    expect_err = (e != 0) && !ref_undetected(vec_t'(e[M-1:0]), 64'(e[W-1:M]), M, K);
    checks += 2;
    if (par_c !== (exp_c[M-1:0] ^ e[M-1:0])) begin failures++; $display("FAIL parallel product"); end
    if (par_error !== expect_err) begin failures++; $display("FAIL parallel error flag"); end
    if (r < 0 && !par_error) par_product++;
    if (e != 0 && par_error) par_detect++;
    if (e[M-1:0] != 0 && !par_error) par_escape++;
    par_fi_loc = LOC_NONE; par_fi_en = '0; par_fi_val = '0;
  endtask

  initial begin
    vec_t av, bv;
    logic [W-1:0] v, en, val;
    f = vec_t'(163'hC9);
    ser_load = 0; ser_a = '0; ser_b = '0;
    ser_fi_loc = LOC_NONE; ser_fi_en = '0; ser_fi_val = '0;
    par_a = '0; par_b = '0; par_fi_row = '0;
    par_fi_loc = LOC_NONE; par_fi_en = '0; par_fi_val = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // fault-free operation of both multipliers
    par_run(rand_vec(M), rand_vec(M), -1, '0, '0);
    ser_run(rand_vec(M), rand_vec(M), -1, '0, '0, -1);
    ser_run(rand_vec(M), rand_vec(M), -1, '0, '0, 50);        // abandoned
    ser_run(rand_vec(M), rand_vec(M), -1, '0, '0, -1);        // restarts it

    // odd-weight error (one data bit flipped) in round / row 40: detected
    av = rand_vec(M); bv = rand_vec(M);
    v = va_value(av, bv, 40);
    en = W'(1) << 5;
    val = ~v;
    ser_run(av, bv, 40, en, val, -1);
    par_run(av, bv, 40, en, val);

    // two flipped bits in the same part (bits 3 and 9 of part 0): even weight
    // in every part, so no checker can see it
    av = rand_vec(M); bv = rand_vec(M);
    v = va_value(av, bv, 100);
    en = (W'(1) << 3) | (W'(1) << 9);
    val = ~v;
    ser_run(av, bv, 100, en, val, -1);
    par_run(av, bv, 100, en, val);

    // random multiple-bit faults
    for (int n = 0; n < 4; n++) begin
      av = rand_vec(M); bv = rand_vec(M);
      en = W'(rand_vec(W)); val = W'(rand_vec(W));
      ser_run(av, bv, int'($urandom_range(M - 1)), en, val, -1);
      par_run(av, bv, int'($urandom_range(M - 1)), en, val);
    end

    $display("ser_encode=%0d ser_sm_zero=%0d ser_sm_pass=%0d ser_reduce=%0d ser_restart=%0d",
             ser_encode, ser_sm_zero, ser_sm_pass, ser_reduce, ser_restart);
    $display("ser_detect=%0d ser_escape=%0d par_product=%0d par_detect=%0d par_escape=%0d",
             ser_detect, ser_escape, par_product, par_detect, par_escape);
    checks += 10;
    if (ser_encode == 0)  begin failures++; $display("FAIL no operand encoding"); end
    if (ser_sm_zero == 0) begin failures++; $display("FAIL no b_i = 0 round"); end
    if (ser_sm_pass == 0) begin failures++; $display("FAIL no b_i = 1 round"); end
    if (ser_reduce == 0)  begin failures++; $display("FAIL no reduction"); end
    if (ser_restart == 0) begin failures++; $display("FAIL no restart"); end
    if (ser_detect == 0)  begin failures++; $display("FAIL no serial detection"); end
    if (ser_escape == 0)  begin failures++; $display("FAIL no serial escape"); end
    if (par_product == 0) begin failures++; $display("FAIL no parallel product"); end
    if (par_detect == 0)  begin failures++; $display("FAIL no parallel detection"); end
    if (par_escape == 0)  begin failures++; $display("FAIL no parallel escape"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
