// Self-checking testbench for serial_mult_ppc, in two configurations: the
// default GF(2^163), k = 8, and GF(2^233), k = 8, F = x^233+x^74+1 with the
// interleaved (vertical) partitioning (233 is not a multiple of 8). The
// operand parity is supplied from the reference model.
// Checks, per random product: done exactly m cycles after the load cycle,
// product equal to the reference, and in every cycle after the load the
// carried parity pc equal to the actual parity of c. A load during a running
// multiplication must restart it cleanly.
module tb_serial_mult_ppc;
  import tb_ref_pkg::*;
  import pb_ced_pkg::*;

  localparam int M1 = 163;
  localparam int M2 = 233;
  localparam logic [M2-1:0] F2 = (M2'(1) << 74) | M2'(1);

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_restart = 0;
  logic clk = 0, rst_n = 0;

  logic load1, load2;
  logic [M1-1:0] a1, b1, c1;
  logic [M2-1:0] a2, b2, c2;
  logic [7:0] pa1, pa2, pc1, pc2;
  logic busy1, done1, chk1, busy2, done2, chk2;
  logic [$clog2(M1+1)-1:0] rnd1;
  logic [$clog2(M2+1)-1:0] rnd2;

  serial_mult_ppc dut1 (
    .clk(clk), .rst_n(rst_n), .load(load1), .a(a1), .pa(pa1), .b(b1),
    .fi_loc(LOC_NONE), .fi_en('0), .fi_val('0),
    .c(c1), .pc(pc1), .busy(busy1), .done(done1), .chk_en(chk1), .round(rnd1));

  serial_mult_ppc #(.M(M2), .K(8), .F(F2), .PART(PART_VERTICAL)) dut2 (
    .clk(clk), .rst_n(rst_n), .load(load2), .a(a2), .pa(pa2), .b(b2),
    .fi_loc(LOC_NONE), .fi_en('0), .fi_val('0),
    .c(c2), .pc(pc2), .busy(busy2), .done(done2), .chk_en(chk2), .round(rnd2));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    wait (cycle == 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // parity of c must match the carried parity whenever a checker would look
  always @(negedge clk) if (rst_n) begin
    logic [63:0] p;
    if (chk1) begin
      p = ref_parity(vec_t'(c1), M1, 8);
      checks++;
      if (pc1 !== p[7:0]) begin failures++; $display("FAIL m=163 parity at cycle %0d", cycle); end
    end
    if (chk2) begin
      p = ref_parity(vec_t'(c2), M2, 8, 1);
      checks++;
      if (pc2 !== p[7:0]) begin failures++; $display("FAIL m=233 parity at cycle %0d", cycle); end
    end
  end

  task automatic mult1(input vec_t a, input vec_t b, input int abort_after);
    vec_t exp_c;
    logic [63:0] p;
    int n;
    @(negedge clk);
    a1 = a[M1-1:0]; b1 = b[M1-1:0];
    p = ref_parity(a, M1, 8); pa1 = p[7:0];
    load1 = 1;
    @(negedge clk);
    load1 = 0;
    n = 1;
    while (!done1 && n < 2 * M1) begin
      if (n == abort_after) return;
      @(negedge clk);
      n++;
    end
    exp_c = ref_mul(a, b, vec_t'(163'hC9), M1);
    checks += 2;
    if (n != M1 + 1) begin failures++; $display("FAIL m=163 latency %0d", n); end
    if (c1 !== exp_c[M1-1:0]) begin failures++; $display("FAIL m=163 product"); end
  endtask

  task automatic mult2(input vec_t a, input vec_t b);
    vec_t exp_c;
    logic [63:0] p;
    int n;
    @(negedge clk);
    a2 = a[M2-1:0]; b2 = b[M2-1:0];
    p = ref_parity(a, M2, 8, 1); pa2 = p[7:0];
    load2 = 1;
    @(negedge clk);
    load2 = 0;
    n = 1;
    while (!done2 && n < 2 * M2) begin
      @(negedge clk);
      n++;
    end
    exp_c = ref_mul(a, b, vec_t'(F2), M2);
    checks += 2;
    if (n != M2 + 1) begin failures++; $display("FAIL m=233 latency %0d", n); end
    if (c2 !== exp_c[M2-1:0]) begin failures++; $display("FAIL m=233 product"); end
  endtask

  initial begin
    load1 = 0; load2 = 0;
    a1 = '0; b1 = '0; pa1 = '0; a2 = '0; b2 = '0; pa2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    mult1(~vec_t'(0), ~vec_t'(0), -1);
    for (int n = 0; n < 12; n++) begin
      if (n % 4 == 3) begin
        mult1(rand_vec(M1), rand_vec(M1), 40);   // abandoned mid-run
        n_restart++;
      end
      mult1(rand_vec(M1), rand_vec(M1), -1);
    end
    for (int n = 0; n < 8; n++) mult2(rand_vec(M2), rand_vec(M2));
    checks++;
    if (n_restart == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
