// Self-checking testbench for parity_gen: random vectors and single-bit
// vectors at every position, for m = 163 with k = 8 (parts of 21 and 20 bits)
// m = 163 with k = 20, and the interleaved (vertical) partitioning with
// k = 8, compared with the reference multiple parity.
module tb_parity_gen;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [162:0] z;
  logic [7:0]   p1;
  logic [19:0]  p2;
  logic [7:0]   p3;

  parity_gen dut1 (.z(z), .p(p1));
  parity_gen #(.M(163), .K(20)) dut2 (.z(z), .p(p2));
  parity_gen #(.M(163), .K(8), .PART(pb_ced_pkg::PART_VERTICAL)) dut3 (.z(z), .p(p3));

  task automatic run(input vec_t r);
    logic [63:0] e1, e2, e3;
    z = r[162:0];
    #1;
    e1 = ref_parity(r, 163, 8);
    e2 = ref_parity(r, 163, 20);
    e3 = ref_parity(r, 163, 8, 1);
    checks++;
    if (p3 !== e3[7:0]) begin failures++; $display("FAIL vertical z=%h", z); end
    checks += 2;
    if (p1 !== e1[7:0])  begin failures++; $display("FAIL k=8 z=%h", z); end
    if (p2 !== e2[19:0]) begin failures++; $display("FAIL k=20 z=%h", z); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 163; i++) run(vec_t'(1) << i);
    for (int n = 0; n < 300; n++) run(rand_vec(163));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
