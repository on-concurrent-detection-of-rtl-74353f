// Self-checking testbench for sm_p: b = 0 must give zero data and parity,
// b = 1 must pass data and parity unchanged; random operands.
module tb_sm_p;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic         b;
  logic [162:0] a, y;
  logic [7:0]   pa, py;

  sm_p dut (.b(b), .a(a), .pa(pa), .y(y), .py(py));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t r;
    for (int n = 0; n < 400; n++) begin
      r = rand_vec(163);
      a = r[162:0];
      pa = 8'($urandom);
      b = 1'($urandom);
      #1;
      checks++;
      if (b ? (y !== a || py !== pa) : (y !== '0 || py !== '0)) begin
        failures++; $display("FAIL b=%0d", b);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
