// Self-checking testbench for parity_checker: a vector with its correct
// parity must not raise err; flipping any set of predicted parity bits must
// raise err; p_gen must equal the reference parity.
module tb_parity_checker;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [162:0] z;
  logic [7:0]   pz, p_gen;
  logic         err;

  parity_checker dut (.z(z), .pz(pz), .p_gen(p_gen), .err(err));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t r;
    logic [63:0] p;
    logic [7:0] e;
    for (int n = 0; n < 600; n++) begin
      r = rand_vec(163);
      p = ref_parity(r, 163, 8);
      e = (n % 3 == 0) ? 8'h00 : 8'($urandom);
      if (n % 3 == 1) e = 8'(1) << (n % 8);
      z = r[162:0];
      pz = p[7:0] ^ e;
      #1;
      checks += 2;
      if (err !== (e != 0)) begin failures++; $display("FAIL err=%0d e=%h", err, e); end
      if (p_gen !== p[7:0]) begin failures++; $display("FAIL p_gen"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
