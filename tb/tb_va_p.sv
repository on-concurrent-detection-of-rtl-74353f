// Self-checking testbench for va_p: the sum must be the bitwise XOR and its
// predicted parity must equal the actual parity of the sum when the operand
// parities are correct, and the XOR of the operand parities in general.
module tb_va_p;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [162:0] x, y, s;
  logic [7:0]   px, py, ps;

  va_p dut (.x(x), .px(px), .y(y), .py(py), .s(s), .ps(ps));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t rx, ry, rs;
    logic [63:0] p;
    for (int n = 0; n < 400; n++) begin
      rx = rand_vec(163);
      ry = rand_vec(163);
      x = rx[162:0];
      y = ry[162:0];
      p = ref_parity(rx, 163, 8); px = p[7:0];
      p = ref_parity(ry, 163, 8); py = p[7:0];
      #1;
      rs = rx ^ ry;
      p = ref_parity(rs, 163, 8);
      checks += 2;
      if (s !== rs[162:0]) begin failures++; $display("FAIL sum"); end
      if (ps !== p[7:0]) begin failures++; $display("FAIL parity"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
