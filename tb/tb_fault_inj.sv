// Self-checking testbench for fault_inj: with en = 0 the data passes, with
// en set a bit takes its stuck-at value; random masks over 171 bits.
module tb_fault_inj;
  int checks = 0, failures = 0;
  logic [170:0] d, en, val, q, exp_q;

  fault_inj dut (.d(d), .en(en), .val(val), .q(q));

  function automatic logic [170:0] rnd();
    logic [191:0] r;
    for (int i = 0; i < 6; i++) r[i*32 +: 32] = $urandom;
    return r[170:0];
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      d = rnd();
      val = rnd();
      en = (n % 4 == 0) ? '0 : rnd();
      #1;
      for (int i = 0; i < 171; i++) exp_q[i] = en[i] ? val[i] : d[i];
      checks++;
      if (q !== exp_q) begin failures++; $display("FAIL n=%0d", n); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
