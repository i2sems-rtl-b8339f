// tb_gf128_mul: compares the GF(2^128) multiplier with an independent
// reference (bit-reversed carry-less multiply and reduction), checks the
// multiplicative identity and a published GCM intermediate value.
module tb_gf128_mul;
  import gf128_ref_pkg::*;
  logic [127:0] a, b, p;
  int checks = 0, failures = 0;
  gf128_mul dut (.a(a), .b(b), .p(p));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  initial begin
    // GCM test case 2: X1 = C1 * H
    a = 128'h66e94bd4ef8a2c3b884cfa59ca342b2e;
    b = 128'h0388dace60b6a392f328c2b971b2fe78;
    #1 check(p == 128'h5e2ec746917062882c85b0685353deb7, $sformatf("GCM X1 %h", p));
    // identity element (x^0 is bit 127)
    a = {1'b1, 127'b0}; b = rnd128();
    #1 check(p == b, "identity");
    for (int i = 0; i < 200; i++) begin
      a = rnd128(); b = rnd128();
      #1 check(p == gmul(a, b), $sformatf("random %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
