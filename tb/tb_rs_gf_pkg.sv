// tb_rs_gf_pkg: checks the package functions against the log/antilog
// reference: gf_mul on all 65536 operand pairs, gf_alpha_pow for every
// exponent, the inverse table, and x^n mod g(x) for n = 16, 17, 18 by
// confirming that x^n - (x^n mod g) vanishes at every root alpha^0..alpha^15.
module tb_rs_gf_pkg;
  import rs_gf_pkg::*;
  import rs_tb_pkg::mul;
  import rs_tb_pkg::apow;
  import rs_tb_pkg::init;

  int checks = 0, failures = 0;
  inv_table_t itab;
  poly16_t    r;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init();
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        checks++;
        if (gf_mul(gf_t'(a), gf_t'(b)) !== mul(gf_t'(a), gf_t'(b))) begin
          failures++;
          if (failures < 10) $display("gf_mul(%h,%h)", a, b);
        end
      end
    for (int e = 0; e < 300; e++) begin
      checks++;
      if (gf_alpha_pow(e) !== apow(e)) begin failures++; $display("gf_alpha_pow(%0d)", e); end
    end
    itab = gf_inv_table();
    for (int a = 1; a < 256; a++) begin
      checks++;
      if (mul(gf_t'(a), itab[a]) !== 8'h01) begin failures++; $display("inv(%h)", a); end
    end
    checks++;
    if (itab[0] !== 8'h00) begin failures++; $display("inv(0)"); end
    for (int n = 16; n <= 18; n++) begin
      r = gf_xn_mod_g(n);
      for (int i = 0; i < 16; i++) begin
        automatic gf_t v = apow(n * i);          // x^n at alpha^i
        for (int j = 0; j < 16; j++) v ^= mul(r[j], apow(j * i));
        checks++;
        if (v !== 8'h00) begin failures++; $display("x^%0d mod g wrong at alpha^%0d", n, i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
