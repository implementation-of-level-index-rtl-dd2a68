// Testbench for ln_unit: c over (0, 4) in Q2.41, from tiny values (p up to 40) to the
// [2, 4) range, plus c = 1, c = 2 and every leading-bit pattern 1.b1..b5. The result must
// match ln c in double precision to within 2^-31 absolute: the 32-term division series
// stops at delta^31 with delta up to 1/2, which leaves an error of up to about 2^-32 (c'/2)
// / (1 - delta) on top of the 2^-32 the design aims at; c = 0 must raise `zero`.
module tb_ln_unit;
  import li_pkg::*;
  int checks = 0, failures = 0;
  real max_err = 0.0;

  logic [C_W-1:0]         c;
  logic signed [LN_W-1:0] ln_c;
  logic                   zero;

  ln_unit dut (.c(c), .ln_c(ln_c), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [C_W-1:0] cv);
    real want, got, err;
    c = cv;
    #1;
    want = $ln(real'(cv) / (2.0 ** FX_F));
    got  = real'(ln_c) / (2.0 ** FX_F);
    err  = got - want;
    if (err < 0) err = -err;
    if (err > max_err) max_err = err;
    checks++;
    if (err > 2.0 ** -31 || zero) begin
      failures++;
      $display("c=%h got %.15f want %.15f", cv, got, want);
    end
  endtask

  initial begin
    check(C_W'(1) << FX_F);
    check(C_W'(1) << (FX_F + 1));
    check('1);
    for (int i = 0; i < 32; i++) check((C_W'(32 + i) << (FX_F - 5)) + C_W'(i * 12345));
    for (int it = 0; it < 400; it++) begin
      logic [C_W-1:0] v;
      v = {$urandom, $urandom};
      v[C_W-1] = (it % 3 == 0);
      v = v >> (it % 41);
      if (v == '0) v = C_W'(it + 1);
      check(v);
    end
    c = '0;
    #1;
    checks++;
    if (!zero) failures++;
    $display("max error %e", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
