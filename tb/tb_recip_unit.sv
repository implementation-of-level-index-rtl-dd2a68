// Testbench for recip_unit: a in (0, 1] spread over 40 binades, a = 1.0 and a = 0.
// Checks that the normalising shift k puts a*2^k in [1/2, 1), and that r * 2^k matches
// 1/a computed in double precision to a relative error below 2^-39 (the paper's series
// of 42 terms bounds the truncation at about 2^-42 relative).
module tb_recip_unit;
  import li_pkg::*;
  int checks = 0, failures = 0;

  logic [FX_W-1:0] a;
  logic [51:0]     r;
  logic [5:0]      k;
  logic            zero;

  recip_unit dut (.a(a), .r(r), .k(k), .zero(zero));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fx(logic [FX_W-1:0] v);
    return real'(v) / (2.0 ** FX_F);
  endfunction

  task automatic check(input logic [FX_W-1:0] av);
    real got, want, rel, an;
    a = av;
    #1;
    an = fx(av) * (2.0 ** k);
    checks++;
    if (!(an >= 0.5 && an <= 1.0)) begin
      failures++;
      $display("bad shift a=%h k=%0d", av, k);
    end
    got  = real'(r) / (2.0 ** 50) * (2.0 ** k);
    want = 1.0 / fx(av);
    rel  = (got - want) / want;
    if (rel < 0) rel = -rel;
    checks++;
    if (rel > 2.0 ** -39 || zero) begin
      failures++;
      $display("a=%h got %.15e want %.15e rel %e", av, got, want, rel);
    end
  endtask

  initial begin
    check(FX_ONE);
    check(FX_ONE >> 1);
    check((FX_ONE >> 1) + 1);
    check(FX_ONE - 1);
    for (int it = 0; it < 400; it++) begin
      logic [FX_W-1:0] v;
      v = ({$urandom, $urandom} & ((FX_W'(1) << 40) - 1)) | (FX_W'(1) << 40);
      check(v >> (it % 40));
    end
    a = '0;
    #1;
    checks++;
    if (!zero) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
