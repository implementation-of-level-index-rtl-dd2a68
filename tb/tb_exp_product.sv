// Testbench for exp_product: factors are built in the testbench as the exact Q1.41
// roundings of exp(-t_i) for the packets of a random t; the product must match exp(-t),
// computed in double precision, to within 2^-38 absolute. The zero input must force 0.
module tb_exp_product;
  import li_pkg::*;
  int checks = 0, failures = 0;

  logic [N_PKT-1:0][FX_W-1:0] f;
  logic                       zero;
  logic [FX_W-1:0]            p;

  exp_product dut (.f(f), .zero(zero), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real tr, want, got, err;
    logic [T_W-1:0] t;
    zero = 1'b0;
    for (int it = 0; it < 400; it++) begin
      t  = {$urandom, $urandom} >> (it % 8);
      tr = real'(t) / (2.0 ** T_F);
      for (int b = 0; b < N_PKT; b++) begin
        real fv;
        fv   = $exp(-real'(t[T_W-1-6*b -: 6]) * (2.0 ** (-1 - 6 * b)));
        f[b] = FX_W'(longint'(fv * (2.0 ** FX_F)));
      end
      #1;
      want = $exp(-tr);
      got  = real'(p) / (2.0 ** FX_F);
      err  = got - want;
      if (err < 0) err = -err;
      checks++;
      if (err > 2.0 ** -38) begin
        failures++;
        $display("t=%f got %.15e want %.15e", tr, got, want);
      end
    end
    zero = 1'b1;
    #1;
    checks++;
    if (p != '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
