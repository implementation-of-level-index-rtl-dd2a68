// Testbench for ln_table: all 32 entries against ln(1 + i/32) in double precision, to
// within 2^-48.
module tb_ln_table;
  int checks = 0, failures = 0;

  logic [4:0]  idx;
  logic [50:0] v;

  ln_table dut (.idx(idx), .v(v));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real want, got, err;
    for (int i = 0; i < 32; i++) begin
      idx = 5'(i);
      #1;
      want = $ln(1.0 + real'(i) / 32.0);
      got  = real'(v) / (2.0 ** 50);
      err  = got - want;
      if (err < 0) err = -err;
      checks++;
      if (err > 2.0 ** -48) begin
        failures++;
        $display("idx=%0d got %.15f want %.15f", i, got, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
