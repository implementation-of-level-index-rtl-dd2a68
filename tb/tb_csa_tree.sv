// Testbench for csa_tree: random operand sets for a 42-operand, 52-bit tree and a
// 7-operand, 58-bit tree (the sizes the reciprocal and logarithm units use), plus a
// 2-operand pass-through. The double-number result (sum + carry) must equal the plain
// sum of the operands modulo 2^W.
module tb_csa_tree;
  int checks = 0, failures = 0;

  logic [41:0][51:0] ops42;
  logic [51:0]       s42, c42;
  logic [6:0][57:0]  ops7;
  logic [57:0]       s7, c7;
  logic [1:0][15:0]  ops2;
  logic [15:0]       s2, c2;

  csa_tree #(.N(42), .W(52)) dut42 (.ops(ops42), .sum(s42), .carry(c42));
  csa_tree #(.N(7),  .W(58)) dut7  (.ops(ops7),  .sum(s7),  .carry(c7));
  csa_tree #(.N(2),  .W(16)) dut2  (.ops(ops2),  .sum(s2),  .carry(c2));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [51:0] ref42;
    logic [57:0] ref7;
    logic [15:0] ref2;
    for (int it = 0; it < 500; it++) begin
      ref42 = '0;
      ref7  = '0;
      for (int i = 0; i < 42; i++) begin
        ops42[i] = {$urandom, $urandom} >> (it % 13);
        ref42 += ops42[i];
      end
      for (int i = 0; i < 7; i++) begin
        ops7[i] = {$urandom, $urandom};
        ref7 += ops7[i];
      end
      ops2 = $urandom;
      ref2 = ops2[0] + ops2[1];
      #1;
      checks++;
      if (s42 + c42 != ref42) begin
        failures++;
        $display("N=42 mismatch: %h vs %h", s42 + c42, ref42);
      end
      checks++;
      if (s7 + c7 != ref7) begin
        failures++;
        $display("N=7 mismatch: %h vs %h", s7 + c7, ref7);
      end
      checks++;
      if (s2 + c2 != ref2) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
