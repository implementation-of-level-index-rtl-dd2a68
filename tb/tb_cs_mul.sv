// Testbench for cs_mul at its default size (52-bit words, 50 fraction bits), in the three
// forms the design uses: single x single, double x single and double x double. Operands
// are random double numbers (s, c) with s + c below 1.0; the double result must equal the
// exact product (s_a + c_a)(s_b + c_b) / 2^50 computed in 128-bit arithmetic, rounded
// down, to within 2 units of the last place (the two words are truncated separately).
module tb_cs_mul;
  int checks = 0, failures = 0;

  localparam int W = 52, F = 50;
  logic [W-1:0] a_s, a_c, b_s, b_c;
  logic [W-1:0] ss_s, ss_c, ds_s, ds_c, dd_s, dd_c;

  cs_mul #(.A_DBL(1'b0), .B_DBL(1'b0)) dut_ss (.a_s(a_s), .a_c('0), .b_s(b_s), .b_c('0),
                                               .p_s(ss_s), .p_c(ss_c));
  cs_mul #(.A_DBL(1'b1), .B_DBL(1'b0)) dut_ds (.a_s(a_s), .a_c(a_c), .b_s(b_s), .b_c('0),
                                               .p_s(ds_s), .p_c(ds_c));
  cs_mul dut_dd (.a_s(a_s), .a_c(a_c), .b_s(b_s), .b_c(b_c), .p_s(dd_s), .p_c(dd_c));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string name, input logic [127:0] va, input logic [127:0] vb,
                       input logic [W-1:0] ps, input logic [W-1:0] pc);
    logic [127:0] want, got;
    want = (va * vb) >> F;
    got  = 128'(ps) + 128'(pc);
    checks++;
    if (got > want || want - got > 2) begin
      failures++;
      $display("%s: got %h want %h", name, got, want);
    end
  endtask

  initial begin
    for (int it = 0; it < 300; it++) begin
      // Split random values below 1.0 into two non-negative words.
      logic [W-1:0] va, vb;
      va  = W'({$urandom, $urandom}) & ((W'(1) << F) - 1);
      vb  = W'({$urandom, $urandom}) & ((W'(1) << F) - 1);
      a_c = W'({$urandom, $urandom}) % (va + 1);
      b_c = W'({$urandom, $urandom}) % (vb + 1);
      a_s = va - a_c;
      b_s = vb - b_c;
      #1;
      check("single x single", 128'(a_s), 128'(b_s), ss_s, ss_c);
      check("double x single", 128'(va), 128'(b_s), ds_s, ds_c);
      check("double x double", 128'(va), 128'(vb), dd_s, dd_c);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
