// cs_mul: carry-save multiplier for "double numbers".
//
// A double number is a pair of words (s, c) whose value is s + c; it is what a carry-save
// adder tree leaves before the carry-propagate add. This unit multiplies two operands,
// each either a single number (c ignored) or a double number, without resolving carries:
// every set bit of each word of b selects a shifted copy of each word of a, giving W, 2W or
// 4W partial-product rows (for 42-bit double x double operands the 168 rows the design
// counts), and one csa_tree reduces them to a double result. The result is the product
// shifted right by F bits, truncated word by word, so it is at most 2 units of 2^-F low.
// Operands and result are unsigned fixed point with F fraction bits in W-bit words. For
// non-negative operands whose product is below 2^(W-F) no carry is lost, so s + c of the
// result is exact before truncation.
// The double-number multiply is the paper's; the simple row-per-bit array (no Booth
// recoding) is this design's choice. Purely combinational.
module cs_mul #(
  parameter int unsigned W     = 52,  // word width
  parameter int unsigned F     = 50,  // fraction bits
  parameter bit          A_DBL = 1'b1,
  parameter bit          B_DBL = 1'b1
) (
  input  logic [W-1:0] a_s,
  input  logic [W-1:0] a_c,
  input  logic [W-1:0] b_s,
  input  logic [W-1:0] b_c,
  output logic [W-1:0] p_s,
  output logic [W-1:0] p_c
);
  localparam int unsigned NA = A_DBL ? 2 : 1;
  localparam int unsigned NB = B_DBL ? 2 : 1;
  localparam int unsigned N  = W * NA * NB;
  localparam int unsigned PW = 2 * W;

  logic [N-1:0][PW-1:0] rows;
  logic [PW-1:0]        r_s, r_c;

  always_comb begin
    logic [W-1:0] av, bv;
    for (int ia = 0; ia < NA; ia++) begin
      av = (ia == 0) ? a_s : a_c;
      for (int ib = 0; ib < NB; ib++) begin
        bv = (ib == 0) ? b_s : b_c;
        for (int i = 0; i < W; i++) begin
          rows[(ia * NB + ib) * W + i] = bv[i] ? (PW'(av) << i) : '0;
        end
      end
    end
  end

  csa_tree #(.N(N), .W(PW)) u_tree (
    .ops  (rows),
    .sum  (r_s),
    .carry(r_c)
  );

  assign p_s = r_s[F +: W];
  assign p_c = r_c[F +: W];
endmodule
