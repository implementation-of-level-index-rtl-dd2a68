// recip_unit: reciprocal 1/a of a value a in (0, 1], Q1.41, as the normalised
// reciprocal r = 1/a' together with a shift k, so that 1/a = r * 2^k.
//
// How it works (the paper's reciprocation): a is shifted left by k so that a' = a*2^k lies
// in [1/2, 1); delta = 1 - a' lies in (0, 1/2], and 1/a' = 1/(1-delta) is summed as the
// truncated series 1 + delta + ... + delta^(TERMS-1). delta^2 is formed first, then the
// powers delta^(2^s+1) .. delta^(2^(s+1)) are formed together for s = 1, 2, ... as
// products of the broadcast delta^(2^s) with the lower powers. delta^2 and every higher
// power stay double numbers (sum and carry words, see cs_mul), so no carry propagates
// until the end: the 2 single and TERMS-2 double numbers are reduced by one carry-save tree
// and a single carry-propagate add gives r.
// The series length (42 terms, up to delta^41) and the doubling scheme follow the paper.
// Choices made here: powers are kept to RF = 50 fraction bits (the paper keeps t to 2^-37
// after a shift by up to 5, and the extra bits absorb truncation in 40 products);
// delta is the exact 1 - a' (the one's complement plus a carry-in of one unit);
// a = 1.0 gives k = 0, delta = 0; a = 0 raises `zero`.
// The paper's "return 0 when a_j <= 2^-5" test is made by the caller, which saturates
// r*2^k at 32 (see li_pkg::to_targ); here k reaches 41 so that (1-b_j)/a_j can still be
// formed for small a_j.
// Interface: purely combinational; r is Q2.RF (values in [1, 2]), k in 0..41.
module recip_unit import li_pkg::*; #(
  parameter int unsigned TERMS = 42,  // series terms, delta^0 .. delta^41
  parameter int unsigned RF    = 50   // fraction bits of the powers and of r
) (
  input  logic [FX_W-1:0] a,
  output logic [RF+1:0]   r,
  output logic [5:0]      k,
  output logic            zero
);
  localparam int unsigned W  = RF + 2;    // word width of the powers, Q1.RF
  localparam int unsigned NT = 2 * TERMS - 2;  // 2 single + (TERMS-2) double numbers

  logic [FX_W-1:0]  a_n;      // normalised a', Q1.41
  logic [W-1:0]     delta;    // single number, Q1.RF
  logic [W-1:0]     pw_s [TERMS];
  logic [W-1:0]     pw_c [TERMS];
  logic [NT-1:0][W-1:0] terms;
  logic [W-1:0]     s_sum, s_carry;

  // Normalising shift.
  always_comb begin
    // The highest set bit below the integer bit decides k (a = 1.0 leaves k = 0).
    k = '0;
    for (int i = 0; i < FX_W - 1; i++) begin
      if (a[i]) k = 6'(FX_W - 2 - i);
    end
    a_n   = a << k;
    zero  = (a == '0);
    delta = W'(FX_ONE - a_n) << (RF - FX_F);
  end

  // delta^0 and delta^1 are single numbers; every higher power is a double number.
  assign pw_s[0] = W'(1) << RF;
  assign pw_c[0] = '0;
  assign pw_s[1] = delta;
  assign pw_c[1] = '0;

  // delta^2 = delta * delta (single x single).
  cs_mul #(.W(W), .F(RF), .A_DBL(1'b0), .B_DBL(1'b0)) u_sq (
    .a_s(delta), .a_c('0), .b_s(delta), .b_c('0), .p_s(pw_s[2]), .p_c(pw_c[2])
  );

  // delta^(2^s + i) = delta^(2^s) * delta^i, i = 1 .. 2^s, with delta^(2^s) broadcast.
  for (genvar s = 1; s < 7; s++) begin : g_stage
    for (genvar i = 1; i <= (1 << s); i++) begin : g_pow
      if ((1 << s) + i < TERMS) begin : g_used
        cs_mul #(.W(W), .F(RF), .A_DBL(1'b1), .B_DBL(i > 1)) u_mul (
          .a_s(pw_s[1 << s]), .a_c(pw_c[1 << s]), .b_s(pw_s[i]), .b_c(pw_c[i]),
          .p_s(pw_s[(1 << s) + i]), .p_c(pw_c[(1 << s) + i])
        );
      end
    end
  end

  // All words of all terms into one carry-save tree, then one carry-propagate add.
  always_comb begin
    terms[0] = pw_s[0];
    terms[1] = pw_s[1];
    for (int i = 2; i < TERMS; i++) begin
      terms[2*i-2] = pw_s[i];
      terms[2*i-1] = pw_c[i];
    end
  end

  csa_tree #(.N(NT), .W(W)) u_sum (
    .ops  (terms),
    .sum  (s_sum),
    .carry(s_carry)
  );

  assign r = s_sum + s_carry;
endmodule
