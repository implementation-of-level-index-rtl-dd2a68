// ln_unit: natural logarithm of c in (0, 4) (Q2.41), as a signed Q6.41 value.
//
// How it works (the paper's method for ln c_j):
//  1. Normalise: c' = c * 2^p lies in [1, 2) (p = -1 for c >= 2, p >= 0 otherwise).
//  2. Split c' = s'(1 + sigma) where s' is the six leading bits 1.b1..b5 of c'. Division by
//     s' is done as division by 1 - delta: s'/2 = 1 - delta with delta = (32 - b1..b5)/64 a
//     6-bit number in (0, 1/2], and c'/s' = (c'/2)(1 + delta + ... + delta^31). The 32
//     terms (c'/2)delta^r are formed in five stages of carry-save products (cs_mul):
//     delta^2 and (c'/2)delta; (c'/2)delta^2..3 and delta^4; (c'/2)delta^4..7 and delta^8;
//     (c'/2)delta^8..15 and delta^16; (c'/2)delta^16..31. They stay double numbers and are
//     summed in one carry-save tree; a carry-propagate add and subtracting one give
//     sigma < 2^-5.
//  3. ln(1 + sigma) = sigma - sigma^2/2 + sigma^3/3 - sigma^4/4 + sigma^5/5, with 1/3 and 1/5
//     as stored constants: sigma^2, sigma/3 and sigma/5 first, then sigma^3/3 and sigma^4,
//     then sigma^5/5; the halving and quartering are shifts.
//  4. ln c = ln s' (from ln_table) + ln(1 + sigma) - p ln 2, the seven operands summed in a
//     carry-save tree and one final carry-propagate add.
// The 32-term division series, the five-term log series and the table of ln s' follow the
// paper (which aims at an absolute error of 2^-32). Choices made here: LF = 50 fraction
// bits inside, signed two's-complement operands in the final tree, round to 41 bits.
// Interface: purely combinational; `zero` flags c = 0, for which ln_c is meaningless.
module ln_unit import li_pkg::*; #(
  parameter int unsigned TERMS = 32,  // division series terms, delta^0 .. delta^31
  parameter int unsigned LF    = 50   // fraction bits inside the unit
) (
  input  logic [C_W-1:0]         c,
  output logic signed [LN_W-1:0] ln_c,
  output logic                   zero
);
  localparam int unsigned SW = LF + 8;   // signed working width, Q7.LF
  typedef logic signed [SW-1:0] sw_t;
  localparam sw_t THIRD = sw_t'((longint'(1) <<< LF) / 3);
  localparam sw_t FIFTH = sw_t'((longint'(1) <<< LF) / 5);
  localparam sw_t LN2   = sw_t'(longint'($ln(2.0) * (2.0 ** LF)));

  logic signed [6:0]     p;
  logic [FX_W-1:0]       cn;         // c', Q1.41 with the integer bit set
  logic [4:0]            idx;
  logic [LF:0]           ln_s;
  logic [2*TERMS-2:0][LF+1:0] terms;
  logic [LF+1:0]         q_sum, q_carry;
  sw_t                   sigma, s2, s_3, s_5, s3_3, s4, s5_5, total;
  logic [6:0][SW-1:0]    lops;
  logic [SW-1:0]         l_sum, l_carry;

  function automatic sw_t smul(sw_t u, sw_t w);
    logic signed [2*SW-1:0] m;
    m = u * w;
    return sw_t'(m >>> LF);
  endfunction

  // Step 1: normalisation.
  always_comb begin
    int unsigned lz;
    zero = (c == '0);
    lz   = 0;
    for (int i = 0; i < FX_W; i++) begin
      if (c[i]) lz = FX_W - 1 - i;
    end
    if (c[C_W-1]) begin
      p  = -7'sd1;
      cn = c[C_W-1:1];
    end else begin
      p  = 7'(lz);
      cn = c[FX_W-1:0] << lz;
    end
    idx = cn[FX_W-2 -: 5];
  end

  ln_table #(.LF(LF)) u_tab (
    .idx(idx),
    .v  (ln_s)
  );

  // Step 2: the terms (c'/2) delta^r, staged as in the paper: delta^2 and (c'/2) delta
  // first; then (c'/2) delta^(2^k + i) = (c'/2) delta^i * delta^(2^k) for i < 2^k, together
  // with delta^(2^(k+1)), for k = 1 .. 4. All products are carry-save double numbers.
  localparam int unsigned DW = LF + 2;   // word width, Q1.LF
  logic [DW-1:0] c_half;                 // c'/2, single number in [1/2, 1)
  logic [DW-1:0] d1;                     // delta, single number
  logic [DW-1:0] cd_s [TERMS];
  logic [DW-1:0] cd_c [TERMS];
  localparam int unsigned KMAX = $clog2(TERMS) - 1;
  logic [DW-1:0] dp_s [1:KMAX];          // dp[k] = delta^(2^k), double numbers
  logic [DW-1:0] dp_c [1:KMAX];

  assign c_half  = DW'(cn) << (LF - FX_F - 1);
  assign d1      = DW'(6'd32 - {1'b0, idx}) << (LF - 6);
  assign cd_s[0] = c_half;
  assign cd_c[0] = '0;

  cs_mul #(.W(DW), .F(LF), .A_DBL(1'b0), .B_DBL(1'b0)) u_d2 (
    .a_s(d1), .a_c('0), .b_s(d1), .b_c('0), .p_s(dp_s[1]), .p_c(dp_c[1]));
  if (TERMS > 1) begin : g_cd1
    cs_mul #(.W(DW), .F(LF), .A_DBL(1'b0), .B_DBL(1'b0)) u_cd1 (
      .a_s(c_half), .a_c('0), .b_s(d1), .b_c('0), .p_s(cd_s[1]), .p_c(cd_c[1]));
  end

  for (genvar k = 1; k < 6; k++) begin : g_stage
    if ((1 << k) < TERMS) begin : g_used
      for (genvar i = 0; i < (1 << k); i++) begin : g_term
        if ((1 << k) + i < TERMS) begin : g_t
          cs_mul #(.W(DW), .F(LF), .A_DBL(i > 0), .B_DBL(1'b1)) u_cd (
            .a_s(cd_s[i]), .a_c(cd_c[i]), .b_s(dp_s[k]), .b_c(dp_c[k]),
            .p_s(cd_s[(1 << k) + i]), .p_c(cd_c[(1 << k) + i]));
        end
      end
      if ((2 << k) < TERMS) begin : g_sq
        cs_mul #(.W(DW), .F(LF), .A_DBL(1'b1), .B_DBL(1'b1)) u_sq (
          .a_s(dp_s[k]), .a_c(dp_c[k]), .b_s(dp_s[k]), .b_c(dp_c[k]),
          .p_s(dp_s[k+1]), .p_c(dp_c[k+1]));
      end
    end
  end

  // One single and TERMS-1 double numbers into one carry-save tree.
  always_comb begin
    terms[0] = cd_s[0];
    for (int r = 1; r < TERMS; r++) begin
      terms[2*r-1] = cd_s[r];
      terms[2*r]   = cd_c[r];
    end
  end

  csa_tree #(.N(2 * TERMS - 1), .W(DW)) u_div (
    .ops  (terms),
    .sum  (q_sum),
    .carry(q_carry)
  );

  // Step 3: the log series.
  always_comb begin
    sigma = sw_t'(q_sum) + sw_t'(q_carry) - (sw_t'(1) <<< LF);
    s2    = smul(sigma, sigma);
    s_3   = smul(sigma, THIRD);
    s_5   = smul(sigma, FIFTH);
    s3_3  = smul(s2, s_3);
    s4    = smul(s2, s2);
    s5_5  = smul(s4, s_5);
    // Step 4 operands.
    lops[0] = sw_t'(ln_s);
    lops[1] = sigma;
    lops[2] = -(s2 >>> 1);
    lops[3] = s3_3;
    lops[4] = -(s4 >>> 2);
    lops[5] = s5_5;
    lops[6] = -(sw_t'(p) * LN2);
  end

  csa_tree #(.N(7), .W(SW)) u_sum (
    .ops  (lops),
    .sum  (l_sum),
    .carry(l_carry)
  );

  always_comb begin
    total = sw_t'(l_sum + l_carry);
    ln_c  = LN_W'((total + (sw_t'(1) <<< (LF - FX_F - 1))) >>> (LF - FX_F));
  end
endmodule
