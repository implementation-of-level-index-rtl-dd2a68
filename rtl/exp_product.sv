// exp_product: multiplies the seven factors read from exp_table into exp(-t).
//
// As in the paper, six of the factors are multiplied in pairs, the three products and the
// seventh factor are combined in a second layer of two products, and a last product gives
// the result. The products are carry-save (cs_mul) and stay double numbers, truncated to
// GF fraction bits, until one carry-propagate add at the end; the value is then rounded
// to Q1.41. `zero` forces the result to 0; the caller raises it when t >= 32,
// where exp(-t) < 2^-46 is zero to the working precision.
// Interface: purely combinational. All factors are in (0, 1], Q1.41.
module exp_product import li_pkg::*; #(
  parameter int unsigned GF = 48   // fraction bits kept between the product layers
) (
  input  logic [N_PKT-1:0][FX_W-1:0] f,
  input  logic                       zero,
  output logic [FX_W-1:0]            p
);
  localparam int unsigned W = GF + 2;   // Q1.GF words with one spare bit

  logic [N_PKT-1:0][W-1:0] fw;          // factors widened to GF fraction bits
  logic [W-1:0] p01_s, p01_c, p23_s, p23_c, p45_s, p45_c;
  logic [W-1:0] q0_s, q0_c, q1_s, q1_c, q_s, q_c, q;

  for (genvar i = 0; i < N_PKT; i++) begin : g_widen
    assign fw[i] = W'(f[i]) << (GF - FX_F);
  end

  // Layer 1: three single x single products.
  cs_mul #(.W(W), .F(GF), .A_DBL(1'b0), .B_DBL(1'b0)) u_p01 (
    .a_s(fw[0]), .a_c('0), .b_s(fw[1]), .b_c('0), .p_s(p01_s), .p_c(p01_c));
  cs_mul #(.W(W), .F(GF), .A_DBL(1'b0), .B_DBL(1'b0)) u_p23 (
    .a_s(fw[2]), .a_c('0), .b_s(fw[3]), .b_c('0), .p_s(p23_s), .p_c(p23_c));
  cs_mul #(.W(W), .F(GF), .A_DBL(1'b0), .B_DBL(1'b0)) u_p45 (
    .a_s(fw[4]), .a_c('0), .b_s(fw[5]), .b_c('0), .p_s(p45_s), .p_c(p45_c));

  // Layer 2: double x double and double x single.
  cs_mul #(.W(W), .F(GF), .A_DBL(1'b1), .B_DBL(1'b1)) u_q0 (
    .a_s(p01_s), .a_c(p01_c), .b_s(p23_s), .b_c(p23_c), .p_s(q0_s), .p_c(q0_c));
  cs_mul #(.W(W), .F(GF), .A_DBL(1'b1), .B_DBL(1'b0)) u_q1 (
    .a_s(p45_s), .a_c(p45_c), .b_s(fw[6]), .b_c('0), .p_s(q1_s), .p_c(q1_c));

  // Layer 3: double x double, then the one carry-propagate add and rounding.
  cs_mul #(.W(W), .F(GF), .A_DBL(1'b1), .B_DBL(1'b1)) u_q (
    .a_s(q0_s), .a_c(q0_c), .b_s(q1_s), .b_c(q1_c), .p_s(q_s), .p_c(q_c));

  assign q = q_s + q_c;
  assign p = zero ? '0 : FX_W'((q + (W'(1) << (GF - FX_F - 1))) >> (GF - FX_F));
endmodule
