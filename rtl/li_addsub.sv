// li_addsub: level-index adder/subtractor. Given li numbers x, y and an operation it
// returns z with phi(z) = phi(x) +- phi(y), where phi(l + f) = exp(exp(...exp(f))) with l
// exponentiations (phi(f) = f at level 0).
//
// Algorithm (Clenshaw-Olver, with the paper's partial-table evaluation). After ordering the
// operands so that x = l + f >= y = m + g:
//   a_{l-1} = exp(-f),              a_{j-1} = exp(-1/a_j)            (j = l-1 .. 1)
//   b_{m-1} = exp(-(f-g)) if m = l, exp(-(1/a_m - g)) if m < l,
//   b_{j-1} = exp(-(1-b_j)/a_j)     (j = m-1 .. 1),   b_0 = g a_0 if m = 0
//   c_0 = 1 +- b_0,                 c_{j+1} = 1 + a_{j+1} ln c_j
// The c recursion stops at the first j with c_j < a_j (then z = j + c_j/a_j: the final
// division) or at j = l-1, where H = f + ln c_{l-1} gives z = l + H if H < 1 and
// z = l + 1 + ln H otherwise (one or two final logarithms). Level-0 operands skip to
// H = f +- g. Operands at level 6 or above give z = x (the other operand is below the
// working precision), as the paper states; equal operands subtract to zero.
//
// Datapath: one recip_unit (1/a_j), the single exp_table (7 packets x 64 x 42 bits) with
// one exp_product, and one ln_unit. Every exp(-t) is a table look-up of the seven packets
// of t followed by their product; t >= 32 gives 0 (the paper's a_j <= 2^-5 rule).
// Schedule, one state per clock:
//   step j=l    : LOOKA (t=f) [LOOKB (t'=f-g), PRODB | PRODA]
//   step j<l    : RECIP, LOOKA [LOOKB, PRODB | PRODA]
//   b_0 (m=0)   : B0
//   c phase     : C0, then per j: CTEST and LN, CUPD or the final stage
//   final stage : DRECIP, DMUL (division) | LNF, HADD, FTEST [LN2]
// In a step that also advances b, the b look-up follows the a look-up by one clock since
// the table has one port (the paper's "non-duplication" delay); a and b then share the
// product unit, which the serialised look-ups leave free. Sharing one product unit and one
// ln unit, a table with a registered read, and one clock per state are choices of this
// design; the paper gives times in CSA delays, not clocks.
// Interface: `start` (with op, x, y) is taken when `busy` is low; `done` is high for one
// clock with z and z_neg (sign of the result, set when y > x in a subtraction). The li
// number format is 3 level bits and 28 index bits; this is also this design's choice.
module li_addsub import li_pkg::*; #(
  parameter int unsigned RF = 50   // fraction bits of the reciprocal
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic op,        // 0: add, 1: subtract
  input  li_t  x,
  input  li_t  y,
  output logic busy,
  output logic done,
  output li_t  z,
  output logic z_neg
);
  typedef enum logic [4:0] {
    S_IDLE, S_RECIP, S_LOOKA, S_LOOKB, S_PRODA, S_PRODB, S_B0, S_C0, S_CTEST, S_LN,
    S_CUPD, S_DRECIP, S_DMUL, S_LNF, S_HADD, S_FTEST, S_LN2, S_DONE
  } state_e;

  localparam int unsigned NA = 1 << LVL_W;
  localparam logic [C_W-1:0] C_ONE = C_W'(1) << FX_F;

  state_e           state;
  logic             is_sub;
  logic [LVL_W-1:0] l, m, j, n_res;
  logic [FX_W-1:0]  f, g;             // indices as Q1.41
  logic [FX_W-1:0]  a_mem [NA];       // a_0 .. a_{l-1}
  logic [FX_W-1:0]  b_cur;
  logic [RF+1:0]    r_reg;            // 1/a' of the last reciprocal
  logic [5:0]       k_reg;
  logic             rz_reg;           // reciprocal of zero
  logic             sat_a, sat_b;     // look-up argument >= 32
  logic [T_W-1:0]   tb_reg;           // t' waiting for the table
  logic [C_W-1:0]   c_reg;
  logic signed [LN_W-1:0] ln_reg;
  logic [FX_W-1:0]  h_reg;            // result index, Q0.41

  // Datapath units.
  logic [FX_W-1:0]  rc_in;
  logic [RF+1:0]    rc_r;
  logic [5:0]       rc_k;
  logic             rc_zero;
  logic [T_W-1:0]   tab_t;
  logic [N_PKT-1:0][FX_W-1:0] tab_e;
  logic             prod_zero;
  logic [FX_W-1:0]  prod_p;
  logic [C_W-1:0]   ln_in;
  logic signed [LN_W-1:0] ln_out;
  logic             ln_zero;

  recip_unit #(.RF(RF)) u_recip (.a(rc_in), .r(rc_r), .k(rc_k), .zero(rc_zero));
  exp_table u_table (.clk(clk), .t(tab_t), .e(tab_e));
  exp_product u_prod (.f(tab_e), .zero(prod_zero), .p(prod_p));
  ln_unit u_ln (.c(ln_in), .ln_c(ln_out), .zero(ln_zero));

  // Arguments formed in LOOKA from the last reciprocal.
  targ_t t_a, t_b;
  logic [T_W-1:0] f_t, g_t;
  logic need_b;

  assign f_t    = T_W'(f) >> (FX_F - T_F);
  assign g_t    = T_W'(g) >> (FX_F - T_F);
  assign need_b = (j <= m);

  always_comb begin
    targ_t inv, prod_t;
    logic [FX_W-1:0] one_minus_b;
    inv = to_targ(128'(r_reg), RF, k_reg);
    if (rz_reg) inv = '{sat: 1'b1, t: '0};
    one_minus_b = FX_ONE - b_cur;
    prod_t = to_targ(128'(one_minus_b * r_reg), FX_F + RF, k_reg);
    if (rz_reg) prod_t = '{sat: (one_minus_b != '0), t: '0};
    if (j == l) begin
      t_a = '{sat: 1'b0, t: f_t};
      t_b = '{sat: 1'b0, t: f_t - g_t};
    end else begin
      t_a = inv;
      if (j == m) t_b = '{sat: inv.sat, t: inv.t - g_t};
      else        t_b = prod_t;
    end
  end

  // Input selection for the shared units.
  always_comb begin
    rc_in     = a_mem[j];
    tab_t     = (state == S_LOOKB) ? tb_reg : t_a.t;
    prod_zero = (state == S_PRODB) ? sat_b : sat_a;
    ln_in     = c_reg;
  end

  // Result helpers.
  logic [C_W-1:0] c_next;
  logic [C_W-1:0] h_next;
  logic [FX_W-1:0] div_q;
  always_comb begin
    logic signed [FX_W+LN_W:0] al;
    logic signed [FX_W+LN_W:0] cs;
    logic signed [LN_W:0]      hs;
    logic [C_W+RF+1:0]         cr;
    logic [191:0]              w;
    al = $signed({1'b0, a_mem[j + 1'b1]}) * ln_reg;
    cs = (al >>> FX_F) + (FX_W+LN_W+1)'($signed({1'b0, C_ONE}));
    if (cs < 0)                               c_next = '0;
    else if (cs >= (1 <<< (C_W)))             c_next = '1;
    else                                      c_next = C_W'(cs);
    hs = (LN_W+1)'($signed({1'b0, f})) + ln_reg;
    h_next = (hs < 0) ? '0 : C_W'(hs);
    cr = c_reg * r_reg;
    w  = {{(192-C_W-RF-2){1'b0}}, cr} << k_reg;
    div_q = FX_W'(w >> RF);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      is_sub <= 1'b0;
      l      <= '0;
      m      <= '0;
      j      <= '0;
      n_res  <= '0;
      f      <= '0;
      g      <= '0;
      b_cur  <= '0;
      r_reg  <= '0;
      k_reg  <= '0;
      rz_reg <= 1'b0;
      sat_a  <= 1'b0;
      sat_b  <= 1'b0;
      tb_reg <= '0;
      c_reg  <= '0;
      ln_reg <= '0;
      h_reg  <= '0;
      z_neg  <= 1'b0;
      for (int i = 0; i < NA; i++) a_mem[i] <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin : accept
          li_t xo, yo;
          logic swap;
          swap   = (y > x);
          xo     = swap ? y : x;
          yo     = swap ? x : y;
          is_sub <= op;
          z_neg  <= op && swap;
          l      <= xo.level;
          m      <= yo.level;
          j      <= xo.level;
          f      <= FX_W'(xo.index) << (FX_F - IDX_W);
          g      <= FX_W'(yo.index) << (FX_F - IDX_W);
          if (op && xo == yo) begin
            n_res <= '0;
            h_reg <= '0;
            state <= S_DONE;
          end else if (xo.level >= LVL_W'(TRIVIAL_LEVEL)) begin
            n_res <= xo.level;
            h_reg <= FX_W'(xo.index) << (FX_F - IDX_W);
            state <= S_DONE;
          end else if (xo.level == '0) begin
            n_res <= '0;
            c_reg <= op ? C_W'(xo.index) - C_W'(yo.index) << (FX_F - IDX_W)
                        : C_W'(xo.index) + C_W'(yo.index) << (FX_F - IDX_W);
            state <= S_FTEST;
          end else begin
            state <= S_LOOKA;
          end
        end

        S_RECIP: begin
          r_reg  <= rc_r;
          k_reg  <= rc_k;
          rz_reg <= rc_zero;
          state  <= S_LOOKA;
        end

        S_LOOKA: begin
          sat_a  <= t_a.sat;
          sat_b  <= t_b.sat;
          tb_reg <= t_b.t;
          state  <= need_b ? S_LOOKB : S_PRODA;
        end

        S_LOOKB: begin
          a_mem[j - 1'b1] <= prod_p;
          state <= S_PRODB;
        end

        S_PRODA, S_PRODB: begin
          if (state == S_PRODA) a_mem[j - 1'b1] <= prod_p;
          else                  b_cur <= prod_p;
          j <= j - 1'b1;
          if (j == 1) state <= (m == '0) ? S_B0 : S_C0;
          else        state <= S_RECIP;
        end

        S_B0: begin : b_zero
          logic [2*FX_W-1:0] gb;
          gb    = g * a_mem[0];
          b_cur <= FX_W'(gb >> FX_F);
          state <= S_C0;
        end

        S_C0: begin
          c_reg <= is_sub ? C_ONE - C_W'(b_cur) : C_ONE + C_W'(b_cur);
          j     <= '0;
          if (is_sub && b_cur == FX_ONE) begin
            n_res <= '0;
            h_reg <= '0;
            state <= S_DONE;
          end else begin
            state <= S_CTEST;
          end
        end

        S_CTEST: begin
          if (c_reg < C_W'(a_mem[j]))  state <= S_DRECIP;
          else if (j == l - 1'b1)      state <= S_LNF;
          else                         state <= S_LN;
        end

        S_LN: begin
          ln_reg <= ln_out;
          state  <= S_CUPD;
        end

        S_CUPD: begin
          c_reg <= c_next;
          j     <= j + 1'b1;
          state <= S_CTEST;
        end

        S_DRECIP: begin
          r_reg  <= rc_r;
          k_reg  <= rc_k;
          rz_reg <= rc_zero;
          state  <= S_DMUL;
        end

        S_DMUL: begin
          h_reg <= div_q;
          n_res <= j;
          state <= S_DONE;
        end

        S_LNF: begin
          ln_reg <= ln_out;
          state  <= S_HADD;
        end

        S_HADD: begin
          c_reg <= h_next;
          n_res <= l;
          state <= S_FTEST;
        end

        S_FTEST: begin
          if (c_reg < C_ONE) begin
            h_reg <= FX_W'(c_reg);
            state <= S_DONE;
          end else begin
            state <= S_LN2;
          end
        end

        S_LN2: begin
          h_reg <= FX_W'(ln_out);
          n_res <= n_res + 1'b1;
          state <= S_DONE;
        end

        S_DONE: state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

  // Round the Q0.41 index to 28 bits; a carry out of the index moves to the level.
  logic [LVL_W+IDX_W-1:0] z_round;
  always_comb begin
    logic [LVL_W+FX_F:0] zw;
    zw      = {1'b0, n_res, h_reg[FX_F-1:0]} + ((LVL_W+FX_F+1)'(1) << (FX_F - IDX_W - 1));
    z_round = (LVL_W+IDX_W)'(zw >> (FX_F - IDX_W));
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_DONE);
  assign z    = li_t'(z_round);

  // The control never reads an a_j beyond the level of x, and l >= 1 outside the
  // level-0 path.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == S_CTEST) |-> (j < l));
  // The c_j and H that reach the logarithm are never zero.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state inside {S_LN, S_LNF, S_LN2}) |-> !ln_zero);
endmodule
