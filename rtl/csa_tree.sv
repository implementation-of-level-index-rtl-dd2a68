// csa_tree: reduces N operands to a "double number" (a sum word and a carry word) with
// layers of 3:2 carry-save adders, so that no carry propagates until the single final
// carry-propagate add done by the user (sum + carry).
//
// Each layer takes the operands in groups of three and replaces each group by its bitwise
// sum and its shifted majority (carry); operands left over pass to the next layer. The
// number of layers is the usual Wallace-tree count (42 operands: 8 layers). Arithmetic is
// modulo 2^W, so two's-complement operands work when sign-extended to W bits.
// Purely combinational. The carry-save principle is the paper's; the tree shape is the
// plain Wallace arrangement chosen here.
module csa_tree #(
  parameter int unsigned N = 3,
  parameter int unsigned W = 16
) (
  input  logic [N-1:0][W-1:0] ops,
  output logic [W-1:0]        sum,
  output logic [W-1:0]        carry
);
  function automatic int unsigned count_at(int unsigned n, int unsigned lv);
    int unsigned cnt;
    cnt = n;
    for (int unsigned i = 0; i < lv; i++) cnt = cnt - cnt / 3;
    return cnt;
  endfunction

  function automatic int unsigned n_layers(int unsigned n);
    int unsigned cnt, layers;
    cnt    = n;
    layers = 0;
    while (cnt > 2) begin
      cnt = cnt - cnt / 3;
      layers++;
    end
    return layers;
  endfunction

  localparam int unsigned L = n_layers(N);

  if (N == 1) begin : g_one
    assign sum   = ops[0];
    assign carry = '0;
  end else if (L == 0) begin : g_two
    assign sum   = ops[0];
    assign carry = ops[1];
  end else begin : g_tree
    for (genvar lv = 0; lv < L; lv++) begin : g_lvl
      localparam int unsigned C = count_at(N, lv);
      localparam int unsigned G = C / 3;
      localparam int unsigned O = C - G;
      logic [C-1:0][W-1:0] in_v;
      logic [O-1:0][W-1:0] out_v;
      if (lv == 0) begin : g_first
        assign in_v = ops;
      end else begin : g_next
        assign in_v = g_lvl[lv-1].out_v;
      end
      for (genvar gi = 0; gi < G; gi++) begin : g_csa
        assign out_v[2*gi]   = in_v[3*gi] ^ in_v[3*gi+1] ^ in_v[3*gi+2];
        assign out_v[2*gi+1] = ((in_v[3*gi] & in_v[3*gi+1]) | (in_v[3*gi] & in_v[3*gi+2]) |
                                (in_v[3*gi+1] & in_v[3*gi+2])) << 1;
      end
      for (genvar r = 0; r < C - 3*G; r++) begin : g_pass
        assign out_v[2*G+r] = in_v[3*G+r];
      end
    end
    assign sum   = g_lvl[L-1].out_v[0];
    assign carry = g_lvl[L-1].out_v[1];
  end
endmodule
