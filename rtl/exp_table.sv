// exp_table: the shared partial look-up table for exp(-t).
//
// The argument t (Q5.37, 42 bits) is cut into seven 6-bit packets t_1 .. t_7, t_1 being the
// most significant (it holds the 5 integer bits and the first fraction bit). Because the
// packets cover disjoint bit ranges, exp(-t) = exp(-t_1) * ... * exp(-t_7), and the seven
// factors are read at once from seven 64-entry sub-tables. Sub-table i (0-based) holds
// exp(-v * 2^(-1-6i)) for v = 0..63, rounded to Q1.41 (42-bit words), so the table holds
// 64 x 7 x 42 = 18,816 bits, as in the paper. The entries are computed at elaboration
// from that formula. There is one read port: the paper keeps a single copy of the table
// on the chip, so the a_j and b_j look-ups of one step take turns.
// Timing (this design's choice): synchronous read, the factors appear one clock after t.
module exp_table import li_pkg::*; (
  input  logic                       clk,
  input  logic [T_W-1:0]             t,
  output logic [N_PKT-1:0][FX_W-1:0] e
);
  function automatic logic [FX_W-1:0] entry(int blk, int v);
    real    arg;
    longint q;
    arg = real'(v) * (2.0 ** (-1 - 6 * blk));
    q = longint'($exp(-arg) * (2.0 ** FX_F));
    return FX_W'(q);
  endfunction

  logic [FX_W-1:0] rom [N_PKT][64];

  for (genvar blk = 0; blk < N_PKT; blk++) begin : g_blk
    for (genvar v = 0; v < 64; v++) begin : g_ent
      localparam logic [FX_W-1:0] E = entry(blk, v);
      assign rom[blk][v] = E;
    end
  end

  always_ff @(posedge clk) begin
    for (int blk = 0; blk < N_PKT; blk++) begin
      e[blk] <= rom[blk][t[T_W-1-PKT_W*blk -: PKT_W]];
    end
  end
endmodule
