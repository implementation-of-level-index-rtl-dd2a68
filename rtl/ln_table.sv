// ln_table: look-up of ln s' for the leading bits of a normalised c_j.
//
// After normalisation c' = c_j * 2^p lies in [1, 2); its six most significant bits
// s' = 1.b1b2b3b4b5 select one of 32 entries ln(1 + idx/32), idx = b1..b5, held to LF
// fraction bits. The entries are computed at elaboration from that formula.
// The table and its 6-bit argument follow the paper; its word length is this design's.
// Interface: combinational read.
module ln_table #(
  parameter int unsigned LF = 50
) (
  input  logic [4:0]  idx,
  output logic [LF:0] v
);
  function automatic logic [LF:0] entry(int i);
    longint q;
    q = longint'($ln(1.0 + real'(i) / 32.0) * (2.0 ** LF));
    return (LF+1)'(q);
  endfunction

  logic [LF:0] rom [32];

  for (genvar i = 0; i < 32; i++) begin : g_ent
    localparam logic [LF:0] E = entry(i);
    assign rom[i] = E;
  end

  assign v = rom[idx];
endmodule
