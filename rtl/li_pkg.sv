// li_pkg: number formats and shared constants of the level-index add/subtract unit.
//
// An li number x = l + f is held as a 3-bit level l and a 28-bit index f (a binary
// fraction); packed together {level, index} is simply x as a fixed-point value with 28
// fraction bits. Inside the unit every quantity is unsigned fixed point:
//   a_j, b_j, table entries : Q1.41 in 42-bit words (the 42-bit words of the look-up table)
//   t, t'                   : Q5.37 in 42 bits, cut into seven 6-bit packets for the table
//   c_j, H                  : Q2.41 in 43 bits (c_0 = 1 + b_0 can reach 2)
//   ln c_j                  : signed Q6.41 in 48 bits
// The 42-bit word, the 5 integer bits of t and the 6-bit packets follow the paper; the
// 28-bit index, the Q2.41 and Q6.41 formats are this design's choices.
package li_pkg;
  localparam int unsigned LVL_W   = 3;   // level field of an li operand
  localparam int unsigned IDX_W   = 28;  // index (fraction) field of an li operand
  localparam int unsigned FX_W    = 42;  // a_j, b_j and table word width
  localparam int unsigned FX_F    = 41;  // fraction bits of those words
  localparam int unsigned T_W     = 42;  // table argument t
  localparam int unsigned T_F     = 37;  // fraction bits of t (5 integer bits)
  localparam int unsigned PKT_W   = 6;   // bits per table packet
  localparam int unsigned N_PKT   = 7;   // packets per t (7 x 6 = 42)
  localparam int unsigned C_W     = 43;  // c_j and H: Q2.41
  localparam int unsigned LN_W    = 48;  // ln c_j: signed Q6.41
  // Levels from which phi(x) +- phi(y) rounds to phi(x) (x > y).
  localparam int unsigned TRIVIAL_LEVEL = 6;

  typedef struct packed {
    logic [LVL_W-1:0] level;
    logic [IDX_W-1:0] index;
  } li_t;

  typedef enum logic {OP_ADD = 1'b0, OP_SUB = 1'b1} op_e;

  // Table argument with a saturation flag: sat means t >= 32, so exp(-t) < 2^-46 is 0.
  typedef struct packed {
    logic           sat;
    logic [T_W-1:0] t;
  } targ_t;

  localparam logic [FX_W-1:0] FX_ONE = FX_W'(1) << FX_F;

  // v * 2^k as a Q5.37 table argument; v has vf fraction bits (vf >= T_F).
  function automatic targ_t to_targ(input logic [127:0] v, input int unsigned vf,
                                    input logic [5:0] k);
    logic [191:0] w;
    targ_t o;
    w = {64'b0, v} << k;
    w = w >> (vf - T_F);
    o.sat = |w[191:T_W];
    o.t   = w[T_W-1:0];
    return o;
  endfunction
endpackage
