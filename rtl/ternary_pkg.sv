// ternary_pkg: shared types and operators for the one-trit ternary ALU.
//
// A trit (ternary digit) takes one of three ordered values alpha < beta < gamma.
// In the unbalanced voltage mode these are 0 V, V/2 and V; in this RTL each
// trit is carried on two binary wires with alpha = 2'b00, beta = 2'b01 and
// gamma = 2'b10 (this binary encoding is a choice of this design; the
// ternary values and their order follow the ternary switching algebra).
// The code 2'b11 is not a trit. Every block reads its trit inputs through
// trit_of(), which treats 2'b11 as gamma (the upper bit set means "high"),
// so no block can produce a value outside the three legal codes.
//
// Operators, all combinational:
//   t_and / t_or    TAND = MIN, TOR = MAX of two trits
//   t_sti           simple ternary inverter,   STI(x) = gamma - x
//   t_pti           positive ternary inverter, gamma unless x = gamma (then alpha)
//   t_nti           negative ternary inverter, gamma if x = alpha, else alpha
//   t_lit           literal X^i: gamma if x = i, else alpha
package ternary_pkg;

  typedef enum logic [1:0] {
    T_ALPHA = 2'b00,  // logic low
    T_BETA  = 2'b01,  // intermediate
    T_GAMMA = 2'b10   // logic high
  } trit_t;

  // Operation codes of the ALU as the select trits (A,B) give them: the
  // index is 3*A + B, so (alpha,alpha)=0 ... (gamma,gamma)=8.
  typedef enum logic [1:0] {
    OP_ADD  = 2'd0,   // S=0: (alpha,alpha)
    OP_SUB  = 2'd1,   // S=0: (alpha,beta)
    OP_MUL  = 2'd2,   // S=0: (alpha,gamma)
    OP_CMP  = 2'd3    // S=0: (beta,alpha)
  } arith_op_t;

  typedef enum logic [3:0] {
    LOP_TAND   = 4'd0,  // S=1: (alpha,alpha)
    LOP_TOR    = 4'd1,  // S=1: (alpha,beta)
    LOP_XOR    = 4'd2,  // S=1: (alpha,gamma)
    LOP_STNAND = 4'd3,  // S=1: (beta,alpha)
    LOP_PTNAND = 4'd4,  // S=1: (beta,beta)
    LOP_NTNAND = 4'd5,  // S=1: (beta,gamma)
    LOP_STNOR  = 4'd6,  // S=1: (gamma,alpha)
    LOP_PTNOR  = 4'd7,  // S=1: (gamma,beta)
    LOP_NTNOR  = 4'd8   // S=1: (gamma,gamma)
  } logic_op_t;

  localparam int unsigned NUM_ARITH_OPS = 4;
  localparam int unsigned NUM_LOGIC_OPS = 9;

  // A result trit together with its carry (or borrow) trit.
  typedef struct packed {
    trit_t carry;
    trit_t value;
  } trit_pair_t;

  // Read two wires as a trit; the unused code 2'b11 counts as gamma.
  function automatic trit_t trit_of(logic [1:0] code);
    return code[1] ? T_GAMMA : trit_t'(code);
  endfunction

  // Integer weight 0, 1 or 2 of a trit.
  function automatic logic [1:0] t_val(trit_t t);
    return 2'(t);
  endfunction

  function automatic trit_t t_and(trit_t p, trit_t q);
    return (p < q) ? p : q;
  endfunction

  function automatic trit_t t_or(trit_t p, trit_t q);
    return (p > q) ? p : q;
  endfunction

  function automatic trit_t t_sti(trit_t p);
    return trit_t'(2'd2 - t_val(p));
  endfunction

  function automatic trit_t t_pti(trit_t p);
    return (p == T_GAMMA) ? T_ALPHA : T_GAMMA;
  endfunction

  function automatic trit_t t_nti(trit_t p);
    return (p == T_ALPHA) ? T_GAMMA : T_ALPHA;
  endfunction

  function automatic trit_t t_lit(trit_t p, trit_t i);
    return (p == i) ? T_GAMMA : T_ALPHA;
  endfunction

endpackage
