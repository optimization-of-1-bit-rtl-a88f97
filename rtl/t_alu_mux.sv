// t_alu_mux: output multiplexer of the one-trit ternary ALU.
//
// Combinational. The binary select s chooses the operation class
// (0 arithmetic, 1 logic) and the select trits a and b choose the
// operation within it, code k = 3*a + b (see ternary_pkg). The multiplexer
// is built from ternary gates only:
//   * two ternary decoders turn a and b into literals; the TAND of literal
//     a^i and literal b^j is gamma for exactly one code k = 3i + j,
//   * s becomes the trit gamma (s = 1) or alpha (s = 0), and its simple
//     inverse selects the other class,
//   * each candidate result is TANDed with its select line (gamma passes the
//     result, alpha blocks it) and all are TORed together.
// Arithmetic codes 4..8 have no operation: f and cout are alpha and
// op_valid is 0 (this design's choice for the unassigned rows). cout
// carries the carry/borrow of an arithmetic result and is alpha for logic
// operations.
module t_alu_mux
  import ternary_pkg::*;
(
  input  logic       s,
  input  trit_t      a,
  input  trit_t      b,
  input  trit_pair_t arith     [NUM_ARITH_OPS],
  input  trit_t      logic_res [NUM_LOGIC_OPS],
  output trit_t      f,
  output trit_t      cout,
  output logic       op_valid
);

  trit_t la [3];
  trit_t lb [3];
  trit_t unused_a [3];
  trit_t unused_b [3];

  t_decoder u_dec_a (
    .x(a), .lit_a(la[0]), .lit_b(la[1]), .lit_c(la[2]),
    .lit_ab(unused_a[0]), .lit_bc(unused_a[1]), .lit_ac(unused_a[2])
  );

  t_decoder u_dec_b (
    .x(b), .lit_a(lb[0]), .lit_b(lb[1]), .lit_c(lb[2]),
    .lit_ab(unused_b[0]), .lit_bc(unused_b[1]), .lit_ac(unused_b[2])
  );

  trit_t sel [NUM_LOGIC_OPS];
  trit_t s_logic, s_arith, valid_t;

  always_comb begin
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++)
        sel[3*i+j] = t_and(la[i], lb[j]);

    s_logic = s ? T_GAMMA : T_ALPHA;
    s_arith = t_sti(s_logic);

    f       = T_ALPHA;
    cout    = T_ALPHA;
    valid_t = s_logic;
    for (int k = 0; k < NUM_ARITH_OPS; k++) begin
      f       = t_or(f,    t_and(t_and(s_arith, sel[k]), trit_of(arith[k].value)));
      cout    = t_or(cout, t_and(t_and(s_arith, sel[k]), trit_of(arith[k].carry)));
      valid_t = t_or(valid_t, t_and(s_arith, sel[k]));
    end
    for (int k = 0; k < NUM_LOGIC_OPS; k++)
      f = t_or(f, t_and(t_and(s_logic, sel[k]), trit_of(logic_res[k])));

    op_valid = (valid_t == T_GAMMA);
  end

endmodule
