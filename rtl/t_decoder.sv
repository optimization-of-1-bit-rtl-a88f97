// t_decoder: ternary decoder, one trit to its six literals.
//
// A literal is two-valued: gamma when the input lies in its set, alpha
// otherwise. Outputs, all combinational:
//   lit_a  X^alpha      lit_ab  X^alpha-beta  = X^alpha + X^beta
//   lit_b  X^beta       lit_bc  X^beta-gamma  = X^beta  + X^gamma
//   lit_c  X^gamma      lit_ac  X^alpha-gamma = X^alpha + X^gamma
// As in the ternary decoder of the design, the single-value literals come
// from one general ternary inverter:
//   X^alpha = NTI(x),  X^gamma = NTI(STI(x)),  X^beta = PTI(x) . STI(NTI(x))
// and the two-value literals are the TOR (maximum) of two of them.
// "+" is TOR (maximum) and "." is TAND (minimum).
module t_decoder
  import ternary_pkg::*;
(
  input  trit_t x,
  output trit_t lit_a,
  output trit_t lit_b,
  output trit_t lit_c,
  output trit_t lit_ab,
  output trit_t lit_bc,
  output trit_t lit_ac
);

  trit_t sti_x, pti_x, nti_x;

  t_inverter u_gti (
    .x   (x),
    .sti (sti_x),
    .pti (pti_x),
    .nti (nti_x)
  );

  always_comb begin
    lit_a  = nti_x;
    lit_c  = t_nti(sti_x);
    lit_b  = t_and(pti_x, t_sti(nti_x));
    lit_ab = t_or(lit_a, lit_b);
    lit_bc = t_or(lit_b, lit_c);
    lit_ac = t_or(lit_a, lit_c);
  end

endmodule
