// t_inverter: general ternary inverter (GTI).
//
// One trit in, its three ternary inverses out, all combinational:
//   sti  simple ternary inverter,   gamma - x          (alpha->gamma, beta->beta,  gamma->alpha)
//   pti  positive ternary inverter                     (alpha->gamma, beta->gamma, gamma->alpha)
//   nti  negative ternary inverter                     (alpha->gamma, beta->alpha, gamma->alpha)
// These are the three inverter types of the ternary switching algebra and
// the base cell of the decoder and of the NAND/NOR gate families. Trits use
// the two-wire code of ternary_pkg; an input of 2'b11 is read as gamma.
module t_inverter
  import ternary_pkg::*;
(
  input  trit_t x,
  output trit_t sti,
  output trit_t pti,
  output trit_t nti
);

  trit_t xn;

  always_comb begin
    xn  = trit_of(x);
    sti = t_sti(xn);
    pti = t_pti(xn);
    nti = t_nti(xn);
  end

endmodule
