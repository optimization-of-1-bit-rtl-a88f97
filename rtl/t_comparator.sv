// t_comparator: one-trit ternary magnitude comparator.
//
// Combinational. A ternary output can hold all three outcomes of a
// comparison in one trit, so this design reports
//   result = alpha if x < y,  beta if x = y,  gamma if x > y
// (the description names the comparator but not its output code; this
// encoding is this design's choice).
module t_comparator
  import ternary_pkg::*;
(
  input  trit_t x,
  input  trit_t y,
  output trit_t result
);

  trit_t xn, yn;

  always_comb begin
    xn = trit_of(x);
    yn = trit_of(y);
    if (xn < yn)      result = T_ALPHA;
    else if (xn == yn) result = T_BETA;
    else              result = T_GAMMA;
  end

endmodule
