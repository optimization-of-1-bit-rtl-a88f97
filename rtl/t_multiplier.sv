// t_multiplier: one-trit ternary multiplier.
//
// Combinational. x * y ranges over 0, 1, 2, 4; product is (x * y) mod 3
// and carry is (x * y) div 3. Only gamma * gamma = 4 = 1*3 + 1 carries
// (product beta, carry beta). The description gives the function only; this
// is the direct arithmetic form of it.
module t_multiplier
  import ternary_pkg::*;
(
  input  trit_t x,
  input  trit_t y,
  output trit_t product,
  output trit_t carry
);

  logic [3:0] p;

  always_comb begin
    p = {2'b00, t_val(trit_of(x))} * {2'b00, t_val(trit_of(y))};
    if (p >= 4'd3) begin
      product = trit_t'(2'(p - 4'd3));
      carry   = T_BETA;
    end else begin
      product = trit_t'(p[1:0]);
      carry   = T_ALPHA;
    end
  end

endmodule
