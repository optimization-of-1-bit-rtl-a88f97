// t_half_adder: ternary half adder for one trit.
//
// Combinational. x + y ranges over 0..4; sum is (x + y) mod 3 and carry is
// beta (weight 1) when x + y >= 3, else alpha. There is no carry input:
// the design adds two single trits, and a carry out of the slice is
// reported on carry. The description gives the function only; this is the
// direct arithmetic form of it.
module t_half_adder
  import ternary_pkg::*;
(
  input  trit_t x,
  input  trit_t y,
  output trit_t sum,
  output trit_t carry
);

  logic [2:0] total;

  always_comb begin
    total = {1'b0, t_val(trit_of(x))} + {1'b0, t_val(trit_of(y))};
    if (total >= 3'd3) begin
      sum   = trit_t'(2'(total - 3'd3));
      carry = T_BETA;
    end else begin
      sum   = trit_t'(total[1:0]);
      carry = T_ALPHA;
    end
  end

endmodule
