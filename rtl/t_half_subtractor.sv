// t_half_subtractor: ternary half subtractor for one trit.
//
// Combinational. diff is (x - y) mod 3 and borrow is beta (weight 1) when
// x < y, else alpha, so that x - y = diff - 3*borrow. There is no borrow
// input. The description gives the function only; this is the direct
// arithmetic form of it.
module t_half_subtractor
  import ternary_pkg::*;
(
  input  trit_t x,
  input  trit_t y,
  output trit_t diff,
  output trit_t borrow
);

  logic [1:0] xv, yv;

  always_comb begin
    xv = t_val(trit_of(x));
    yv = t_val(trit_of(y));
    if (xv < yv) begin
      diff   = trit_t'(2'(3'd3 + {1'b0, xv} - {1'b0, yv}));
      borrow = T_BETA;
    end else begin
      diff   = trit_t'(xv - yv);
      borrow = T_ALPHA;
    end
  end

endmodule
