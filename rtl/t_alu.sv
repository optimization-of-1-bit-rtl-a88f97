// t_alu: one-trit (1-bit slice) ternary arithmetic logic unit.
//
// Operands x and y are trits (alpha < beta < gamma, weights 0, 1, 2, on
// the two-wire code of ternary_pkg). A binary select s and two select
// trits a, b pick one of 13 operations, code k = 3*a + b:
//   s = 0 (arithmetic)              s = 1 (logic)
//   k=0 add       f=sum  cout=carry   TAND    k=5 NTNAND
//   k=1 subtract  f=diff cout=borrow  TOR     k=6 STNOR
//   k=2 multiply  f=prod cout=carry   Ex-OR   k=7 PTNOR
//   k=3 compare   f=alpha/beta/gamma  STNAND  k=8 NTNOR
//                 for x<y, x=y, x>y   k=4 PTNAND
//   k=4..8 unassigned: f = cout = alpha, op_valid = 0
// The operation table, the units (ternary half adder, half subtractor,
// multiplier, comparator, logic gates) and the final multiplexer follow the
// ternary ALU slice of the design. The binary code of a trit, the
// comparator's output code, the Ex-OR truth table, cout and op_valid are
// this design's own choices. Every unit works in parallel and the
// multiplexer picks one result: the slice is purely combinational, with
// no clock, no reset and a result valid one propagation delay after the
// inputs change.
module t_alu
  import ternary_pkg::*;
(
  input  logic  s,
  input  trit_t a,
  input  trit_t b,
  input  trit_t x,
  input  trit_t y,
  output trit_t f,
  output trit_t cout,
  output logic  op_valid
);

  trit_pair_t arith     [NUM_ARITH_OPS];
  trit_t      logic_res [NUM_LOGIC_OPS];

  t_half_adder u_add (
    .x(x), .y(y), .sum(arith[OP_ADD].value), .carry(arith[OP_ADD].carry)
  );

  t_half_subtractor u_sub (
    .x(x), .y(y), .diff(arith[OP_SUB].value), .borrow(arith[OP_SUB].carry)
  );

  t_multiplier u_mul (
    .x(x), .y(y), .product(arith[OP_MUL].value), .carry(arith[OP_MUL].carry)
  );

  t_comparator u_cmp (
    .x(x), .y(y), .result(arith[OP_CMP].value)
  );
  assign arith[OP_CMP].carry = T_ALPHA;

  t_logic_unit u_logic (
    .x(x), .y(y), .res(logic_res)
  );

  t_alu_mux u_mux (
    .s(s), .a(a), .b(b), .arith(arith), .logic_res(logic_res),
    .f(f), .cout(cout), .op_valid(op_valid)
  );

endmodule
