// t_logic_unit: the nine ternary logic operations of the ALU (S = 1).
//
// Combinational. res[k] holds operation k of ternary_pkg::logic_op_t:
//   TAND   = MIN(x,y)             TOR   = MAX(x,y)
//   Ex-OR  = x.STI(y) + STI(x).y
//   STNAND, PTNAND, NTNAND = STI, PTI, NTI of MIN(x,y)
//   STNOR,  PTNOR,  NTNOR  = STI, PTI, NTI of MAX(x,y)
// The NAND and NOR families are a TAND or TOR followed by one general
// ternary inverter, which gives the three inverted forms at once. The
// ternary Ex-OR is not tabulated by the design's description; this unit
// uses the sum-of-products form with the simple inverter as complement
// (alpha where x = y = alpha or x = y = gamma, beta where either is beta,
// gamma where exactly one is gamma and the other alpha).
module t_logic_unit
  import ternary_pkg::*;
(
  input  trit_t x,
  input  trit_t y,
  output trit_t res [NUM_LOGIC_OPS]
);

  trit_t xn, yn, mn, mx;
  trit_t nand_sti, nand_pti, nand_nti;
  trit_t nor_sti, nor_pti, nor_nti;
  trit_t sti_x, sti_y;
  trit_t unused_pti_x, unused_nti_x, unused_pti_y, unused_nti_y;

  always_comb begin
    xn = trit_of(x);
    yn = trit_of(y);
    mn = t_and(xn, yn);
    mx = t_or(xn, yn);
  end

  t_inverter u_nand (.x(mn), .sti(nand_sti), .pti(nand_pti), .nti(nand_nti));
  t_inverter u_nor  (.x(mx), .sti(nor_sti),  .pti(nor_pti),  .nti(nor_nti));
  t_inverter u_xinv (.x(xn), .sti(sti_x), .pti(unused_pti_x), .nti(unused_nti_x));
  t_inverter u_yinv (.x(yn), .sti(sti_y), .pti(unused_pti_y), .nti(unused_nti_y));

  always_comb begin
    res[LOP_TAND]   = mn;
    res[LOP_TOR]    = mx;
    res[LOP_XOR]    = t_or(t_and(xn, sti_y), t_and(sti_x, yn));
    res[LOP_STNAND] = nand_sti;
    res[LOP_PTNAND] = nand_pti;
    res[LOP_NTNAND] = nand_nti;
    res[LOP_STNOR]  = nor_sti;
    res[LOP_PTNOR]  = nor_pti;
    res[LOP_NTNOR]  = nor_nti;
  end

endmodule
