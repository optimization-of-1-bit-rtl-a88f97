// tb_t_alu: end-to-end check of the one-trit ternary ALU.
//
// Runs every combination of the operation select (s, a, b) with every
// pair of operand trits, 2 x 9 x 9 = 162 cases, against a reference model
// kept in this file: integer arithmetic on the trit weights 0, 1, 2 for
// add, subtract, multiply and compare, and the basic-gate truth table
// for the nine logic operations. It counts how often each mechanism of the
// slice occurs (each of the 13 operations, an addition carry, a
// subtraction borrow, a multiplication carry, each comparator outcome, an
// unassigned select code) and fails if any never occurred. The ALU is used
// with its default (and only) configuration. Ends with a TB_RESULT line; a
// watchdog stops a hung run.
module tb_t_alu;
  import ternary_pkg::*;

  logic  s, op_valid;
  trit_t a, b, x, y, f, cout;
  int checks = 0, failures = 0;

  // Logic operations in row order (x,y) = (0,0), (0,1), ..., (2,2).
  // rows: TAND, TOR, Ex-OR, STNAND, PTNAND, NTNAND, STNOR, PTNOR, NTNOR
  localparam int LOGIC_TABLE [9][9] = '{
    '{0, 0, 0, 0, 1, 1, 0, 1, 2},
    '{0, 1, 2, 1, 1, 2, 2, 2, 2},
    '{0, 1, 2, 1, 1, 1, 2, 1, 0},
    '{2, 2, 2, 2, 1, 1, 2, 1, 0},
    '{2, 2, 2, 2, 2, 2, 2, 2, 0},
    '{2, 2, 2, 2, 0, 0, 2, 0, 0},
    '{2, 1, 0, 1, 1, 0, 0, 0, 0},
    '{2, 2, 0, 2, 2, 0, 0, 0, 0},
    '{2, 0, 0, 0, 0, 0, 0, 0, 0}
  };

  // event counters
  int n_op [2][9];
  int n_add_carry = 0, n_sub_borrow = 0, n_mul_carry = 0;
  int n_cmp_lt = 0, n_cmp_eq = 0, n_cmp_gt = 0, n_unassigned = 0;

  t_alu dut (.s(s), .a(a), .b(b), .x(x), .y(y),
             .f(f), .cout(cout), .op_valid(op_valid));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic require(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (n_op[i, j]) n_op[i][j] = 0;
    for (int sv = 0; sv < 2; sv++)
      for (int k = 0; k < 9; k++)
        for (int xv = 0; xv < 3; xv++)
          for (int yv = 0; yv < 3; yv++) begin
            int ef, ec, ev;
            s = sv[0];
            a = trit_t'(2'(k / 3));
            b = trit_t'(2'(k % 3));
            x = trit_t'(2'(xv));
            y = trit_t'(2'(yv));
            #1;
            ev = 1; ec = 0;
            if (sv == 1) begin
              ef = LOGIC_TABLE[k][3*xv + yv];
            end else begin
              case (k)
                0: begin ef = (xv + yv) % 3;     ec = (xv + yv) / 3; end
                1: begin ef = (xv - yv + 3) % 3; ec = (xv < yv) ? 1 : 0; end
                2: begin ef = (xv * yv) % 3;     ec = (xv * yv) / 3; end
                3: ef = (xv < yv) ? 0 : ((xv == yv) ? 1 : 2);
                default: begin ef = 0; ev = 0; end
              endcase
            end
            check($sformatf("f s=%0d a=%0d b=%0d x=%0d y=%0d", sv, k/3, k%3, xv, yv), int'(f), ef);
            check($sformatf("cout s=%0d a=%0d b=%0d x=%0d y=%0d", sv, k/3, k%3, xv, yv), int'(cout), ec);
            check($sformatf("op_valid s=%0d a=%0d b=%0d", sv, k/3, k%3), int'(op_valid), ev);

            // count what the ALU itself showed
            if (op_valid) n_op[sv][k]++;
            else          n_unassigned++;
            if (op_valid && !s && k == 0 && cout == T_BETA) n_add_carry++;
            if (op_valid && !s && k == 1 && cout == T_BETA) n_sub_borrow++;
            if (op_valid && !s && k == 2 && cout == T_BETA) n_mul_carry++;
            if (op_valid && !s && k == 3 && f == T_ALPHA) n_cmp_lt++;
            if (op_valid && !s && k == 3 && f == T_BETA)  n_cmp_eq++;
            if (op_valid && !s && k == 3 && f == T_GAMMA) n_cmp_gt++;
          end

    for (int k = 0; k < 4; k++) require($sformatf("arithmetic op %0d", k), n_op[0][k]);
    for (int k = 0; k < 9; k++) require($sformatf("logic op %0d", k), n_op[1][k]);
    require("addition carry", n_add_carry);
    require("subtraction borrow", n_sub_borrow);
    require("multiplication carry", n_mul_carry);
    require("compare less", n_cmp_lt);
    require("compare equal", n_cmp_eq);
    require("compare greater", n_cmp_gt);
    require("unassigned select code", n_unassigned);
    $display("events: add_carry=%0d sub_borrow=%0d mul_carry=%0d cmp lt/eq/gt=%0d/%0d/%0d unassigned=%0d",
             n_add_carry, n_sub_borrow, n_mul_carry, n_cmp_lt, n_cmp_eq, n_cmp_gt, n_unassigned);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
