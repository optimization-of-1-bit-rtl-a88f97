// tb_t_decoder: exhaustive check of the ternary decoder.
//
// For every trit (and the non-trit code 2'b11, read as gamma) compares the
// six literals with the unary-function table, written out here as
// constants: a literal is gamma (2) when the input is in its set and
// alpha (0) otherwise. Ends with a TB_RESULT line; a watchdog stops a hung
// run.
module tb_t_decoder;
  import ternary_pkg::*;

  trit_t x, la, lb, lc, lab, lbc, lac;
  int checks = 0, failures = 0;

  localparam int EXP_A  [3] = '{2, 0, 0};
  localparam int EXP_B  [3] = '{0, 2, 0};
  localparam int EXP_C  [3] = '{0, 0, 2};
  localparam int EXP_AB [3] = '{2, 2, 0};
  localparam int EXP_BC [3] = '{0, 2, 2};
  localparam int EXP_AC [3] = '{2, 0, 2};

  t_decoder dut (.x(x), .lit_a(la), .lit_b(lb), .lit_c(lc),
                 .lit_ab(lab), .lit_bc(lbc), .lit_ac(lac));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int r;
      x = trit_t'(v[1:0]);
      r = (v == 3) ? 2 : v;
      #1;
      check($sformatf("X^a(%0d)", v),  int'(la),  EXP_A[r]);
      check($sformatf("X^b(%0d)", v),  int'(lb),  EXP_B[r]);
      check($sformatf("X^c(%0d)", v),  int'(lc),  EXP_C[r]);
      check($sformatf("X^ab(%0d)", v), int'(lab), EXP_AB[r]);
      check($sformatf("X^bc(%0d)", v), int'(lbc), EXP_BC[r]);
      check($sformatf("X^ac(%0d)", v), int'(lac), EXP_AC[r]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
