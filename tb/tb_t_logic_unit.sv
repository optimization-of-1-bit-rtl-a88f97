// tb_t_logic_unit: exhaustive check of the nine ternary logic operations.
//
// For all nine (x, y) pairs, plus pairs using the non-trit code 2'b11
// (read as gamma), compares every output with the basic-gate truth table,
// written out here as constants in row order (x,y) = (0,0), (0,1), ...,
// (2,2). Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_t_logic_unit;
  import ternary_pkg::*;

  trit_t x, y;
  trit_t res [NUM_LOGIC_OPS];
  int checks = 0, failures = 0;

  // rows: TAND, TOR, Ex-OR, STNAND, PTNAND, NTNAND, STNOR, PTNOR, NTNOR
  localparam int EXP [9][9] = '{
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
  localparam string NAMES [9] = '{"TAND", "TOR", "EXOR", "STNAND", "PTNAND",
                                  "NTNAND", "STNOR", "PTNOR", "NTNOR"};

  t_logic_unit dut (.x(x), .y(y), .res(res));

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
    for (int xv = 0; xv < 4; xv++)
      for (int yv = 0; yv < 4; yv++) begin
        int row;
        x = trit_t'(xv[1:0]);
        y = trit_t'(yv[1:0]);
        row = 3 * ((xv == 3) ? 2 : xv) + ((yv == 3) ? 2 : yv);
        #1;
        for (int k = 0; k < 9; k++)
          check($sformatf("%s(%0d,%0d)", NAMES[k], xv, yv), int'(res[k]), EXP[k][row]);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
