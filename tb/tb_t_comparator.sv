// tb_t_comparator: exhaustive check of the one-trit ternary comparator.
//
// For all nine (x, y) pairs, plus pairs using the non-trit code 2'b11
// (read as gamma), checks that the result trit is alpha for x < y, beta
// for x = y and gamma for x > y, comparing integer weights 0, 1, 2.
// Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_t_comparator;
  import ternary_pkg::*;

  trit_t x, y, result;
  int checks = 0, failures = 0;

  t_comparator dut (.x(x), .y(y), .result(result));

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
        int a, b;
        x = trit_t'(xv[1:0]);
        y = trit_t'(yv[1:0]);
        a = (xv == 3) ? 2 : xv;
        b = (yv == 3) ? 2 : yv;
        #1;
        check($sformatf("cmp(%0d,%0d)", xv, yv), int'(result),
              (a < b) ? 0 : ((a == b) ? 1 : 2));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
