// tb_t_half_adder: exhaustive check of the ternary half adder.
//
// For all nine (x, y) pairs, plus pairs using the non-trit code 2'b11
// (read as gamma), compares the outputs with plain integer arithmetic on
// the trit weights 0, 1, 2: x + y = sum + 3*carry.
// Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_t_half_adder;
  import ternary_pkg::*;

  trit_t x, y, o_val, o_car;
  int checks = 0, failures = 0;

  t_half_adder dut (.x(x), .y(y), .sum(o_val), .carry(o_car));

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
        int a, b, ev, ec;
        x = trit_t'(xv[1:0]);
        y = trit_t'(yv[1:0]);
        a = (xv == 3) ? 2 : xv;
        b = (yv == 3) ? 2 : yv;
        ev = (a + b) % 3; ec = (a + b) / 3;
        #1;
        check($sformatf("value(%0d,%0d)", xv, yv), int'(o_val), ev);
        check($sformatf("carry(%0d,%0d)", xv, yv), int'(o_car), ec);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
