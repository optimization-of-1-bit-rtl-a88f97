// tb_t_inverter: exhaustive check of the general ternary inverter.
//
// Drives the three trits (and the non-trit code 2'b11, which must read as
// gamma) and compares STI, PTI and NTI with the inverter truth table,
// written out here as constants. Ends with a TB_RESULT line; a watchdog
// stops a hung run.
module tb_t_inverter;
  import ternary_pkg::*;

  trit_t x, sti, pti, nti;
  int checks = 0, failures = 0;

  // expected outputs for inputs alpha, beta, gamma (weights 0,1,2)
  localparam int EXP_STI [3] = '{2, 1, 0};
  localparam int EXP_PTI [3] = '{2, 2, 0};
  localparam int EXP_NTI [3] = '{2, 0, 0};

  t_inverter dut (.x(x), .sti(sti), .pti(pti), .nti(nti));

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
      check($sformatf("STI(%0d)", v), int'(sti), EXP_STI[r]);
      check($sformatf("PTI(%0d)", v), int'(pti), EXP_PTI[r]);
      check($sformatf("NTI(%0d)", v), int'(nti), EXP_NTI[r]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
