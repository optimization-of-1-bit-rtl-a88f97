// tb_t_alu_mux: check of the ALU output multiplexer.
//
// For every select (s, a, b), over many rounds of random candidate
// results on all inputs, checks that f and cout carry the candidate named
// by code k = 3*a + b of the chosen class, that codes 4..8 of the
// arithmetic class give alpha on both and drop op_valid, and that logic
// operations leave cout at alpha. Ends with a TB_RESULT line; a watchdog
// stops a hung run.
module tb_t_alu_mux;
  import ternary_pkg::*;

  logic       s, op_valid;
  trit_t      a, b, f, cout;
  trit_pair_t arith     [NUM_ARITH_OPS];
  trit_t      logic_res [NUM_LOGIC_OPS];
  int checks = 0, failures = 0;

  t_alu_mux dut (.s(s), .a(a), .b(b), .arith(arith), .logic_res(logic_res),
                 .f(f), .cout(cout), .op_valid(op_valid));

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic trit_t rand_trit();
    return trit_t'(2'($urandom_range(0, 2)));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int round = 0; round < 40; round++) begin
      for (int k = 0; k < NUM_ARITH_OPS; k++) begin
        arith[k].value = rand_trit();
        arith[k].carry = rand_trit();
      end
      for (int k = 0; k < NUM_LOGIC_OPS; k++) logic_res[k] = rand_trit();
      for (int sv = 0; sv < 2; sv++)
        for (int k = 0; k < 9; k++) begin
          int ef, ec, ev;
          s = sv[0];
          a = trit_t'(2'(k / 3));
          b = trit_t'(2'(k % 3));
          #1;
          if (sv == 1) begin
            ef = int'(logic_res[k]); ec = 0; ev = 1;
          end else if (k < 4) begin
            ef = int'(arith[k].value); ec = int'(arith[k].carry); ev = 1;
          end else begin
            ef = 0; ec = 0; ev = 0;
          end
          check($sformatf("f s=%0d k=%0d", sv, k), int'(f), ef);
          check($sformatf("cout s=%0d k=%0d", sv, k), int'(cout), ec);
          check($sformatf("op_valid s=%0d k=%0d", sv, k), int'(op_valid), ev);
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
