// tb_fca_operand_compare -- exhaustive check of the operand comparison.
// Applies every combination of valid and absent dual-rail operands and
// compares u, v, w, z, x, y with values derived from the operand values
// (generate one, generate zero, equal, unequal) and with "all off" whenever an
// operand is absent. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_fca_operand_compare;
  import fca_pkg::*;

  dr_t  a, b;
  logic u, v, w, z, x, y;
  int   checks = 0, failures = 0;

  fca_operand_compare dut (.*);

  task automatic expect_eq(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: a=%b b=%b got %b expected %b", what, a, b, got, exp);
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
    // Both operands present.
    for (int ia = 0; ia < 2; ia++) begin
      for (int ib = 0; ib < 2; ib++) begin
        a = dr_encode(ia[0]);
        b = dr_encode(ib[0]);
        #1;
        expect_eq(u, ia == 1 && ib == 1, "u");
        expect_eq(v, ia == 0 && ib == 0, "v");
        expect_eq(w, ia == ib, "w");
        expect_eq(z, ia != ib, "z");
        expect_eq(x, ia != ib, "x");
        expect_eq(y, ia != ib, "y");
      end
    end
    // One or both operands absent: every gate must be off.
    for (int ia = 0; ia < 3; ia++) begin
      for (int ib = 0; ib < 3; ib++) begin
        if (ia != 2 && ib != 2) continue;
        a = (ia == 2) ? DR_NULL : dr_encode(ia[0]);
        b = (ib == 2) ? DR_NULL : dr_encode(ib[0]);
        #1;
        expect_eq(u | v | w | z | x | y, 1'b0, "absent operand");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
