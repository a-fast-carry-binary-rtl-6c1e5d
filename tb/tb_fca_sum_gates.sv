// tb_fca_sum_gates -- checks the sum gates against the adder truth table.
// For each operand pair and each incoming carry the dual-rail sum must equal
// A xor B xor C; with the carry or the comparison signals absent no sum rail
// may rise. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_fca_sum_gates;
  import fca_pkg::*;

  logic w, z;
  dr_t  c, s;
  int   checks = 0, failures = 0;

  fca_sum_gates dut (.*);

  task automatic check(input dr_t exp, input string what);
    checks++;
    if (s !== exp) begin
      failures++;
      $display("FAIL %s: w=%b z=%b c=%b got %b exp %b", what, w, z, c, s, exp);
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
    for (int ia = 0; ia < 2; ia++)
      for (int ib = 0; ib < 2; ib++)
        for (int ic = 0; ic < 3; ic++) begin
          w = (ia == ib);
          z = (ia != ib);
          c = (ic == 2) ? DR_NULL : dr_encode(ic[0]);
          #1;
          if (ic == 2) check(DR_NULL, "carry absent");
          else         check(dr_encode(ia[0] ^ ib[0] ^ ic[0]), "sum");
        end
    w = 0; z = 0;
    for (int ic = 0; ic < 2; ic++) begin
      c = dr_encode(ic[0]);
      #1;
      check(DR_NULL, "operands absent");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
