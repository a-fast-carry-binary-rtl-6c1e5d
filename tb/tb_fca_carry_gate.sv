// tb_fca_carry_gate -- checks one carry line station against the adder truth
// table. For every valid operand pair (expressed through the comparison
// signals) and every incoming carry, including "carry not yet arrived", the
// outgoing carry must be the generated carry for equal operands and the
// incoming carry for unequal ones; the sampled carry must equal the incoming
// carry. Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_fca_carry_gate;
  import fca_pkg::*;

  dr_t  cin, csample, cout;
  logic u, v, x, y;
  int   checks = 0, failures = 0;

  fca_carry_gate dut (.*);

  task automatic check(input dr_t exp_out, input string what);
    checks += 2;
    if (cout !== exp_out) begin
      failures++;
      $display("FAIL %s cout: cin=%b u=%b v=%b x=%b got %b exp %b",
               what, cin, u, v, x, cout, exp_out);
    end
    if (csample !== cin) begin
      failures++;
      $display("FAIL %s csample", what);
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
    for (int ia = 0; ia < 2; ia++) begin
      for (int ib = 0; ib < 2; ib++) begin
        for (int ic = 0; ic < 3; ic++) begin
          logic eq;
          dr_t  exp;
          eq  = (ia == ib);
          u   = (ia == 1 && ib == 1);
          v   = (ia == 0 && ib == 0);
          x   = ~eq;
          y   = ~eq;
          cin = (ic == 2) ? DR_NULL : dr_encode(ic[0]);
          #1;
          // Table 1: Cout = operand value when equal, Cin when unequal.
          if (eq)           exp = dr_encode(ia[0]);
          else if (ic == 2) exp = DR_NULL;
          else              exp = dr_encode(ic[0]);
          check(exp, "valid operands");
        end
      end
    end
    // Operands absent: nothing leaves the station whatever the carry.
    u = 0; v = 0; x = 0; y = 0;
    for (int ic = 0; ic < 3; ic++) begin
      cin = (ic == 2) ? DR_NULL : dr_encode(ic[0]);
      #1;
      check(DR_NULL, "no operands");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
