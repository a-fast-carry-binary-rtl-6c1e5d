// tb_fca_sum_compare -- checks the per-bit completion detector: high for a
// one sum or a zero sum, low for no sum and for both sums at once (noise).
// Ends with a TB_RESULT line; a watchdog stops a hung run.
module tb_fca_sum_compare;
  import fca_pkg::*;

  dr_t  s;
  logic done;
  int   checks = 0, failures = 0;

  fca_sum_compare dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp [4] = '{1'b0, 1'b1, 1'b1, 1'b0};  // {one,zero} = 00, 01, 10, 11
    for (int r = 0; r < 4; r++) begin
      s = dr_t'(r[1:0]);
      #1;
      checks++;
      if (done !== exp[r]) begin
        failures++;
        $display("FAIL rails=%b done=%b expected %b", s, done, exp[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
