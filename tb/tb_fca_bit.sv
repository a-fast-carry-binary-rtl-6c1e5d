// tb_fca_bit -- checks one complete adder bit, both the carry-gate and the
// amplifier variant, against the full-adder truth table: sum = A^B^C,
// carry out = majority. It also checks the dual-rail behaviour: the carry out
// of equal operands appears before the carry in arrives, nothing appears while
// an operand is absent, the bit's done signal follows its sum, and an
// operand with both rails high keeps done low. A watchdog stops a hung run.
module tb_fca_bit;
  import fca_pkg::*;

  dr_t  a, b, cin;
  dr_t  cout_g, s_g, cout_a, s_a;
  logic done_g, done_a;
  int   checks = 0, failures = 0;

  fca_bit #(.AMP(1'b0)) dut_gate (.a(a), .b(b), .cin(cin), .cout(cout_g), .s(s_g), .done(done_g));
  fca_bit #(.AMP(1'b1)) dut_amp  (.a(a), .b(b), .cin(cin), .cout(cout_a), .s(s_a), .done(done_a));

  task automatic check(input dr_t exp_s, input dr_t exp_c, input logic exp_d, input string what);
    checks += 6;
    if (s_g !== exp_s)     begin failures++; $display("FAIL %s gate sum a=%b b=%b c=%b got %b", what, a, b, cin, s_g); end
    if (s_a !== exp_s)     begin failures++; $display("FAIL %s amp sum a=%b b=%b c=%b got %b", what, a, b, cin, s_a); end
    if (cout_g !== exp_c)  begin failures++; $display("FAIL %s gate cout got %b exp %b", what, cout_g, exp_c); end
    if (cout_a !== exp_c)  begin failures++; $display("FAIL %s amp cout got %b exp %b", what, cout_a, exp_c); end
    if (done_g !== exp_d)  begin failures++; $display("FAIL %s gate done", what); end
    if (done_a !== exp_d)  begin failures++; $display("FAIL %s amp done", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      logic ba, bb, bc;
      {ba, bb, bc} = i[2:0];
      // Operands first, carry still absent.
      a = dr_encode(ba); b = dr_encode(bb); cin = DR_NULL;
      #1;
      check(DR_NULL, (ba == bb) ? dr_encode(ba) : DR_NULL, 1'b0, "carry absent");
      // Carry arrives.
      cin = dr_encode(bc);
      #1;
      check(dr_encode(ba ^ bb ^ bc), dr_encode((ba & bb) | (bc & (ba ^ bb))), 1'b1, "complete");
      // Operand B withdrawn: back to the no-operand state.
      b = DR_NULL;
      #1;
      check(DR_NULL, DR_NULL, 1'b0, "operand withdrawn");
      // Stray signal: B shows both rails.
      b = '{one: 1'b1, zero: 1'b1};
      #1;
      checks += 2;
      if (done_g) begin failures++; $display("FAIL noise accepted by gate bit"); end
      if (done_a) begin failures++; $display("FAIL noise accepted by amp bit"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
