// tb_fca_add_end -- checks the ADD END gate at 49 inputs, with and without
// the carry out included: it must be high only when every bit is done (and,
// when included, the carry out holds exactly one rail). Random patterns with
// one or more bits not done must keep it low. A watchdog stops a hung run.
module tb_fca_add_end;
  import fca_pkg::*;

  localparam int N = 49;

  logic [N-1:0] bit_done;
  dr_t          cout;
  logic         end0, end1;
  int           checks = 0, failures = 0;

  fca_add_end #(.N(N), .USE_COUT(1'b0)) dut0 (.bit_done(bit_done), .cout(cout), .add_end(end0));
  fca_add_end #(.N(N), .USE_COUT(1'b1)) dut1 (.bit_done(bit_done), .cout(cout), .add_end(end1));

  task automatic check(input logic e0, input logic e1);
    checks += 2;
    if (end0 !== e0) begin failures++; $display("FAIL no-cout: done=%h cout=%b got %b", bit_done, cout, end0); end
    if (end1 !== e1) begin failures++; $display("FAIL cout: done=%h cout=%b got %b", bit_done, cout, end1); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 4; r++) begin
      cout = dr_t'(r[1:0]);
      bit_done = '1;
      #1;
      check(1'b1, (r == 1 || r == 2));
      // Each single missing bit blocks ADD END.
      for (int i = 0; i < N; i++) begin
        bit_done = '1;
        bit_done[i] = 1'b0;
        #1;
        check(1'b0, 1'b0);
      end
      // Random incomplete patterns.
      for (int k = 0; k < 200; k++) begin
        bit_done = {$urandom, $urandom};
        if (bit_done == '1) bit_done[0] = 1'b0;
        #1;
        check(1'b0, 1'b0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
