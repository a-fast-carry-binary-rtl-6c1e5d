// tb_fca_adder -- end-to-end test of the 49-bit fast carry adder at its
// default parameters. A driver (fca_adder_driver) performs directed and
// 2000 random additions, each with the carry in arriving first or last,
// checks sums, carry out and ADD END at every step, injects a stray signal
// into every addition and counts that each adder mechanism was exercised.
// The average longest carry over the random additions is compared with
// log2(5N/4) (5.93 bits for N = 49) within 0.5 bit. A watchdog stops a hung
// run.
module tb_fca_adder;
  import fca_pkg::*;

  localparam int unsigned N = AU_MAIN_WIDTH;

  dr_t [N-1:0] a, b, s;
  dr_t         cin, cout;
  logic        add_end, finished;
  int          checks, failures;

  fca_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .add_end(add_end));

  fca_adder_driver #(.N(N), .NUM_RANDOM(2000)) drv (
    .a(a), .b(b), .cin(cin), .s(s), .cout(cout), .add_end(add_end),
    .checks(checks), .failures(failures), .finished(finished)
  );

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    real avg, ref_len;
    int  extra_checks = 0, extra_fail = 0;
    wait (finished);
    avg     = real'(drv.sum_longest) / drv.n_longest;
    ref_len = $ln(5.0 * N / 4.0) / $ln(2.0);
    extra_checks++;
    if (avg < ref_len - 0.5 || avg > ref_len + 0.5) begin
      extra_fail++;
      $display("FAIL average longest carry %0.2f far from %0.2f", avg, ref_len);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra_checks, failures + extra_fail);
    $finish;
  end
endmodule
