// tb_fca_adder_timing -- add-time workload of the 49-bit adder on the timing
// model fca_adder_timed (the synthesizable bit pieces with the original
// circuit's measured delays on their outputs).
//
// As in the original speed estimate, the carry into bit 0 is always present,
// the first operand is present beforehand, and the second operand enters all
// bits at once at t0. The test measures t(ADD END) - t0 for each addition and
// compares it with an add time computed here, bit by bit, from the delays:
// a bit's carry out is ready at T_GEN when its operands are equal, and at
// max(carry in + station delay, T_SET) when they differ; its sum at
// max(carry in, T_GEN) + T_SUM. It also checks the extreme cases: all
// bits equal (shortest add) and all bits unequal (a carry across the whole
// adder, which the original estimate puts at about 95 ns including the last
// gate), and reports the average over random additions.
module tb_fca_adder_timing;
  import fca_pkg::*;
  timeunit 1ns;
  timeprecision 1ps;

  localparam int unsigned N  = AU_MAIN_WIDTH;
  localparam realtime T_GEN  = 12.5ns;
  localparam realtime T_SET  = 20ns;
  localparam realtime T_GATE = 10ns / 9;
  localparam realtime T_AMP  = 5ns;
  localparam realtime T_SUM  = 5ns;
  localparam int      NRAND  = 1000;

  typedef logic [N-1:0] word_t;

  dr_t [N-1:0] a, b, s;
  dr_t         cin, cout;
  logic        add_end;
  int          checks = 0, failures = 0;

  fca_adder_timed #(.N(N)) dut (.*);

  function automatic dr_t [N-1:0] encode(input word_t v);
    dr_t [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = dr_encode(v[i]);
    return r;
  endfunction

  function automatic realtime rmax(input realtime p, input realtime q);
    return (p > q) ? p : q;
  endfunction

  // Expected add time, and the time the carry out is ready.
  function automatic realtime expected_time(input word_t x, input word_t y, output realtime t_cout);
    realtime c = 0, t_end = 0, station;
    for (int i = 0; i < N; i++) begin
      station = (((i + 1) % AMP_SPACING) == 0) ? T_AMP : T_GATE;
      t_end = rmax(t_end, rmax(c, T_GEN) + T_SUM);
      if (x[i] == y[i]) c = T_GEN;
      else              c = rmax(c + station, T_SET);
    end
    t_cout = c;
    return t_end;
  endfunction

  function automatic word_t rand_word();
    word_t v;
    for (int i = 0; i < N; i += 32) v = (v << 32) | word_t'($urandom);
    return v;
  endfunction

  // One timed addition; returns the measured add time.
  task automatic timed_add(input word_t x, input word_t y, input logic c, output realtime t_add);
    realtime t0, t_exp, t_cout;
    logic [N:0] full;
    full = {1'b0, x} + {1'b0, y} + (N+1)'(c);
    a = '0; b = '0; cin = dr_encode(c);
    #200ns;
    a = encode(x);
    #200ns;
    checks++;
    if (add_end) begin failures++; $display("FAIL ADD END high with one operand"); end
    t0 = $realtime;
    b = encode(y);
    fork
      wait (add_end);
      #500ns;
    join_any
    disable fork;
    t_add = $realtime - t0;
    t_exp = expected_time(x, y, t_cout);
    checks += 3;
    if (!add_end) begin
      failures++;
      $display("FAIL no ADD END for %h + %h", x, y);
    end
    if (t_add < t_exp - 0.01ns || t_add > t_exp + 0.01ns) begin
      failures++;
      $display("FAIL add time %0.2f ns, expected %0.2f ns for %h + %h", t_add, t_exp, x, y);
    end
    #200ns;
    if (s != encode(full[N-1:0]) || cout != dr_encode(full[N])) begin
      failures++;
      $display("FAIL result of %h + %h", x, y);
    end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    realtime t, t_min, t_max, t_sum, t_cout;
    a = '0; b = '0; cin = DR_NULL;

    // Shortest add: all bits equal, every bit generates its own carry.
    timed_add('1, '1, 1'b1, t);
    $display("all bits equal:   add time %0.2f ns", t);
    checks++;
    if (t != T_GEN + T_SUM) begin failures++; $display("FAIL minimum add time"); end

    // Longest add: all bits unequal, the carry in crosses every bit.
    timed_add('1, '0, 1'b1, t);
    void'(expected_time('1, '0, t_cout));
    $display("all bits unequal: add time %0.2f ns, carry out ready %0.2f ns (+ sum %0.0f ns = %0.2f ns)",
             t, t_cout, T_SUM, t_cout + T_SUM);
    checks++;
    if (t_cout + T_SUM < 93ns || t_cout + T_SUM > 97ns) begin
      failures++; $display("FAIL full-length carry far from 95 ns");
    end

    t_min = 1s; t_max = 0; t_sum = 0;
    for (int r = 0; r < NRAND; r++) begin
      timed_add(rand_word(), rand_word(), 1'($urandom), t);
      t_sum += t;
      if (t < t_min) t_min = t;
      if (t > t_max) t_max = t;
    end
    $display("random additions: %0d, add time min %0.2f ns, average %0.2f ns, max %0.2f ns",
             NRAND, t_min, t_sum / NRAND, t_max);
    checks++;
    if (t_sum / NRAND >= t_max || t_sum / NRAND < T_SET) begin
      failures++; $display("FAIL average add time not between gate set-up and maximum");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
