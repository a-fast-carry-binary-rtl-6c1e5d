// fca_adder_driver -- stimulus and checker for an N-bit fast carry adder.
//
// Drives the adder through complete dual-rail additions: all rails low (no
// operand), then the carry in and the two operands in a chosen order, then
// an operand is withdrawn again. Expected values are computed here from the
// plain binary operands (sum and carry out of an N-bit integer addition; the
// set of bits whose incoming carry is already known while the least
// significant carry is still absent). It checks ADD END at every step, checks
// that a stray signal (an operand bit with both rails high) holds ADD END
// low, and counts how often each mechanism of the adder was exercised:
// carry generation, carry propagation through a gate, through an amplifier,
// a carry crossing the whole adder, a carry in that arrives last, a carry in
// that arrives first, the return to the no-operand state and noise rejection.
// A mechanism that never occurred counts as a failure. An assertion checks
// that ADD END never rises while an input bit is absent or invalid. It also reports the
// average longest carry over the random additions.
// Combinational DUT: each step waits 1 time unit for it to settle.
module fca_adder_driver
  import fca_pkg::*;
#(
  parameter int unsigned N                    = AU_MAIN_WIDTH,
  parameter int unsigned AMP_SPACING_P        = AMP_SPACING,
  parameter bit          CARRY_OUT_IN_ADD_END = 1'b0,
  parameter int unsigned NUM_RANDOM           = 2000,
  parameter bit          EXHAUSTIVE           = 1'b0
) (
  output dr_t [N-1:0] a,
  output dr_t [N-1:0] b,
  output dr_t         cin,
  input  dr_t [N-1:0] s,
  input  dr_t         cout,
  input  logic        add_end,
  output int          checks,
  output int          failures,
  output logic        finished
);

  typedef logic [N-1:0] word_t;

  int n_generate, n_gate_prop, n_amp_prop, n_full_length, n_cin_last,
      n_cin_first, n_withdraw, n_noise;
  longint sum_longest;
  int     n_longest;

  function automatic dr_t [N-1:0] encode(input word_t v);
    dr_t [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = dr_encode(v[i]);
    return r;
  endfunction

  task automatic expect_true(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL N=%0d %s", N, what);
    end
  endtask

  // Longest carry of an addition: one more than the longest run of bits with
  // unequal operands (the bit that creates the carry counts too).
  function automatic int longest_carry(input word_t x, input word_t y);
    int run = 0, best = 0;
    for (int i = 0; i < N; i++) begin
      if (x[i] != y[i]) begin
        run++;
        if (run > best) best = run;
      end else begin
        run = 0;
      end
    end
    return best + 1;
  endfunction

  task automatic do_add(input word_t x, input word_t y, input logic c, input bit cin_first);
    logic [N:0] full;
    word_t      known;       // bits whose carry in does not depend on cin
    logic       k;
    logic       end_exp;
    full = {1'b0, x} + {1'b0, y} + (N+1)'(c);

    // Start from the no-operand state.
    a = '0; b = '0; cin = DR_NULL;
    #1;
    expect_true(add_end == 1'b0, "ADD END low with no operands");

    if (cin_first) begin
      cin = dr_encode(c);
      #1;
      expect_true(add_end == 1'b0, "ADD END low with only the carry in");
      a = encode(x);
      #1;
      expect_true(add_end == 1'b0, "ADD END low with one operand");
      b = encode(y);
      n_cin_first++;
    end else begin
      a = encode(x);
      b = encode(y);
      #1;
      // Carry in not yet there: a bit's sum exists only if an equal-operand
      // bit below it has fixed its carry.
      k = 1'b0;
      for (int i = 0; i < N; i++) begin
        known[i] = k;
        k = (x[i] == y[i]) | k;
      end
      for (int i = 0; i < N; i++)
        expect_true(dr_valid(s[i]) == known[i] && (!known[i] || s[i].one == full[i]),
                    $sformatf("bit %0d waits for its carry", i));
      expect_true(add_end == 1'b0, "ADD END waits for the carry in");
      expect_true(cout == (k ? dr_encode(full[N]) : DR_NULL), "carry out before carry in");
      cin = dr_encode(c);
      n_cin_last++;
    end
    #1;
    for (int i = 0; i < N; i++)
      expect_true(s[i] == dr_encode(full[i]), $sformatf("sum bit %0d of %h+%h+%b", i, x, y, c));
    expect_true(cout == dr_encode(full[N]), "carry out");
    end_exp = 1'b1;
    expect_true(add_end == end_exp, "ADD END after a complete addition");

    // Mechanism bookkeeping from the operands.
    for (int i = 0; i < N; i++) begin
      if (x[i] == y[i]) n_generate++;
      else if (((i + 1) % AMP_SPACING_P) == 0) n_amp_prop++;
      else n_gate_prop++;
    end
    if ((x ^ y) == '1) n_full_length++;

    // A stray signal on one operand bit holds ADD END low until it goes.
    begin
      int j;
      j = $urandom_range(N - 1);
      a[j] = '{one: 1'b1, zero: 1'b1};
      #1;
      expect_true(add_end == 1'b0, "noise holds ADD END low");
      a[j] = dr_encode(x[j]);
      #1;
      expect_true(add_end == 1'b1, "ADD END returns when the noise goes");
      n_noise++;
    end

    // Withdraw operand B: back to the no-operand state.
    b = '0;
    #1;
    expect_true(add_end == 1'b0, "ADD END falls when an operand is withdrawn");
    for (int i = 0; i < N; i++)
      expect_true(s[i] == DR_NULL, "sum cleared when an operand is withdrawn");
    n_withdraw++;
  endtask

  // Protocol rule: ADD END may only rise while both operands and the carry in
  // hold a value on every bit.
  always @(posedge add_end) begin
    logic all_valid;
    all_valid = dr_valid(cin);
    for (int i = 0; i < N; i++) all_valid &= dr_valid(a[i]) & dr_valid(b[i]);
    checks++;
    assert (all_valid)
    else begin
      failures++;
      $error("ADD END rose while an input was absent or invalid");
    end
  end

  function automatic word_t rand_word();
    word_t v;
    for (int i = 0; i < N; i += 32) v = (v << 32) | word_t'($urandom);
    return v;
  endfunction

  initial begin
    word_t x, y;
    checks = 0; failures = 0; finished = 1'b0;
    n_generate = 0; n_gate_prop = 0; n_amp_prop = 0; n_full_length = 0;
    n_cin_last = 0; n_cin_first = 0; n_withdraw = 0; n_noise = 0;
    sum_longest = 0; n_longest = 0;
    a = '0; b = '0; cin = DR_NULL;

    // Directed: longest carry (all bits unequal) both ways, all bits equal.
    do_add('1, '0, 1'b1, 1'b0);
    do_add('1, '0, 1'b0, 1'b1);
    do_add('0, '1, 1'b1, 1'b1);
    do_add('1, '1, 1'b1, 1'b0);
    do_add('0, '0, 1'b0, 1'b0);
    do_add({(N+1)/2{2'b01}}, {(N+1)/2{2'b10}}, 1'b1, 1'b0);

    if (EXHAUSTIVE) begin
      for (longint i = 0; i < (longint'(1) << N); i++)
        for (longint j = 0; j < (longint'(1) << N); j++)
          do_add(word_t'(i), word_t'(j), 1'(i + j), 1'((i ^ j) >> 1));
    end

    for (int r = 0; r < NUM_RANDOM; r++) begin
      x = rand_word();
      y = rand_word();
      sum_longest += longest_carry(x, y);
      n_longest++;
      do_add(x, y, 1'($urandom), 1'($urandom));
    end

    $display("N=%0d mechanisms: generate=%0d gate_propagate=%0d amp_propagate=%0d full_length=%0d",
             N, n_generate, n_gate_prop, n_amp_prop, n_full_length);
    $display("N=%0d mechanisms: cin_last=%0d cin_first=%0d withdraw=%0d noise_rejected=%0d",
             N, n_cin_last, n_cin_first, n_withdraw, n_noise);
    expect_true(n_generate > 0,    "carry generation exercised");
    expect_true(n_gate_prop > 0,   "propagation through a carry gate exercised");
    expect_true(n_amp_prop > 0 || N < AMP_SPACING_P, "propagation through an amplifier exercised");
    expect_true(n_full_length > 0, "full-length carry exercised");
    expect_true(n_cin_last > 0,    "carry in arriving last exercised");
    expect_true(n_cin_first > 0,   "carry in arriving first exercised");
    expect_true(n_withdraw > 0,    "return to no-operand state exercised");
    expect_true(n_noise > 0,       "noise rejection exercised");
    if (n_longest > 0)
      $display("N=%0d average longest carry over %0d random additions: %0.2f bits (log2(5N/4) = %0.2f)",
               N, n_longest, real'(sum_longest) / n_longest, $ln(5.0 * N / 4.0) / $ln(2.0));
    finished = 1'b1;
  end

endmodule
