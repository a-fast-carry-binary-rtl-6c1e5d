// fca_sum_gates -- the four sum gates and two sum inverters of one bit.
//
// A sum gate conducts only when it has both a sampled carry and an enable
// from the operand comparison. With equal operands (w) the sum equals the
// incoming carry; with unequal operands (z) it is its complement:
//   s.one  = (w & c.one)  | (z & c.zero)
//   s.zero = (w & c.zero) | (z & c.one)
// Two gates feed each sum rail; the sum inverters only restore polarity.
// The sum appears when the later of carry and comparison signal arrives and
// vanishes when either goes away. Combinational. The four-gate structure is
// the original one; the inverters, which only fix polarity, are folded in.
module fca_sum_gates
  import fca_pkg::*;
(
  input  logic w,   // operands equal
  input  logic z,   // operands unequal
  input  dr_t  c,   // sampled incoming carry
  output dr_t  s    // dual-rail sum bit
);

  always_comb begin
    s.one  = (w & c.one)  | (z & c.zero);
    s.zero = (w & c.zero) | (z & c.one);
  end

endmodule
