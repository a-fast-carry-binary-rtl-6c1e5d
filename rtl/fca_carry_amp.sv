// fca_carry_amp -- gated carry line amplifier of an amplifier bit.
//
// The carry gates are saturated transistors in series, so a long line loses
// voltage; a gated amplifier in every tenth bit restores the level and takes
// the place of that bit's carry gate. Logically it is the same station as a
// carry gate: the incoming carry is sampled for the sum gates ahead of the
// amplifier, it is passed on only when the operands of the bit differ (the
// gating input, driven by the "unequal" comparison signal z), and a carry
// generated by equal operands is inserted at its output.
//   cout.one  = u | (z & cin.one)
//   cout.zero = v | (z & cin.zero)
// Level restoration itself has no logic function in a digital model; here
// the amplifier re-drives the line from its own output.
module fca_carry_amp
  import fca_pkg::*;
(
  input  dr_t  cin,      // carry from the last of the nine preceding gates
  input  logic u,        // insert a one carry (A=B=1)
  input  logic v,        // insert a zero carry (A=B=0)
  input  logic z,        // gating: operands of this bit differ
  output dr_t  csample,  // incoming carry, to the sum gates
  output dr_t  cout      // amplified carry to the next bit
);

  always_comb begin
    csample   = cin;
    cout.one  = u | (z & cin.one);
    cout.zero = v | (z & cin.zero);
  end

endmodule
