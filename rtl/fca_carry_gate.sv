// fca_carry_gate -- one bit's station on the two carry lines.
//
// Each carry line (one line, zero line) passes three points in every bit, in
// this order: a sampling point, where the incoming carry is tapped for the
// sum gates; the carry gate, a single series switch that is closed when the
// operands of the bit differ; and the insertion point, where a carry
// generated by equal operands is placed on the line. Because the outgoing
// carry equals the operands when they are equal and equals the incoming
// carry when they differ, the outgoing carry never has to wait for the
// incoming one in the first case.
//   cout.one  = u | (x & cin.one)
//   cout.zero = v | (y & cin.zero)
// csample is the sampled incoming carry (the sampling amplifiers).
// Combinational; the line needs no clock. The three points and their order
// follow the original carry line; separate x and y drives mirror its two
// gate drivers.
module fca_carry_gate
  import fca_pkg::*;
(
  input  dr_t  cin,      // carry from the next less significant bit
  input  logic u,        // insert a one carry (A=B=1)
  input  logic v,        // insert a zero carry (A=B=0)
  input  logic x,        // close the one-line carry gate (A differs from B)
  input  logic y,        // close the zero-line carry gate (A differs from B)
  output dr_t  csample,  // incoming carry, to the sum gates
  output dr_t  cout      // carry to the next more significant bit
);

  always_comb begin
    csample   = cin;
    cout.one  = u | (x & cin.one);
    cout.zero = v | (y & cin.zero);
  end

endmodule
