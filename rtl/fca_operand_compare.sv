// fca_operand_compare -- operand comparison circuits of one adder bit.
//
// Takes the two dual-rail operand bits A and B and produces the control
// signals of the bit:
//   u    A=1 and B=1: inserts a one carry on the one carry line
//   v    A=0 and B=0: inserts a zero carry on the zero carry line
//   w    A equals B (u or v): enables the two "equal" sum gates
//   z    A differs from B: enables the two "unequal" sum gates and gates the
//        carry amplifier of an amplifier bit
//   x, y gate drive of the one-line and zero-line carry gates (A differs
//        from B), one per line as in the original circuit
// Four two-input ANDs do the work (A.B, A'.B', A.B', A'.B); two ORs combine
// them into "equal" and "unequal", as in the original block diagram. The level
// shift, inverter and gate drivers of the original circuit only restore
// voltage and current levels and are represented here by plain wires.
// Every output is low while either operand is absent (both rails low), so the
// carry gates and sum gates of the bit stay off until both operands arrive.
// Purely combinational; no clock and no reset.
module fca_operand_compare
  import fca_pkg::*;
(
  input  dr_t  a,
  input  dr_t  b,
  output logic u,
  output logic v,
  output logic w,
  output logic z,
  output logic x,
  output logic y
);

  logic and1, and2, and3, and4;   // A.B, A'.B', A.B', A'.B

  always_comb begin
    and1 = a.one  & b.one;
    and2 = a.zero & b.zero;
    and3 = a.one  & b.zero;
    and4 = a.zero & b.one;

    u = and1;                     // carry generator, one line
    v = and2;                     // carry generator, zero line
    w = and1 | and2;              // OR #1: operands equal
    z = and3 | and4;              // OR #2 through the inverter: unequal
    x = and3 | and4;              // OR #2 through level shift and gate drivers
    y = and3 | and4;
  end

endmodule
