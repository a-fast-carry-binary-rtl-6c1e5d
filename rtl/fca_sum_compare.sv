// fca_sum_compare -- per-bit sum comparison (S not equal to S-bar).
//
// Signals that a dual-rail bit holds a value: high only when exactly one of
// its two rails is high. With no sum (both low) or with both a one and a zero
// sum present (both high, which only a stray signal or a failed part can
// cause) it stays low, so the adder's completion signal waits until the fault
// has gone. The same circuit can sample the carry out of the most
// significant bit. Combinational. Modelled as an XOR of the two rails, which
// is the logic the original comparator transistors implement.
module fca_sum_compare
  import fca_pkg::*;
(
  input  dr_t  s,
  output logic done
);

  always_comb done = s.one ^ s.zero;

endmodule
