// fca_bit -- one complete bit of the fast carry adder.
//
// Wires the operand comparison, the carry line station, the sum gates and the
// sum comparison of one bit. With AMP = 0 the carry station is a plain carry
// gate; with AMP = 1 it is a gated carry amplifier (every tenth bit of the
// adder). Inputs and outputs are dual-rail; "done" is this bit's input to the
// adder's long AND gate (ADD END).
// Timing: the bit has no clock. Its sum appears once both operands and the
// incoming carry are present, and disappears when an operand is withdrawn.
// The outgoing carry is available as soon as equal operands arrive, or follows
// the incoming carry through the closed gate when they differ.
module fca_bit
  import fca_pkg::*;
#(
  parameter bit AMP = 1'b0   // 1: gated carry amplifier instead of a carry gate
) (
  input  dr_t  a,
  input  dr_t  b,
  input  dr_t  cin,
  output dr_t  cout,
  output dr_t  s,
  output logic done
);

  logic u, v, w, z, x, y;
  dr_t  csample;

  fca_operand_compare u_cmp (
    .a(a), .b(b), .u(u), .v(v), .w(w), .z(z), .x(x), .y(y)
  );

  if (AMP) begin : g_amp
    fca_carry_amp u_amp (
      .cin(cin), .u(u), .v(v), .z(z), .csample(csample), .cout(cout)
    );
  end else begin : g_gate
    fca_carry_gate u_gate (
      .cin(cin), .u(u), .v(v), .x(x), .y(y), .csample(csample), .cout(cout)
    );
  end

  fca_sum_gates u_sum (.w(w), .z(z), .c(csample), .s(s));

  fca_sum_compare u_cmp_s (.s(s), .done(done));

endmodule
