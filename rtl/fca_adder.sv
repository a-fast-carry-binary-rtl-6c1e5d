// fca_adder -- N-bit asynchronous dual-rail fast carry adder with ADD END.
//
// Each bit compares its operands: equal operands insert their own value as
// the outgoing carry at once, unequal operands close a one-transistor carry
// gate so that the incoming carry passes straight through. The carry
// therefore only travels along runs of unequal bits, and because the adder
// has no clock it finishes as soon as the longest such run has been crossed.
// A long AND gate (fca_add_end) watches every bit's dual-rail sum and raises
// ADD END when each bit holds exactly one sum rail; a stray signal that
// raises both rails of a bit holds ADD END low until it disappears.
//
// Bit i carries a gated carry amplifier instead of a carry gate when
// (i+1) is a multiple of AMP_SPACING, so no more than AMP_SPACING-1 plain
// gates lie between amplifiers (bits 9, 19, 29, 39 of the 49-bit adder).
//
// Protocol: drive every rail low (no operand), supply the carry into the
// least significant bit (it may arrive before or after the operands), then
// present both dual-rail operands; wait for add_end, read s (and cout); then
// withdraw an operand and wait for add_end to fall before the next addition.
// Defaults follow the original 49-bit adder; the carry-out option of ADD
// END is off by default, as it is optional in the original design.
module fca_adder
  import fca_pkg::*;
#(
  parameter int unsigned N                    = AU_MAIN_WIDTH,
  parameter int unsigned AMP_SPACING_P        = AMP_SPACING,
  parameter bit          CARRY_OUT_IN_ADD_END = 1'b0
) (
  input  dr_t [N-1:0] a,        // operand A, dual rail per bit
  input  dr_t [N-1:0] b,        // operand B, dual rail per bit
  input  dr_t         cin,      // carry into the least significant bit
  output dr_t [N-1:0] s,        // sum, dual rail per bit
  output dr_t         cout,     // carry out of the most significant bit
  output logic        add_end   // all sum bits (and optionally cout) valid
);

  dr_t  [N:0]   carry;
  logic [N-1:0] bit_done;

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    fca_bit #(
      .AMP(((i + 1) % AMP_SPACING_P) == 0)
    ) u_bit (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .cout(carry[i+1]),
      .s   (s[i]),
      .done(bit_done[i])
    );
  end

  assign cout = carry[N];

  fca_add_end #(
    .N       (N),
    .USE_COUT(CARRY_OUT_IN_ADD_END)
  ) u_add_end (
    .bit_done(bit_done),
    .cout    (cout),
    .add_end (add_end)
  );

endmodule
