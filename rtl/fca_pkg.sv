// fca_pkg -- shared types and constants of the dual-rail fast carry adder.
//
// Every logical signal of the adder (operand bit, carry, sum bit) travels on
// two wires: one that is raised for a one and one that is raised for a zero.
// Both wires low is the "no operand" state that separates two additions;
// both wires high never occurs in a sound circuit and is treated as noise.
// This double-rail encoding is what lets the adder time its own completion.
//
// The widths below are those of the four adders of the machine the adder was
// built for; the amplifier spacing (a gated carry amplifier in every tenth bit)
// is that of the original circuit.
package fca_pkg;

  // One dual-rail bit: .one high = logic 1, .zero high = logic 0.
  typedef struct packed {
    logic one;
    logic zero;
  } dr_t;

  localparam dr_t DR_NULL = '{one: 1'b0, zero: 1'b0};

  // Arithmetic unit adders and address unit adders.
  localparam int unsigned AU_MAIN_WIDTH   = 49;
  localparam int unsigned AU_SHORT_WIDTH  = 9;
  localparam int unsigned ADDR_WIDTH      = 15;
  localparam int unsigned ADDR_MOD_WIDTH  = 4;

  // A gated carry amplifier replaces the carry gate in every tenth bit, so
  // at most nine plain carry gates lie between two amplifiers.
  localparam int unsigned AMP_SPACING = 10;

  // Encode a single-rail bit as a valid dual-rail bit.
  function automatic dr_t dr_encode(input logic b);
    return '{one: b, zero: ~b};
  endfunction

  // Exactly one rail high: the bit carries a value.
  function automatic logic dr_valid(input dr_t d);
    return d.one ^ d.zero;
  endfunction

endpackage
