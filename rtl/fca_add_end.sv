// fca_add_end -- the long AND gate that generates ADD END.
//
// ADD END is high only when every bit reports exactly one sum rail high. With
// USE_COUT = 1 the carry out of the most significant bit is sampled by a sum
// comparison circuit of its own and becomes one more input of the AND, so the
// adder also waits for its carry out; with USE_COUT = 0 the carry out is
// ignored. Combinational: ADD END rises when the last bit settles and falls
// as soon as any bit loses its sum or shows both rails. The original circuit
// wires the bit comparators together; a separate AND gate and the default
// USE_COUT = 0 (carry out optional) are choices of this design.
module fca_add_end
  import fca_pkg::*;
#(
  parameter int unsigned N        = AU_MAIN_WIDTH,
  parameter bit          USE_COUT = 1'b0
) (
  input  logic [N-1:0] bit_done,   // per-bit sum comparison outputs
  input  dr_t          cout,       // carry out of the most significant bit
  output logic         add_end
);

  logic cout_done;

  fca_sum_compare u_cout_cmp (.s(cout), .done(cout_done));

  always_comb add_end = (&bit_done) & (cout_done | ~USE_COUT);

endmodule
