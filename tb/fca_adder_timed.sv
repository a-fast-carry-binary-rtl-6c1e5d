// fca_adder_timed -- behavioural timing model of the N-bit fast carry adder,
// for testbenches only.
//
// Builds the adder from the synthesizable bit pieces (operand comparison,
// carry gate or amplifier, sum gates, sum comparison, ADD END gate) and puts
// a fixed delay on each piece's outputs, so that the self-timed behaviour can
// be watched: ADD END rises when the slowest bit of this particular addition
// has formed its sum. The delays are measured values of the original
// transistor circuit:
//   T_GEN  operands to generated carry and to sum-gate enables  12.5 ns
//   T_SET  operands to a closed carry gate (and amplifier gating) 20 ns
//   T_GATE one carry gate, 10 ns for nine                         1.11 ns
//   T_AMP  one gated amplifier                                    5 ns
//   T_SUM  sum gates and sum inverter                             5 ns
// The station delay (T_GATE or T_AMP) is put on the carry that passes through
// the gate, so a carry inserted by equal operands leaves the bit at T_GEN, and
// the sum gates sample the carry ahead of the gate, as in the original line.
// The comparisons and the ADD END gate are given no delay of their own.
// Applying the amplifier gating after T_SET is a choice of this model.
module fca_adder_timed
  import fca_pkg::*;
#(
  parameter int unsigned N                    = AU_MAIN_WIDTH,
  parameter int unsigned AMP_SPACING_P        = AMP_SPACING,
  parameter bit          CARRY_OUT_IN_ADD_END = 1'b0,
  parameter realtime     T_GEN                = 12.5ns,
  parameter realtime     T_SET                = 20ns,
  parameter realtime     T_GATE               = 10ns / 9,
  parameter realtime     T_AMP                = 5ns,
  parameter realtime     T_SUM                = 5ns
) (
  input  dr_t [N-1:0] a,
  input  dr_t [N-1:0] b,
  input  dr_t         cin,
  output dr_t [N-1:0] s,
  output dr_t         cout,
  output logic        add_end
);
  timeunit 1ns;
  timeprecision 1ps;

  dr_t  [N:0]   carry;
  logic [N-1:0] bit_done;

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    localparam bit AMP = ((i + 1) % AMP_SPACING_P) == 0;
    logic u0, v0, w0, z0, x0, y0;
    logic u, v, w, z, x, y;
    dr_t  cin_d, csample, s0;   // the sum gates sample carry[i] directly

    fca_operand_compare u_cmp (
      .a(a[i]), .b(b[i]), .u(u0), .v(v0), .w(w0), .z(z0), .x(x0), .y(y0)
    );
    assign #(T_GEN) u = u0;
    assign #(T_GEN) v = v0;
    assign #(T_GEN) w = w0;
    assign #(T_GEN) z = z0;
    assign #(T_SET) x = x0;
    assign #(T_SET) y = y0;

    if (AMP) begin : g_amp
      assign #(T_AMP) cin_d = carry[i];
      fca_carry_amp u_amp (
        .cin(cin_d), .u(u), .v(v), .z(x), .csample(csample), .cout(carry[i+1])
      );
    end else begin : g_gate
      assign #(T_GATE) cin_d = carry[i];
      fca_carry_gate u_gate (
        .cin(cin_d), .u(u), .v(v), .x(x), .y(y), .csample(csample), .cout(carry[i+1])
      );
    end

    fca_sum_gates u_sum (.w(w), .z(z), .c(carry[i]), .s(s0));
    assign #(T_SUM) s[i] = s0;

    fca_sum_compare u_done (.s(s[i]), .done(bit_done[i]));
  end

  assign cout = carry[N];

  fca_add_end #(.N(N), .USE_COUT(CARRY_OUT_IN_ADD_END)) u_add_end (
    .bit_done(bit_done), .cout(cout), .add_end(add_end)
  );

endmodule
