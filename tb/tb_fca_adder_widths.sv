// tb_fca_adder_widths -- the fast carry adder at the other widths used in
// the original machine and at the widths of the earlier adders it is compared
// with: the 9-bit arithmetic adder, the 15-bit address adder and the 4-bit
// address modifier, plus 20-, 40- and 68-bit adders (the 68-bit one has six
// amplifier bits). All include the carry out in ADD END. The 4-bit adder is
// tested exhaustively (all operands, both carry-in values and both arrival
// orders), the others with directed and random additions.
module tb_fca_adder_widths;
  import fca_pkg::*;

  localparam int NW = 6;

  logic [NW-1:0] fin;
  int            k [NW];
  int            x [NW];

  `define FCA_WIDTH_INST(IDX, WIDTH, NRAND, EXH) \
    dr_t [WIDTH-1:0] a_``IDX, b_``IDX, s_``IDX; \
    dr_t c_``IDX, co_``IDX; \
    logic e_``IDX; \
    fca_adder #(.N(WIDTH), .CARRY_OUT_IN_ADD_END(1'b1)) dut_``IDX ( \
      .a(a_``IDX), .b(b_``IDX), .cin(c_``IDX), .s(s_``IDX), .cout(co_``IDX), .add_end(e_``IDX)); \
    fca_adder_driver #(.N(WIDTH), .CARRY_OUT_IN_ADD_END(1'b1), .NUM_RANDOM(NRAND), .EXHAUSTIVE(EXH)) drv_``IDX ( \
      .a(a_``IDX), .b(b_``IDX), .cin(c_``IDX), .s(s_``IDX), .cout(co_``IDX), .add_end(e_``IDX), \
      .checks(k[IDX]), .failures(x[IDX]), .finished(fin[IDX]));

  `FCA_WIDTH_INST(0, AU_SHORT_WIDTH, 500, 1'b0)
  `FCA_WIDTH_INST(1, ADDR_WIDTH, 500, 1'b0)
  `FCA_WIDTH_INST(2, ADDR_MOD_WIDTH, 50, 1'b1)
  `FCA_WIDTH_INST(3, 20, 500, 1'b0)
  `FCA_WIDTH_INST(4, 40, 500, 1'b0)
  `FCA_WIDTH_INST(5, 68, 500, 1'b0)

  function automatic int total(input int v [NW]);
    int t = 0;
    foreach (v[i]) t += v[i];
    return t;
  endfunction

  initial begin
    #10000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total(k), total(x) + 1);
    $finish;
  end

  initial begin
    wait (&fin);
    $display("TB_RESULT checks=%0d failures=%0d", total(k), total(x));
    $finish;
  end
endmodule
