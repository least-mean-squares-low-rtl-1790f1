// vedic_8x8: 8-bit by 8-bit unsigned Vedic (Urdhva Tiryagbhyam) multiplier.
//
// The operands are split into halves and four 4x4 Vedic multipliers form
// the vertical and crosswise partial products in parallel: A_lo*B_lo,
// A_hi*B_lo, A_lo*B_hi and A_hi*B_hi. Carry look-ahead adders (vedic_combine)
// then merge them: P[3:0] comes straight from A_lo*B_lo, a middle adder
// gives P[7:4] and a left adder gives P[15:8]. This split into four
// half-size multipliers and two carry look-ahead adders is the structure of
// the reference design at every level; the form of the adders is this design's.
//
// Timing: the only registers are the outputs of the 2x2 cells at the bottom
// of the hierarchy, so p = a*b one clock after a and b are applied; the
// adders of all levels above the cells form one combinational path.
module vedic_8x8 (
  input  logic        clk,
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] p
);

  logic [7:0] q_ll, q_hl, q_lh, q_hh;

  vedic_4x4 u_ll (.clk, .a(a[3:0]),  .b(b[3:0]),  .p(q_ll));
  vedic_4x4 u_hl (.clk, .a(a[7:4]), .b(b[3:0]),  .p(q_hl));
  vedic_4x4 u_lh (.clk, .a(a[3:0]),  .b(b[7:4]), .p(q_lh));
  vedic_4x4 u_hh (.clk, .a(a[7:4]), .b(b[7:4]), .p(q_hh));

  vedic_combine #(.N(8)) u_add (.q_ll, .q_hl, .q_lh, .q_hh, .p);

endmodule
