// vedic_4x4: 4-bit by 4-bit unsigned Vedic (Urdhva Tiryagbhyam) multiplier.
//
// The operands are split into halves and four 2x2 Vedic multipliers form
// the vertical and crosswise partial products in parallel: A_lo*B_lo,
// A_hi*B_lo, A_lo*B_hi and A_hi*B_hi. Carry look-ahead adders (vedic_combine)
// then merge them: P[1:0] comes straight from A_lo*B_lo, a middle adder
// gives P[3:2] and a left adder gives P[7:4]. This split into four
// half-size multipliers and two carry look-ahead adders is the structure of
// the reference design at every level; the form of the adders is this design's.
//
// Timing: the only registers are the outputs of the 2x2 cells at the bottom
// of the hierarchy, so p = a*b one clock after a and b are applied; the
// adders of all levels above the cells form one combinational path.
module vedic_4x4 (
  input  logic        clk,
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);

  logic [3:0] q_ll, q_hl, q_lh, q_hh;

  vedic_2x2 u_ll (.clk, .a(a[1:0]),  .b(b[1:0]),  .p(q_ll));
  vedic_2x2 u_hl (.clk, .a(a[3:2]), .b(b[1:0]),  .p(q_hl));
  vedic_2x2 u_lh (.clk, .a(a[1:0]),  .b(b[3:2]), .p(q_lh));
  vedic_2x2 u_hh (.clk, .a(a[3:2]), .b(b[3:2]), .p(q_hh));

  vedic_combine #(.N(4)) u_add (.q_ll, .q_hl, .q_lh, .q_hh, .p);

endmodule
