// vedic_32x32: 32-bit by 32-bit unsigned Vedic (Urdhva Tiryagbhyam) multiplier.
//
// The operands are split into halves and four 16x16 Vedic multipliers form
// the vertical and crosswise partial products in parallel: A_lo*B_lo,
// A_hi*B_lo, A_lo*B_hi and A_hi*B_hi. Carry look-ahead adders (vedic_combine)
// then merge them: P[15:0] comes straight from A_lo*B_lo, a middle adder
// gives P[31:16] and a left adder gives P[63:32]. This split into four
// half-size multipliers and two carry look-ahead adders is the structure of
// the reference design at every level; the form of the adders is this design's.
//
// Timing: the only registers are the outputs of the 2x2 cells at the bottom
// of the hierarchy, so p = a*b one clock after a and b are applied; the
// adders of all levels above the cells form one combinational path.
module vedic_32x32 (
  input  logic        clk,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [63:0] p
);

  logic [31:0] q_ll, q_hl, q_lh, q_hh;

  vedic_16x16 u_ll (.clk, .a(a[15:0]),  .b(b[15:0]),  .p(q_ll));
  vedic_16x16 u_hl (.clk, .a(a[31:16]), .b(b[15:0]),  .p(q_hl));
  vedic_16x16 u_lh (.clk, .a(a[15:0]),  .b(b[31:16]), .p(q_lh));
  vedic_16x16 u_hh (.clk, .a(a[31:16]), .b(b[31:16]), .p(q_hh));

  vedic_combine #(.N(32)) u_add (.q_ll, .q_hl, .q_lh, .q_hh, .p);

endmodule
