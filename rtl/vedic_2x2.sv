// vedic_2x2: 2-bit by 2-bit Urdhva Tiryagbhyam (vertically and crosswise)
// multiplier, the base cell of the Vedic multiplier hierarchy.
//
// The product is formed in the order of the sutra: the right vertical product
// a0*b0 gives bit 0; the crosswise products a1*b0 and a0*b1 are added in a half
// adder to give bit 1 and a carry; the left vertical product a1*b1 plus that
// carry, in a second half adder, gives bits 2 and 3.
//
// Timing: the 4-bit product is registered on the rising edge of clk, so p holds
// a*b one clock after a and b are applied. Registering at this level, and only
// here, is how every multiplier of the hierarchy gets its single clock of
// latency; this placement is this design's reading of the register count of the
// reference implementation (one 4-bit register per 2x2 cell). No reset: the
// register is overwritten every clock.
module vedic_2x2 (
  input  logic       clk,
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);

  logic v0, x10, x01, v1;   // vertical and crosswise partial products
  logic s1, c1, s2, c2;     // half-adder sums and carries
  logic [3:0] p_d;

  always_comb begin
    v0  = a[0] & b[0];
    x10 = a[1] & b[0];
    x01 = a[0] & b[1];
    v1  = a[1] & b[1];
    s1  = x10 ^ x01;
    c1  = x10 & x01;
    s2  = v1 ^ c1;
    c2  = v1 & c1;
    p_d = {c2, s2, s1, v0};
  end

  always_ff @(posedge clk) p <= p_d;

endmodule
