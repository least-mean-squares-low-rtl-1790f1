// cla_adder: W-bit carry look-ahead adder, sum = a + b + cin.
//
// Every carry is looked ahead from the bitwise generate (a&b) and propagate
// (a^b) terms with a parallel-prefix (Kogge-Stone) network: in step s each
// position combines its (generate, propagate) pair with the one 2^s bits
// below it, so after ceil(log2 W) steps gs[i] says whether a carry leaves bit
// i. The carry in is folded into bit 0's generate term. No carry ripples, and
// the depth grows with log2 W. The prefix form of the look-ahead is this
// design's choice; the multiplier hierarchy only calls for a carry look-ahead
// adder.
//
// Purely combinational. W must be at least 2.
module cla_adder #(
  parameter int unsigned W = 64
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned STEPS = $clog2(W);

  logic [W-1:0] g, p, gs, ps;

  always_comb begin
    g     = a & b;
    p     = a ^ b;
    gs    = g;
    gs[0] = g[0] | (p[0] & cin);
    ps    = p;
    for (int unsigned s = 0; s < STEPS; s++) begin
      // positions below 2^s have nothing further below: keep their terms
      gs = gs | (ps & (gs << (1 << s)));
      ps = ps & ((ps << (1 << s)) | W'((1 << s) - 1));
    end
    // the carry into bit i is the group generate of bits i-1 .. 0 and cin
    sum  = p ^ {gs[W-2:0], cin};
    cout = gs[W-1];
  end

endmodule
