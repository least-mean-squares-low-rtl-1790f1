// vedic_combine: adder stage of one level of the Vedic multiplier hierarchy.
//
// An NxN product is assembled from four (N/2)x(N/2) products, with H = N/2:
//   q_ll = A[H-1:0]*B[H-1:0]   q_hl = A[N-1:H]*B[H-1:0]
//   q_lh = A[H-1:0]*B[N-1:H]   q_hh = A[N-1:H]*B[N-1:H]
// The low H bits of q_ll are P[H-1:0] directly. The middle carry look-ahead
// adder sums the two crosswise products and the upper half of q_ll; its low H
// bits are P[N-1:H] and the rest (H bits plus two carries) goes left, where a
// second carry look-ahead adder adds it to q_hh to give P[2N-1:N].
// The three-operand middle sum is built as two N-bit adders in series; the
// two carries they produce are the two extra bits passed left.
//
// Purely combinational; N must be a multiple of 4.
module vedic_combine #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   q_ll,
  input  logic [N-1:0]   q_hl,
  input  logic [N-1:0]   q_lh,
  input  logic [N-1:0]   q_hh,
  output logic [2*N-1:0] p
);

  localparam int unsigned H = N / 2;

  logic [N-1:0] s1, s2, ll_hi, hi_op, top;
  logic         c1, c2;
  logic         c_top;  // always 0: an NxN product fits in 2N bits

  assign ll_hi = N'(q_ll[N-1:H]);

  // middle adder: crosswise products plus upper half of the low product
  cla_adder #(.W(N)) u_mid0 (.a(q_hl), .b(q_lh),  .cin(1'b0), .sum(s1), .cout(c1));
  cla_adder #(.W(N)) u_mid1 (.a(s1),   .b(ll_hi), .cin(1'b0), .sum(s2), .cout(c2));

  assign hi_op = N'({c1 & c2, c1 ^ c2, s2[N-1:H]});

  // left adder: high product plus what the middle adder passes on
  cla_adder #(.W(N)) u_left (.a(q_hh), .b(hi_op), .cin(1'b0), .sum(top), .cout(c_top));

  assign p = {top, s2[H-1:0], q_ll[H-1:0]};


endmodule
