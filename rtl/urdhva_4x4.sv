// urdhva_4x4: 4x4-bit unsigned multiplier built from four 2x2 Urdhva
// multipliers, the vertically-and-crosswise rule applied to 2-bit digits.
// With X = {xh, xl} and Y = {yh, yl} (2-bit halves):
//   s0 = xl*yl (weight 1), s1 = xl*yh and s2 = xh*yl (weight 4),
//   s3 = xh*yh (weight 16), each a 4-bit partial product.
// Summation:
//   first 4-bit adder : s2 + s1                       -> t,  c1
//   second 4-bit adder: t + {s3[1:0], s0[3:2]}        -> p[5:2], c2
//   half adder        : c1 + c2                       -> hs, hc
//   final 2-bit add   : {s3[3], s3[2]} + {hc, hs}     -> p[7:6]
//   p[1:0] = s0[1:0]
// The final 2-bit add cannot overflow because the product fits in 8 bits.
// Example: 13 x 11 gives s2+s1 = 1001+0010 = 1011, then 1011+1000 = 0011
// carry 1, half adder sum 1, high bits 01+01 = 10, product 1000_1111 = 143.
// Combinational. The partial products, the two adders and the half adder
// follow the Urdhva 4x4 structure; writing the last 2-bit add as a
// behavioural addition is this design's choice.
module urdhva_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] s0, s1, s2, s3;
  logic [3:0] t, mid;
  logic       c1, c2, hs, hc;
  logic [1:0] top;

  urdhva_2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(s0));
  urdhva_2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(s1));
  urdhva_2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(s2));
  urdhva_2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(s3));

  adder4 u_add1 (.a(s2), .b(s1), .sum(t), .cout(c1));
  adder4 u_add2 (.a(t), .b({s3[1:0], s0[3:2]}), .sum(mid), .cout(c2));

  half_adder u_ha (.a(c1), .b(c2), .sum(hs), .carry(hc));

  always_comb top = s3[3:2] + {hc, hs};

  assign p = {top, mid, s0[1:0]};
endmodule
