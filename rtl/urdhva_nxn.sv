// urdhva_nxn: N x N-bit unsigned Urdhva multiplier for any N that is a power
// of two, N >= 2. It applies the vertically-and-crosswise rule recursively
// to N/2-bit digits, exactly as the 4x4 multiplier does with 2-bit digits:
//   s0 = xl*yl, s1 = xl*yh, s2 = xh*yl, s3 = xh*yh   (N-bit partial products)
//   first adder : s2 + s1                           -> t,   c1
//   second adder: t + {s3[H-1:0], s0[N-1:H]}        -> mid, c2   (H = N/2)
//   half adder  : c1 + c2                           -> hs,  hc
//   top         : s3[N-1:H] + {hc, hs}
//   p = {top, mid, s0[H-1:0]}
// N = 2 is the gate-level 2x2 cell and N = 4 the 4x4 multiplier; larger N
// instantiate four N/2 multipliers of this same module. Combinational.
// The construction for N = 2 and N = 4 is the Urdhva design; its extension
// to wider operands by the same rule, and writing the N-bit adders of the
// wider levels as plain additions, are this design's.
module urdhva_nxn #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  if (N == 2) begin : g_2x2
    urdhva_2x2 u_mult (.a, .b, .p);
  end else if (N == 4) begin : g_4x4
    urdhva_4x4 u_mult (.a, .b, .p);
  end else begin : g_rec
    localparam int unsigned H = N / 2;

    logic [N-1:0] s0, s1, s2, s3;
    logic [N-1:0] t, mid;
    logic         c1, c2, hs, hc;
    logic [H-1:0] top;

    urdhva_nxn #(.N(H)) u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .p(s0));
    urdhva_nxn #(.N(H)) u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .p(s1));
    urdhva_nxn #(.N(H)) u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .p(s2));
    urdhva_nxn #(.N(H)) u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .p(s3));

    always_comb begin
      {c1, t}   = {1'b0, s2} + {1'b0, s1};
      {c2, mid} = {1'b0, t} + {1'b0, s3[H-1:0], s0[N-1:H]};
    end

    half_adder u_ha (.a(c1), .b(c2), .sum(hs), .carry(hc));

    always_comb top = s3[N-1:H] + H'({hc, hs});

    assign p = {top, mid, s0[H-1:0]};
  end

  initial assert (N >= 2 && (N & (N - 1)) == 0)
    else $error("urdhva_nxn: N must be a power of two, at least 2");
endmodule
