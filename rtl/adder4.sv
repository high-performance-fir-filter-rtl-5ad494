// adder4: 4-bit ripple-carry adder with carry out, the "full adder" stage of
// the 4x4 Urdhva multiplier. Each bit is a full adder written as
// sum = a ^ b ^ c, carry = majority(a, b, c); the carry ripples from bit 0 to
// bit 3. Combinational. The ripple-carry structure is this design's choice:
// the multiplier only needs some 4-bit adder with a carry out.
module adder4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [3:0] sum,
  output logic       cout
);
  logic cy;  // carry into the bit being added

  always_comb begin
    cy = 1'b0;
    for (int i = 0; i < 4; i++) begin
      sum[i] = a[i] ^ b[i] ^ cy;
      cy     = (a[i] & b[i]) | (a[i] & cy) | (b[i] & cy);
    end
    cout = cy;
  end
endmodule
