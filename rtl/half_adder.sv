// half_adder: one-bit half adder, the basic cell of the Urdhva multipliers.
// sum = a XOR b, carry = a AND b. Purely combinational, no clock.
// The 2x2 Urdhva multiplier uses two of these and the 4x4 multiplier one more
// to combine the carries of its two 4-bit adders.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
