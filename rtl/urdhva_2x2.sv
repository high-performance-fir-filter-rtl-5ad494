// urdhva_2x2: 2x2-bit unsigned multiplier after the Urdhva-Tiryagbhyam
// ("vertically and crosswise") rule, made of four 2-input AND gates and two
// half adders.
//   vertical   : p[0] = a[0]b[0]
//   crosswise  : a[1]b[0] + a[0]b[1] in the first half adder -> p[1], c1
//   vertical   : a[1]b[1] + c1 in the second half adder      -> p[2], p[3]
// Combinational; the output settles one AND gate and two half adders after
// the inputs change. This gate structure is the one the Vedic multiplier
// design prescribes.
module urdhva_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic c1;

  always_comb begin
    a0b0 = a[0] & b[0];
    a1b0 = a[1] & b[0];
    a0b1 = a[0] & b[1];
    a1b1 = a[1] & b[1];
  end

  assign p[0] = a0b0;

  half_adder u_ha_cross (.a(a1b0), .b(a0b1), .sum(p[1]), .carry(c1));
  half_adder u_ha_high  (.a(a1b1), .b(c1),   .sum(p[2]), .carry(p[3]));
endmodule
