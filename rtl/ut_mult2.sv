// ut_mult2: 2x2-bit Urdhva-Tiryag ("vertically and crosswise") multiplier.
//
// Four AND gates form the bit products a0b0, a1b0, a0b1 and a1b1. The
// vertical product a0b0 is result bit s0. The two crosswise products are added
// by the first half adder, whose sum is s1 and whose carry c1 goes, together
// with the vertical product a1b1, into the second half adder; its sum is s2
// and its carry is the top bit s3. This is the cell the document draws: four
// AND gates and two half adders, with a total delay of two half adders after
// the bit products. Combinational, no clock.
//
// Ports: a, b are the 2-bit operands; p = {s3, s2, s1, s0} is the 4-bit
// product.
module ut_mult2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a1b0, a0b1, a1b1;
  logic s1, c1, s2, c2;

  always_comb begin
    a0b0 = a[0] & b[0];
    a1b0 = a[1] & b[0];
    a0b1 = a[0] & b[1];
    a1b1 = a[1] & b[1];
  end

  // Crosswise step: a0b1 + a1b0.
  half_adder u_ha_cross (.a(a0b1), .b(a1b0), .sum(s1), .carry(c1));
  // Last vertical step: a1b1 plus the carry of the crosswise step.
  half_adder u_ha_vert  (.a(a1b1), .b(c1),   .sum(s2), .carry(c2));

  assign p = {c2, s2, s1, a0b0};
endmodule
