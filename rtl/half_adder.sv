// half_adder: one-bit half adder, the basic cell of the 2x2 Urdhva-Tiryag
// multiplier.
//
// sum is the XOR and carry the AND of the two input bits. Purely
// combinational, no clock. The multiplier's 2x2 cell is built from two of
// these; the gate-level form here is the textbook one, since the cell is only
// named, not drawn at gate level.
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
