// vedic_top: the two 4x4 Vedic multipliers side by side.
//
// ut_mult is the Urdhva-Tiryag (vertically and crosswise) multiplier: four
// 2x2 cells form all partial products at once and three carry select adders
// sum them. nikhilam_mult is the Nikhilam multiplier: it multiplies the two
// operands' distances from 2^N on its own Urdhva-Tiryag multiplier and
// corrects the upper half with one addition. The two are independent; each
// has its own operand and product ports, so both can be exercised (or
// compared) at once. Both are purely combinational: a product is valid one
// propagation delay after its operands change, with no clock or handshake.
//
// Ports: ut_a, ut_b -> ut_p = ut_a * ut_b; nik_a, nik_b -> nik_p =
// nik_a * nik_b. Operands are N-bit unsigned, products 2N bits.
module vedic_top #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   ut_a,
  input  logic [N-1:0]   ut_b,
  output logic [2*N-1:0] ut_p,
  input  logic [N-1:0]   nik_a,
  input  logic [N-1:0]   nik_b,
  output logic [2*N-1:0] nik_p
);
  ut_mult       #(.N(N)) u_ut  (.a(ut_a),  .b(ut_b),  .p(ut_p));
  nikhilam_mult #(.N(N)) u_nik (.a(nik_a), .b(nik_b), .p(nik_p));
endmodule
