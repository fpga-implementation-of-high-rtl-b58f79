// nikhilam_mult: NxN-bit multiplier after the Nikhilam sutra ("all from nine
// and the last from ten"), with the base B = 2^N.
//
// Each operand is replaced by its distance from the base, da = B - a and
// db = B - b, which in binary is the operand's 2's complement. Then
//   a * b = (a - db) * B + da * db,
// so the product is the cross difference a - db (equal to b - da) shifted up
// by N bits, plus the product of the two small deficits. The datapath:
//   1. two lookup tables (twos_lut) give da and db;
//   2. the Urdhva-Tiryag multiplier ut_mult forms q = da * db (2N bits);
//   3. the low N bits of q are the low N bits of the result;
//   4. adder 1 forms the cross difference a - db, adder 2 adds the high
//      N bits of q to it, and that sum is the high N bits of the result.
// Both adders are plain "+"/"-" operators left to synthesis, as in the
// document's modified design, which uses such an adder instead of a carry
// save adder. Everything is modulo 2^N; for nonzero operands the true high
// half lies in 0 .. 2^N - 2, so no information is lost.
//
// A zero operand is this design's own addition: its deficit would be 2^N,
// one bit too wide for the N-bit tables and multiplier (the 2's complement
// of 0 is 0), and the formula would then give a wrong result. When either
// operand is zero the product is forced to zero. Combinational, no clock.
//
// Ports: a multiplicand, b multiplier (N bits, unsigned); p = a * b, 2N bits.
module nikhilam_mult #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N-1:0]   da, db;      // deficits from the base 2^N
  logic [2*N-1:0] q;           // da * db
  logic [N-1:0]   diff;       // a - db, the cross difference
  logic [N-1:0]   hi;          // high half of the product
  logic           zero_op;

  twos_lut #(.N(N)) u_t1 (.x(a), .y(da));
  twos_lut #(.N(N)) u_t2 (.x(b), .y(db));

  ut_mult #(.N(N)) u_mul (.a(da), .b(db), .p(q));

  always_comb begin
    diff    = a - db;
    hi      = diff + q[2*N-1:N];
    zero_op = (a == '0) || (b == '0);
    p       = zero_op ? '0 : {hi, q[N-1:0]};
  end
endmodule
