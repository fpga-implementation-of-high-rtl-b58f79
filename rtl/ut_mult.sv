// ut_mult: NxN-bit Urdhva-Tiryag multiplier built from four (N/2)x(N/2)
// multipliers and three N-bit carry select adders.
//
// Both operands are split into a high and a low half of H = N/2 bits:
// a = {ah, al}, b = {bh, bl}. Four half-size multipliers form
//   q0 = al*bl (vertical, right),  q1 = ah*bl and q2 = al*bh (crosswise),
//   q3 = ah*bh (vertical, left),
// all in parallel, so every partial product exists after one multiplier
// delay. They are then combined column by column:
//   adder 1: s1 = q1 + q2,                        carry c1
//   adder 2: s2 = s1 + {H zeros, q0[N-1:H]},      carry c2
//   adder 3: s3 = q3 + {zeros, c1 | c2, s2[N-1:H]}
//   p = {s3, s2[H-1:0], q0[H-1:0]}
// c1 and c2 both weigh 2^N within the middle column. They can never both be 1
// (if q1 + q2 overflows, what is left is too small for adding q0's upper half
// to overflow again), so one OR gate merges them. Adder 3 never carries out,
// since the product fits in 2N bits. Both facts are checked by assertions.
// This is the structure of the document's 4x4 block diagram: four 2x2
// multipliers, three 4-bit carry select adders and an OR gate.
//
// The document says that the method extends to larger operands but draws
// only N = 4. Larger widths reuse this module recursively until the
// halves are 2 bits wide, where the 2x2 cell ut_mult2 is used. N must be a
// power of two, 2 or more. Purely combinational, no clock.
//
// Ports: a multiplicand, b multiplier (N bits each, unsigned); p = a * b,
// 2N bits.
module ut_mult #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned H = N / 2;

  if (N == 2) begin : g_base
    ut_mult2 u_m2 (.a(a), .b(b), .p(p));
  end else begin : g_split
    logic [N-1:0] q0, q1, q2, q3;
    logic [N-1:0] s1, s2, s3;
    logic         c1, c2, c3;
    logic         cmid;

    if (H == 2) begin : g_leaf
      ut_mult2 u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
      ut_mult2 u_q1 (.a(a[N-1:H]), .b(b[H-1:0]), .p(q1));
      ut_mult2 u_q2 (.a(a[H-1:0]), .b(b[N-1:H]), .p(q2));
      ut_mult2 u_q3 (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));
    end else begin : g_rec
      ut_mult #(.N(H)) u_q0 (.a(a[H-1:0]), .b(b[H-1:0]), .p(q0));
      ut_mult #(.N(H)) u_q1 (.a(a[N-1:H]), .b(b[H-1:0]), .p(q1));
      ut_mult #(.N(H)) u_q2 (.a(a[H-1:0]), .b(b[N-1:H]), .p(q2));
      ut_mult #(.N(H)) u_q3 (.a(a[N-1:H]), .b(b[N-1:H]), .p(q3));
    end

    // Middle column: the two crosswise products.
    csel_adder #(.W(N)) u_add1 (
      .a(q1), .b(q2), .cin(1'b0), .sum(s1), .cout(c1)
    );
    // Add the upper half of the right vertical product.
    csel_adder #(.W(N)) u_add2 (
      .a(s1), .b({{H{1'b0}}, q0[N-1:H]}), .cin(1'b0), .sum(s2), .cout(c2)
    );

    assign cmid = c1 | c2;

    // Left column: the left vertical product plus everything carried into it.
    if (H > 1) begin : g_wide
      csel_adder #(.W(N)) u_add3 (
        .a(q3), .b({{(H-1){1'b0}}, cmid, s2[N-1:H]}), .cin(1'b0),
        .sum(s3), .cout(c3)
      );
    end

    assign p = {s3, s2[H-1:0], q0[H-1:0]};

    always_comb begin
      assert (!(c1 && c2)) else $error("ut_mult: both middle-column carries set");
      assert (!c3) else $error("ut_mult: carry out of the left column");
    end
  end
endmodule
