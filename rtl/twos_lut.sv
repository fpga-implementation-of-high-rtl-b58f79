// twos_lut: 2's complement of an N-bit value, read from a lookup table.
//
// Instead of inverting the operand and adding one (which needs an adder
// stage), the output is looked up in a table of 2^N constant entries,
// entry[x] = (2^N - x) mod 2^N. The table is a constant computed when the
// design is elaborated, so synthesis turns it into plain logic. In the
// Nikhilam multiplier this value is the operand's distance from the base
// 2^N. Reading the 2's complement from a table follows the document; the
// formula that fills the table is the definition of the 2's complement.
// Combinational, no clock.
//
// Ports: x the N-bit input, y its 2's complement (x = 0 gives y = 0).
module twos_lut #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] y
);
  typedef logic [N-1:0] entry_t;
  typedef entry_t       table_t [2**N];

  function automatic table_t build_table();
    table_t t;
    for (int i = 0; i < 2**N; i++) begin
      t[i] = entry_t'((2**N - i) % (2**N));
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign y = TABLE[x];
endmodule
