// csel_adder: W-bit carry select adder with carry in and carry out.
//
// The operands are cut into blocks of BLK bits. The lowest block is a ripple
// carry adder fed by cin. Every higher block holds two ripple carry adders,
// one that assumes an incoming carry of 0 and one that assumes 1, and both
// work at once; the real carry from the block below then only selects one of
// the two sums and carries. The carry thus crosses a block through one
// multiplexer instead of BLK full adders. Combinational, no clock.
//
// The multipliers use this adder as their "high speed" 4-bit adder in place
// of a ripple carry adder, as the document proposes. The block size and the
// ripple adders inside the blocks are this design's own choice: the document
// names the adder type but does not draw its inside.
//
// Ports: a, b operands, cin carry in; sum = a + b + cin modulo 2^W, cout the
// carry out of the top bit.
module csel_adder #(
  parameter int unsigned W   = 4,
  parameter int unsigned BLK = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NBLK = (W + BLK - 1) / BLK;

  // Carry into each block; carry[NBLK] is the carry out.
  logic [NBLK:0] carry;
  assign carry[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int unsigned LO = k * BLK;
    localparam int unsigned HI = ((k + 1) * BLK < W) ? (k + 1) * BLK : W;

    if (k == 0) begin : g_ripple
      logic [HI-LO-1:0] bsum;
      logic             bcout;

      // Lowest block: plain ripple carry from cin.
      always_comb begin
        logic c;
        c = cin;
        for (int unsigned i = LO; i < HI; i++) begin
          bsum[i-LO] = a[i] ^ b[i] ^ c;
          c = (a[i] & b[i]) | (c & (a[i] ^ b[i]));
        end
        bcout = c;
      end

      assign sum[HI-1:LO] = bsum;
      assign carry[k+1]   = bcout;
    end else begin : g_select
      logic [HI-LO-1:0] sum0, sum1;
      logic             cout0, cout1;

      // Two speculative ripple adders, for an incoming carry of 0 and of 1.
      always_comb begin
        logic c0, c1;
        c0 = 1'b0;
        c1 = 1'b1;
        for (int unsigned i = LO; i < HI; i++) begin
          sum0[i-LO] = a[i] ^ b[i] ^ c0;
          sum1[i-LO] = a[i] ^ b[i] ^ c1;
          c0 = (a[i] & b[i]) | (c0 & (a[i] ^ b[i]));
          c1 = (a[i] & b[i]) | (c1 & (a[i] ^ b[i]));
        end
        cout0 = c0;
        cout1 = c1;
      end

      // The real carry from below picks one result.
      assign sum[HI-1:LO] = carry[k] ? sum1 : sum0;
      assign carry[k+1]   = carry[k] ? cout1 : cout0;
    end
  end

  assign cout = carry[NBLK];
endmodule
