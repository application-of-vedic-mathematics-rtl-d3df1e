// lookaheadadder2: 2-bit carry look-ahead adder without carry output.
//
// It forms the two most significant product bits M7 M6 of the 4x4 Vedic
// multiplier by adding the half adder's {carry, sum} to the upper half
// M33 M32 of the high 2x2 product. For operands reaching this adder the
// sum never exceeds 3 (the full product is at most 15*15 = 225), so no
// carry out is needed and none is provided.
//
// Bit 0: sum[0] = p0.  Bit 1: sum[1] = p1 ^ c1 with the look-ahead carry
// c1 = g0, where g = a & b and p = a ^ b.
//
// Interface: a, b 2-bit operands; sum = (a + b) mod 4.
// Timing: purely combinational.
//
// The adder, its 2-bit size and its two-bit-only output follow the
// multiplier's structure; the equations are the standard look-ahead ones.
module lookaheadadder2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [1:0] sum
);

  logic       g0;       // generate of bit 0 (bit 1's is not needed)
  logic [1:0] p;        // propagate
  logic       c1;       // look-ahead carry into bit 1

  always_comb begin
    g0     = a[0] & b[0];
    p      = a ^ b;
    c1     = g0;
    sum[0] = p[0];
    sum[1] = p[1] ^ c1;
  end

endmodule
