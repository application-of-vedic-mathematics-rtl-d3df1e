// vedic4bit: unsigned 4x4-bit Vedic (Urdhava Tiryagbhyam) multiplier.
//
// Each operand is split into a 2-bit upper and lower half, P = {pu, pl} and
// Q = {qu, ql}. Four 2x2 multipliers form all half products at once:
//   s0 = pl*ql  (vertical, right)      M03 M02 M01 M00
//   s1 = pl*qu  (crosswise)            M13 M12 M11 M10
//   s2 = pu*ql  (crosswise)            M23 M22 M21 M20
//   s3 = pu*qu  (vertical, left)       M33 M32 M31 M30
// They are then aligned as   mult = s3<<4 + (s1 + s2)<<2 + s0:
//   mult[1:0] = s0[1:0]                         (no addition needed)
//   {c1, lo1} = s1 + s2                          4-bit look-ahead adder Ad1
//   sp        = {s3[1:0], s0[3:2]}               bits of weight 2^2..2^5
//   {c2, lo2} = lo1 + sp                         4-bit look-ahead adder Ad2
//   mult[5:2] = lo2
//   {hc, hs}  = c1 + c2                          half adder HA
//   mult[7:6] = s3[3:2] + {hc, hs}               2-bit look-ahead adder Ad3
// Both c1 and c2 carry weight 2^6, so their sum is added to M33 M32.
//
// Interface: P (X3..X0) and Q (Y3..Y0) in, mult (M7..M0) = P*Q out.
// Timing: purely combinational; no clock, no reset, no pipeline.
//
// The split into four 2x2 products, the alignment, the two 4-bit
// carry look-ahead adders, the half adder on their carries and the final
// 2-bit look-ahead adder follow the published architecture, as do the
// port names and the internal signal names. Which 2x2 instance (M1..M4)
// computes which product is this design's reading of the schematic.
module vedic4bit (
  input  logic [3:0] P,
  input  logic [3:0] Q,
  output logic [7:0] mult
);

  logic [1:0] pl, pu, ql, qu;     // operand halves
  logic [3:0] s0, s1, s2, s3;     // 2x2 half products
  logic [3:0] sp;                 // {M31 M30 M03 M02}
  logic [3:0] lo1, lo2;           // sums of Ad1 and Ad2
  logic       c1, c2;             // carries of Ad1 and Ad2 (weight 2^6)
  logic       hs, hc;             // half-adder sum and carry
  logic [1:0] hi;                 // M7 M6

  assign pl = P[1:0];
  assign pu = P[3:2];
  assign ql = Q[1:0];
  assign qu = Q[3:2];

  // Four 2x2 multipliers, all working in parallel.
  mul M1 (.a(pl), .b(ql), .q(s0));
  mul M2 (.a(pl), .b(qu), .q(s1));
  mul M3 (.a(pu), .b(ql), .q(s2));
  mul M4 (.a(pu), .b(qu), .q(s3));

  // Crosswise products added together.
  lookaheadadder #(.WIDTH(4)) Ad1 (.a(s1), .b(s2), .sum(lo1), .carry(c1));

  // Upper half of the right product and lower half of the left product.
  assign sp = {s3[1:0], s0[3:2]};

  lookaheadadder #(.WIDTH(4)) Ad2 (.a(lo1), .b(sp), .sum(lo2), .carry(c2));

  // The two carries, both of weight 2^6, counted by a half adder.
  halfadder HA (.a(c1), .b(c2), .sum(hs), .carry(hc));

  // Top two product bits.
  lookaheadadder2 Ad3 (.a(s3[3:2]), .b({hc, hs}), .sum(hi));

  assign mult = {hi, lo2, s0[1:0]};

endmodule
