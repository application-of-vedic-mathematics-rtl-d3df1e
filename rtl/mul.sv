// mul: unsigned 2x2-bit multiplier, the leaf cell of the 4x4 Vedic multiplier.
//
// The cell applies the vertically-and-crosswise rule at bit level:
//   vertical (right)  q[0] = a[0]&b[0]
//   crosswise         a[1]&b[0] + a[0]&b[1]  -> q[1] and a carry
//   vertical (left)   a[1]&b[1] plus that carry -> q[3:2]
// Four AND terms and two half-adder stages give the 4-bit product; the
// result never exceeds 3*3 = 9, so q[3] is only set for 3*3.
//
// Interface: a, b are 2-bit unsigned operands, q = a*b (4 bits).
// Timing: purely combinational, no clock, no reset.
//
// The 2x2 cell, its name and its 4-bit output are those of the multiplier
// this RTL implements; the gate-level contents above are this design's own
// choice, since only the cell's function is specified.
module mul (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);

  logic pp00, pp10, pp01, pp11;   // partial products a[i]&b[j]
  logic cross_carry;              // carry out of the crosswise column

  always_comb begin
    pp00 = a[0] & b[0];
    pp10 = a[1] & b[0];
    pp01 = a[0] & b[1];
    pp11 = a[1] & b[1];

    cross_carry = pp10 & pp01;

    q[0] = pp00;
    q[1] = pp10 ^ pp01;
    q[2] = pp11 ^ cross_carry;
    q[3] = pp11 & cross_carry;
  end

endmodule
