// halfadder: one-bit half adder.
//
// In the 4x4 Vedic multiplier it adds the carry out of the first 4-bit
// adder (crosswise products) to the carry out of the second 4-bit adder
// (outer products); {carry, sum} is the 2-bit count of those carries that
// is then added into product bits M7..M6.
//
// Interface: a, b are the two bits; sum = a ^ b, carry = a & b.
// Timing: purely combinational.
//
// The cell and its place in the datapath come from the multiplier
// architecture; the two-gate realisation is the textbook one.
module halfadder (
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
