// lookaheadadder: WIDTH-bit carry look-ahead adder (4 bits by default).
//
// Each bit forms generate g[i] = a[i]&b[i] and propagate p[i] = a[i]^b[i].
// Every carry is then computed directly from the g/p terms in flattened
// two-level form,
//   c[i+1] = g[i] | p[i]g[i-1] | p[i]p[i-1]g[i-2] | ... | p[i]..p[1]g[0],
// rather than rippling from bit to bit, and sum[i] = p[i] ^ c[i].
// There is no carry input: c[0] = 0.
//
// Interface: a, b are WIDTH-bit unsigned operands; {carry, sum} = a + b.
// Timing: purely combinational.
//
// In the 4x4 multiplier two of these are used: Ad1 adds the two crosswise
// 2x2 products, Ad2 adds Ad1's sum to the aligned outer products. The
// look-ahead structure and the 4-bit size follow the architecture; the
// absence of a carry input and the WIDTH parameter are this design's own.
module lookaheadadder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             carry
);

  logic [WIDTH-1:0] g;   // generate
  logic [WIDTH-1:0] p;   // propagate
  logic [WIDTH:0]   c;   // c[i] is the carry into bit i

  always_comb begin
    logic term;
    g = a & b;
    p = a ^ b;
    c = '0;
    for (int i = 0; i < WIDTH; i++) begin
      // c[i+1]: OR over j of g[j] propagated through bits j+1..i
      for (int j = 0; j <= i; j++) begin
        term = g[j];
        for (int k = j + 1; k <= i; k++) term = term & p[k];
        c[i+1] = c[i+1] | term;
      end
    end
    sum   = p ^ c[WIDTH-1:0];
    carry = c[WIDTH];
  end

endmodule
