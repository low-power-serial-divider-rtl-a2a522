// cla_adder: carry-lookahead adder, 4 bits by default.
//
// Each bit forms a propagate term P[i] = a[i] ^ b[i] and a generate term
// G[i] = a[i] & b[i]. Every carry is then built directly from those terms and
// the input carry in two gate levels (an AND per product, one OR), instead of
// rippling from bit to bit:
//   C1 = G0 + P0.C0
//   C2 = G1 + P1.G0 + P1.P0.C0
//   C3 = G2 + P2.G1 + P2.P1.G0 + P2.P1.P0.C0
//   C4 = G3 + P3.G2 + P3.P2.G1 + P3.P2.P1.G0 + P3.P2.P1.P0.C0
// and each sum bit is S[i] = P[i] ^ C[i]. These are the published equations;
// extending them to other widths with the same flattened
// sum of products is this design's own generalisation. All sum bits see the
// same delay.
//
// In the divider a is the partial remainder, b the inverted divisor and cin is
// tied to 1, so sum = a - divisor and cout = 1 exactly when a >= divisor.
//
// Interface: a, b, cin -> sum, cout. Timing: purely combinational.
module cla_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  logic [WIDTH-1:0] p;  // carry propagate
  logic [WIDTH-1:0] g;  // carry generate
  logic [WIDTH:0]   c;  // c[0] = input carry, c[WIDTH] = final carry

  assign p = a ^ b;
  assign g = a & b;

  // Carry lookahead: c[i] = OR over j < i of (g[j] & p[i-1] & ... & p[j+1]),
  // OR (p[i-1] & ... & p[0] & cin).
  always_comb begin
    logic term;
    c[0] = cin;
    for (int i = 1; i <= WIDTH; i++) begin
      c[i] = 1'b0;
      for (int j = 0; j < i; j++) begin
        term = g[j];
        for (int k = j + 1; k < i; k++) term = term & p[k];
        c[i] = c[i] | term;
      end
      term = cin;
      for (int k = 0; k < i; k++) term = term & p[k];
      c[i] = c[i] | term;
    end
  end

  assign sum  = p ^ c[WIDTH-1:0];
  assign cout = c[WIDTH];

endmodule
