// mux2: one-bit 2:1 multiplexer.
//
// out = a when s = 0 and out = b when s = 1. In the divider four of these
// pick, bit by bit, either the adder sum (a) or the dividend (b) for the
// register, with the LOAD signal on s. The register also uses one per bit to
// recirculate its value while its clock enable is low, which is this
// design's way of giving a flip-flop without an enable pin a clock enable.
//
// Interface: a, b, s, out. Timing: purely combinational.
module mux2 (
  input  logic a,
  input  logic b,
  input  logic s,
  output logic out
);

  assign out = s ? b : a;

endmodule
