// up_counter: synchronous up counter with count enable and clear, 4 bits by
// default. In the divider it counts the subtractions, so its value is the
// quotient.
//
// All bits share one clock. Bit i toggles when the toggle term t[i] is 1; the
// terms form an AND chain that starts with the count enable:
//   t[0] = ce, t[i] = t[i-1] & q[i-1]
// so with ce = 1 a bit toggles when every lower bit is 1, and with ce = 0 the
// whole chain is 0 and the count holds. An XOR per bit forms q[i] ^ t[i]. For 4
// bits this is 3 AND gates, 4 XOR gates and 4 master-slave flip-flops. The
// count runs 0000, 0001, ... 1111 and wraps to 0000.
//
// Clear gates the flip-flop inputs to 0, so it takes effect at the next
// falling clock edge and overrides the count enable; that clear waits for the
// clock is this design's choice.
//
// Interface: clk, ce, clr -> q. Timing: q changes only at the falling edge of
// clk (the flip-flops are negative-edge master-slave).
module up_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             clr,
  output logic [WIDTH-1:0] q
);

  logic [WIDTH-1:0] t;  // toggle terms (AND chain)
  logic [WIDTH-1:0] d;  // next state

  assign t[0] = ce;
  for (genvar i = 1; i < WIDTH; i++) begin : g_chain
    assign t[i] = t[i-1] & q[i-1];
  end

  assign d = clr ? '0 : (q ^ t);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    ms_dff u_ff (.clk(clk), .d(d[i]), .q(q[i]));
  end

endmodule
