// data_register: the divider's dividend / partial-remainder register, 4 bits
// by default.
//
// Per bit, a 2:1 multiplexer with LOAD on its select picks the dividend
// (load = 1) or the adder sum (load = 0). A second 2:1 multiplexer feeds the
// flip-flop its own output back while the clock enable ce is 0, so the stored
// value holds; with ce = 1 the chosen input is stored. Giving the enable by
// recirculation rather than by gating the clock is this design's choice; it
// keeps the clock free of glitches when ce changes while the clock is high.
//
// Interface: clk, ce, load, din_load (dividend), din_run (adder sum) -> q.
// Timing: q changes only at the falling edge of clk; ce, load and the data
// must be stable before that edge.
module data_register #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             load,
  input  logic [WIDTH-1:0] din_load,
  input  logic [WIDTH-1:0] din_run,
  output logic [WIDTH-1:0] q
);

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    logic sel;   // dividend or adder sum
    logic nxt;   // after the enable (hold) mux

    mux2   u_sel  (.a(din_run[i]), .b(din_load[i]), .s(load), .out(sel));
    mux2   u_hold (.a(q[i]),       .b(sel),         .s(ce),   .out(nxt));
    ms_dff u_ff   (.clk(clk), .d(nxt), .q(q[i]));
  end

endmodule
