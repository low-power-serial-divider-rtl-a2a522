// serial_divider: 4-bit unsigned divider by repeated subtraction.
//
// The register holds the partial remainder R, first the dividend X. The
// divisor Y is inverted bit by bit and added to R with the adder's carry
// input tied to 1, so the adder forms R - Y, and its final carry is 1 exactly
// when R >= Y. That carry drives the counter's count enable and, ORed with
// LOAD, the register's clock enable. So at every falling clock edge while the
// carry is 1 the register takes R - Y and the counter steps up by one; once R
// has dropped below Y the carry is 0, both hold, the counter holds the
// quotient and the register the remainder.
//
// Operation: hold Y, put X on x, raise load over one falling clock edge (this
// loads X and clears the counter), then drop load. After another
// floor(X / Y) falling edges busy goes to 0 and quotient / remainder are
// final; they stay until the next load. Example: 1101 / 0100 steps the
// register 1101 -> 1001 -> 0101 -> 0001 and stops with quotient 0011.
//
// Interface: clk, load, x, y -> quotient, remainder, busy. busy is the adder
// carry, brought out so that the end of a division can be seen; exposing it
// is this design's choice. Y = 0 is not supported: the carry never falls and
// the counter wraps around. X < Y gives quotient 0 and remainder X.
// Timing: every state change is at the falling edge of clk (master-slave
// flip-flops); load, x and y must be stable before that edge. Latency is one
// load edge plus one edge per quotient unit, at most 2**WIDTH - 1.
module serial_divider #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             load,
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  output logic [WIDTH-1:0] quotient,
  output logic [WIDTH-1:0] remainder,
  output logic             busy
);

  logic [WIDTH-1:0] y_n;      // one's complement of the divisor
  logic [WIDTH-1:0] diff;     // R - Y
  logic             carry;    // adder final carry: R >= Y
  logic             reg_ce;   // register clock enable

  assign y_n    = ~y;
  assign reg_ce = carry | load;

  cla_adder #(.WIDTH(WIDTH)) u_adder (
    .a    (remainder),
    .b    (y_n),
    .cin  (1'b1),
    .sum  (diff),
    .cout (carry)
  );

  data_register #(.WIDTH(WIDTH)) u_reg (
    .clk      (clk),
    .ce       (reg_ce),
    .load     (load),
    .din_load (x),
    .din_run  (diff),
    .q        (remainder)
  );

  up_counter #(.WIDTH(WIDTH)) u_count (
    .clk (clk),
    .ce  (carry),
    .clr (load),
    .q   (quotient)
  );

  assign busy = carry;

endmodule
