// ms_dff: negative-edge D flip-flop, standing for the master-slave pair.
//
// The circuit this models is a master latch open while clk = 1 followed by a
// slave latch open while clk = 0 (through an inverter on the clock). When clk
// falls the master closes on the value d had just before the edge and the
// slave passes it to q, so q changes only once per period, at the falling
// edge. That behaviour is exactly that of a falling-edge register, which is
// how it is written here: two latches in a loop of feedback logic would be
// reported by simulators and synthesis as combinational loops although the
// two are never open together.
//
// Interface: clk, d, q. No reset and no enable: the blocks around it provide
// those (see data_register and up_counter).
// Timing: d is sampled at the falling edge of clk; q changes right after it.
module ms_dff (
  input  logic clk,
  input  logic d,
  output logic q
);

  always_ff @(negedge clk) begin
    q <= d;
  end

endmodule
