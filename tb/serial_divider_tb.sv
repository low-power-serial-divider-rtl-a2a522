// serial_divider_tb: end-to-end self-check of the 4-bit serial divider at its
// default size.
//
// For every dividend X = 0..15 and divisor Y = 1..15 (240 divisions) the
// bench loads X with one LOAD clock, then follows the division edge by edge.
// After the k-th falling edge following the load, while k <= X / Y, it checks
// quotient = k and remainder = X - k*Y, so every subtraction step is checked.
// It checks that busy falls exactly after floor(X / Y) edges (the latency of
// the design) and that quotient and remainder then hold for three more edges.
// Two worked cases are traced separately: 1101 / 0100 must pass through the
// remainders 1001, 0101, 0001 and end with quotient 0011, and 1111 / 1111
// must give quotient 0001 and remainder 0000.
//
// Mechanisms counted, each of which must occur: a load, a subtraction step,
// a stop with the result held, a division with X < Y that stops at once, and
// a division reaching the largest quotient 1111.
module serial_divider_tb;
  localparam int unsigned W = 4;

  logic         clk = 1'b1;
  logic         load;
  logic [W-1:0] x, y, quotient, remainder;
  logic         busy;
  int checks = 0, failures = 0;
  int n_load = 0, n_step = 0, n_hold = 0, n_immediate = 0, n_max_q = 0;

  serial_divider dut (
    .clk(clk), .load(load), .x(x), .y(y),
    .quotient(quotient), .remainder(remainder), .busy(busy)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  // Run one division; inputs change only while clk is high. Returns the
  // remainders seen after each step in trace[1..q].
  task automatic divide(input int xi, input int yi, output int trace[16]);
    int q_exp, r_exp, edges;
    q_exp = xi / yi;
    r_exp = xi % yi;
    x = W'(xi); y = W'(yi); load = 1'b1;
    @(negedge clk);
    #1;
    n_load++;
    check(quotient == '0 && remainder == W'(xi),
          $sformatf("load %0d: q=%0d r=%0d", xi, quotient, remainder));
    @(posedge clk);
    #1 load = 1'b0;
    edges = 0;
    // follow the subtraction steps
    while (busy && edges < 2**W) begin
      @(negedge clk);
      #1;
      edges++;
      n_step++;
      trace[edges] = int'(remainder);
      check(quotient == W'(edges) && remainder == W'(xi - edges*yi),
            $sformatf("%0d/%0d step %0d: q=%0d r=%0d", xi, yi, edges, quotient, remainder));
      @(posedge clk);
      #1;
    end
    check(edges == q_exp, $sformatf("%0d/%0d: busy fell after %0d edges, expected %0d",
                                    xi, yi, edges, q_exp));
    check(quotient == W'(q_exp) && remainder == W'(r_exp),
          $sformatf("%0d/%0d: q=%0d r=%0d expected %0d r %0d",
                    xi, yi, quotient, remainder, q_exp, r_exp));
    if (q_exp == 0) n_immediate++;
    if (q_exp == 2**W - 1) n_max_q++;
    // result must hold while busy is low
    for (int k = 0; k < 3; k++) begin
      @(negedge clk);
      #1;
      n_hold++;
      check(!busy && quotient == W'(q_exp) && remainder == W'(r_exp),
            $sformatf("%0d/%0d: result did not hold", xi, yi));
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    int trace[16];
    #1;
    // worked example: 13 / 4 by repeated subtraction
    divide(13, 4, trace);
    check(trace[1] == 9 && trace[2] == 5 && trace[3] == 1,
          $sformatf("13/4 trace %0d %0d %0d", trace[1], trace[2], trace[3]));
    // simulated case: 15 / 15
    divide(15, 15, trace);
    check(quotient == 4'd1 && remainder == 4'd0, "15/15 should give 1 r 0");
    // every dividend and nonzero divisor
    for (int xi = 0; xi < 2**W; xi++)
      for (int yi = 1; yi < 2**W; yi++)
        divide(xi, yi, trace);

    $display("mechanisms: loads=%0d steps=%0d holds=%0d immediate_stops=%0d max_quotient=%0d",
             n_load, n_step, n_hold, n_immediate, n_max_q);
    check(n_load > 0, "no load happened");
    check(n_step > 0, "no subtraction step happened");
    check(n_hold > 0, "no held result");
    check(n_immediate > 0, "no division with X < Y");
    check(n_max_q > 0, "quotient 1111 never reached");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
