// serial_divider_w5_tb: the serial divider widened to 5 bits.
//
// The textbook example 18 / 3 (quotient 6, remainder 0) needs a 5-bit
// dividend, one bit more than the default width. This bench builds the
// divider with WIDTH = 5 and runs 18 / 3 plus 200 random divisions with
// nonzero divisor, checking quotient, remainder and that busy falls exactly
// floor(X / Y) falling edges after the load edge.
module serial_divider_w5_tb;
  localparam int unsigned W = 5;

  logic         clk = 1'b1;
  logic         load;
  logic [W-1:0] x, y, quotient, remainder;
  logic         busy;
  int checks = 0, failures = 0;

  serial_divider #(.WIDTH(W)) dut (
    .clk(clk), .load(load), .x(x), .y(y),
    .quotient(quotient), .remainder(remainder), .busy(busy)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input int xi, input int yi);
    int edges;
    x = W'(xi); y = W'(yi); load = 1'b1;
    @(negedge clk);
    @(posedge clk);
    #1 load = 1'b0;
    edges = 0;
    while (busy && edges < 2**W) begin
      @(negedge clk);
      edges++;
      @(posedge clk);
      #1;
    end
    checks++;
    if (edges != xi / yi || quotient != W'(xi / yi) || remainder != W'(xi % yi)) begin
      failures++;
      $display("FAIL %0d/%0d: q=%0d r=%0d after %0d edges", xi, yi, quotient, remainder, edges);
    end
  endtask

  initial begin
    #1;
    divide(18, 3);
    checks++;
    if (quotient != 5'd6 || remainder != 5'd0) begin
      failures++;
      $display("FAIL 18/3 gave %0d r %0d", quotient, remainder);
    end
    for (int n = 0; n < 200; n++) divide(int'($urandom % 32), 1 + int'($urandom % 31));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
