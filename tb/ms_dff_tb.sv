// ms_dff_tb: self-check of the falling-edge master-slave D flip-flop.
//
// Clock period 10 time units, falling edges at 5, 15, 25, ... . d is changed
// at random twice per period, once while clk is high and once while it is
// low. The check: q never changes except just after a falling edge, and after
// each falling edge q equals the d that was present just before it.
module ms_dff_tb;
  logic clk = 1'b1;
  logic d, q;
  logic d_at_edge;
  int checks = 0, failures = 0;

  ms_dff dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    #20000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic q_before;
    d = 1'b0;
    for (int n = 0; n < 400; n++) begin
      // clk is high here (just after a rising edge or time 0)
      #2 d = 1'($urandom);
      #2;
      d_at_edge = d;
      @(negedge clk);
      #1;
      checks++;
      if (q != d_at_edge) begin
        failures++;
        $display("FAIL at %0t: q=%0d, d before edge=%0d", $time, q, d_at_edge);
      end
      // while clk is low and across the next rising edge q must hold
      q_before = q;
      #1 d = 1'($urandom);
      @(posedge clk);
      #1;
      checks++;
      if (q != q_before) begin
        failures++;
        $display("FAIL at %0t: q changed outside a falling edge", $time);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
