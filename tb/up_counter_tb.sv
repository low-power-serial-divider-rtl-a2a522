// up_counter_tb: self-check of the 4-bit up counter with count enable and
// clear.
//
// Inputs change only while clk is high; after every falling edge the count is
// compared with a reference model: clear gives 0, else the count steps by one
// (mod 16) when ce = 1 and holds when ce = 0. A run of 20 enabled counts after
// a clear shows the full 0000..1111 sequence and the wrap to 0000.
module up_counter_tb;
  localparam int unsigned W = 4;

  logic         clk = 1'b1;
  logic         ce, clr;
  logic [W-1:0] q;
  logic [W-1:0] model;
  int checks = 0, failures = 0, wraps = 0;

  up_counter dut (.clk(clk), .ce(ce), .clr(clr), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic ce_i, input logic clr_i);
    ce = ce_i; clr = clr_i;
    @(negedge clk);
    if (clr_i)     model = '0;
    else if (ce_i) model = model + 1'b1;
    #1;
    checks++;
    if (q != model) begin
      failures++;
      $display("FAIL at %0t: ce=%0d clr=%0d q=%0d expected %0d", $time, ce_i, clr_i, q, model);
    end
    if (ce_i && !clr_i && model == '0) wraps++;
    @(posedge clk);
    #1;
  endtask

  initial begin
    model = '0;
    #1;
    step(1'b0, 1'b1);                       // clear
    for (int i = 0; i < 20; i++) step(1'b1, 1'b0);
    step(1'b1, 1'b1);                       // clear wins over enable
    for (int i = 0; i < 300; i++) step(1'($urandom), ($urandom % 16) == 0);
    checks++;
    if (wraps == 0) begin
      failures++;
      $display("FAIL: counter never wrapped");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
