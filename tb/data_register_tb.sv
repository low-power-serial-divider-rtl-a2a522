// data_register_tb: self-check of the dividend / remainder register.
//
// load, ce and both data inputs change at random while clk is high; after
// every falling edge q is compared with a reference: with ce = 1 it takes
// din_load when load = 1 and din_run when load = 0; with ce = 0 it holds.
module data_register_tb;
  localparam int unsigned W = 4;

  logic         clk = 1'b1;
  logic         ce, load;
  logic [W-1:0] din_load, din_run, q, model;
  int checks = 0, failures = 0;

  data_register dut (
    .clk(clk), .ce(ce), .load(load), .din_load(din_load), .din_run(din_run), .q(q)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1;
    ce = 1'b1; load = 1'b1; din_load = 4'd9; din_run = 4'd6;
    @(negedge clk);
    model = 4'd9;
    for (int n = 0; n < 400; n++) begin
      @(posedge clk);
      #1;
      ce = 1'($urandom); load = 1'($urandom);
      din_load = W'($urandom); din_run = W'($urandom);
      @(negedge clk);
      if (ce) model = load ? din_load : din_run;
      #1;
      checks++;
      if (q != model) begin
        failures++;
        $display("FAIL at %0t: ce=%0d load=%0d q=%0d expected %0d", $time, ce, load, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
