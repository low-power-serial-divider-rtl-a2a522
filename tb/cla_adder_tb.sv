// cla_adder_tb: exhaustive self-check of the 4-bit carry-lookahead adder.
//
// Every a, b and carry-in combination (512 of them) is applied and sum and
// carry out are compared with the integer sum a + b + cin. The divider's use
// (cin = 1, b = ~y) is thus covered too: cout = (a >= y), sum = a - y mod 16.
module cla_adder_tb;
  localparam int unsigned W = 4;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int checks = 0, failures = 0;

  cla_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expect_total;
    for (int ia = 0; ia < 2**W; ia++)
      for (int ib = 0; ib < 2**W; ib++)
        for (int ic = 0; ic < 2; ic++) begin
          a = W'(ia); b = W'(ib); cin = ic[0];
          #1;
          expect_total = ia + ib + ic;
          checks++;
          if ({cout, sum} != (W+1)'(expect_total)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d: got cout=%0d sum=%0d", ia, ib, ic, cout, sum);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
