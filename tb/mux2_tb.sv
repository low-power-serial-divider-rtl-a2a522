// mux2_tb: exhaustive self-check of the one-bit 2:1 multiplexer
// (out = a when s = 0, out = b when s = 1), all 8 input combinations.
module mux2_tb;
  logic a, b, s, out;
  int checks = 0, failures = 0;

  mux2 dut (.a(a), .b(b), .s(s), .out(out));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {s, b, a} = 3'(v);
      #1;
      checks++;
      if (out != (s ? b : a)) begin
        failures++;
        $display("FAIL s=%0d a=%0d b=%0d out=%0d", s, a, b, out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
