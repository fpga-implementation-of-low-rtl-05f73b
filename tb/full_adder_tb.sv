// Self-checking testbench of full_adder: all eight input combinations,
// compared with the integer sum a + b + ci.
module full_adder_tb;

  logic a, b, ci, s, co;
  int   checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int exp_sum;
      {a, b, ci} = 3'(v);
      #1;
      exp_sum = int'(a) + int'(b) + int'(ci);
      checks++;
      if ({co, s} != 2'(exp_sum)) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d -> co,s=%b%b expected %0d", a, b, ci, co, s, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
