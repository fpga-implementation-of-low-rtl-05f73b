// Self-checking testbench of ripple_carry_adder: every pair of 4-bit operands
// with both carry-in values, compared with the integer sum a + b + cin.
module ripple_carry_adder_tb;

  localparam int W = 4;

  logic [W-1:0] a, b, s;
  logic         cin, co;
  int           checks = 0, failures = 0;

  ripple_carry_adder dut (.a(a), .b(b), .cin(cin), .s(s), .co(co));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int x = 0; x < (1 << W); x++)
        for (int y = 0; y < (1 << W); y++) begin
          int exp_sum;
          a = W'(x); b = W'(y); cin = 1'(c);
          #1;
          exp_sum = x + y + c;
          checks++;
          if ({co, s} != (W+1)'(exp_sum)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d -> %0d", x, y, c, {co, s});
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
