// Self-checking testbench of carry_select_adder (4 bits, 2-bit low part):
// every pair of operands with both carry-in values, compared with
// a + b + cin. Counts how often each precomputed high sum was selected and
// fails if either never was.
module carry_select_adder_tb;

  localparam int W = 4;
  localparam int L = 2;

  logic [W-1:0] a, b, s;
  logic         cin, co;
  int           checks = 0, failures = 0, sel0 = 0, sel1 = 0;

  carry_select_adder dut (.a(a), .b(b), .cin(cin), .s(s), .co(co));

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
          int exp_sum, low_carry;
          a = W'(x); b = W'(y); cin = 1'(c);
          #1;
          exp_sum   = x + y + c;
          low_carry = ((x % (1 << L)) + (y % (1 << L)) + c) >> L;
          if (low_carry != 0) sel1++; else sel0++;
          checks++;
          if ({co, s} != (W+1)'(exp_sum)) begin
            failures++;
            $display("FAIL %0d + %0d + %0d -> %0d", x, y, c, {co, s});
          end
        end
    checks += 2;
    if (sel0 == 0) failures++;
    if (sel1 == 0) failures++;
    $display("high sum chosen for carry 0: %0d, for carry 1: %0d", sel0, sel1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
