// Self-checking testbench of carry_skip_adder (4 bits, 2-bit groups): every
// pair of operands with both carry-in values. Checks the sum and carry against
// a + b + cin, and each group's skip flag against "all bits of the group
// propagate". Counts how often a skip path actually carried a 1 and fails if
// that never happened.
module carry_skip_adder_tb;

  localparam int W = 4;
  localparam int G = 2;

  logic [W-1:0]   a, b, s;
  logic           cin, co;
  logic [W/G-1:0] skip;
  int             checks = 0, failures = 0, skipped_carries = 0;

  carry_skip_adder dut (.a(a), .b(b), .cin(cin), .s(s), .co(co), .skip(skip));

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
          for (int g = 0; g < W / G; g++) begin
            // carry into group g from the integer sum of the bits below it
            int lowmask, cin_g;
            logic prop;
            lowmask = (1 << (g * G)) - 1;
            cin_g   = ((x & lowmask) + (y & lowmask) + c) >> (g * G);
            prop    = 1'b1;
            for (int i = g * G; i < (g + 1) * G; i++)
              if (((x >> i) & 1) == ((y >> i) & 1)) prop = 1'b0;
            checks++;
            if (skip[g] != prop) begin
              failures++;
              $display("FAIL skip[%0d]=%b expected %b for %0d + %0d", g, skip[g], prop, x, y);
            end
            if (prop && cin_g == 1) skipped_carries++;
          end
        end
    checks++;
    if (skipped_carries == 0) begin
      failures++;
      $display("FAIL no carry was ever passed along a skip path");
    end
    $display("carries passed along a skip path: %0d", skipped_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
