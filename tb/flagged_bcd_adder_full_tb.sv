// Full-size, self-checking testbench of flagged_bcd_adder with every
// parameter at its default (carry skip first stage).
//
// Adds all 100 pairs of BCD digits 0..9 and compares each result with the
// decimal sum: r[4] = (a + b > 9), r[3:0] = (a + b) mod 10. It also counts,
// from the inputs alone, how many sums were passed through uncorrected,
// corrected from 10..15 and corrected after a binary carry (16..18), and
// fails if any of the three never occurred.
module flagged_bcd_adder_full_tb;

  import bcd_pkg::*;

  bcd_digit_t a, b;
  logic [4:0] r;
  int         checks = 0, failures = 0;
  int         n_pass = 0, n_corr = 0, n_corr_c0 = 0;

  flagged_bcd_adder dut (.a(a), .b(b), .r(r));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x <= 9; x++)
      for (int y = 0; y <= 9; y++) begin
        int sum;
        a = 4'(x);
        b = 4'(y);
        #1;
        sum = x + y;
        if (sum <= 9)      n_pass++;
        else if (sum < 16) n_corr++;
        else               n_corr_c0++;
        checks++;
        if (r[4] != (sum > 9) || int'(r[3:0]) != sum % 10) begin
          failures++;
          $display("FAIL %0d + %0d -> carry %0d digit %0d", x, y, r[4], r[3:0]);
        end
      end
    checks += 3;
    if (n_pass == 0)    failures++;
    if (n_corr == 0)    failures++;
    if (n_corr_c0 == 0) failures++;
    $display("uncorrected: %0d, corrected 10..15: %0d, corrected 16..18: %0d",
             n_pass, n_corr, n_corr_c0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
