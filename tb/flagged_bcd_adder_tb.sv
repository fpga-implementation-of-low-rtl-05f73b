// End-to-end, self-checking testbench of flagged_bcd_adder.
//
// Three adders run side by side on the same digits: one with every parameter
// at its default (carry skip first stage) and one each with the ripple carry
// and carry select first stages. All 100 pairs of BCD digits 0..9 are added
// and each result is compared with the decimal sum: r[4] = (a + b > 9) and
// r[3:0] = (a + b) mod 10.
//
// The adder's mechanisms are counted in the default instance, and a mechanism
// that never happened counts as a failure:
//   - a sum passed through uncorrected (excess-9 detector output 0)
//   - a sum corrected by the flag logic without a binary carry (10..15)
//   - a sum corrected after a binary carry out of the first stage (16..18)
//   - a carry bypassing the upper group of the carry skip first stage
module flagged_bcd_adder_tb;

  import bcd_pkg::*;

  bcd_digit_t a, b;
  logic [4:0] r_skip, r_rca, r_sel;
  int         checks = 0, failures = 0;
  int         n_pass = 0, n_corr = 0, n_corr_c0 = 0, n_bypass = 0;

  flagged_bcd_adder dut (.a(a), .b(b), .r(r_skip));
  flagged_bcd_adder #(.ARCH(ADDER_RCA))  dut_rca (.a(a), .b(b), .r(r_rca));
  flagged_bcd_adder #(.ARCH(ADDER_CSEL)) dut_sel (.a(a), .b(b), .r(r_sel));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string name, logic [4:0] got, int x, int y);
    int sum, exp_r;
    sum   = x + y;
    exp_r = (sum > 9) ? 16 + (sum - 10) : sum;
    checks++;
    if (got != 5'(exp_r)) begin
      failures++;
      $display("FAIL %s: %0d + %0d -> carry %0d digit %0d, expected carry %0d digit %0d",
               name, x, y, got[4], got[3:0], sum > 9, sum % 10);
    end
  endtask

  initial begin
    for (int x = 0; x <= 9; x++)
      for (int y = 0; y <= 9; y++) begin
        a = 4'(x);
        b = 4'(y);
        #1;
        check("carry skip",   r_skip, x, y);
        check("ripple carry", r_rca,  x, y);
        check("carry select", r_sel,  x, y);
        if (!dut.cout)         n_pass++;
        else if (!dut.c0)      n_corr++;
        else                   n_corr_c0++;
        if (dut.u_adder.g_cskip.u_add.skip[1] &&
            ((x % 4) + (y % 4) >= 4)) n_bypass++;
      end
    $display("uncorrected sums: %0d, corrected 10..15: %0d, corrected after binary carry: %0d, skip-path carries: %0d",
             n_pass, n_corr, n_corr_c0, n_bypass);
    checks += 4;
    if (n_pass == 0)    begin failures++; $display("FAIL no uncorrected sum"); end
    if (n_corr == 0)    begin failures++; $display("FAIL no correction without binary carry"); end
    if (n_corr_c0 == 0) begin failures++; $display("FAIL no correction after binary carry"); end
    if (n_bypass == 0)  begin failures++; $display("FAIL no carry took the skip path"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
