// Self-checking testbench of bcd_output_mux: every select value and pair of
// 4-bit inputs; the output must be {1, m} when sel is 1 and {0, s} when it
// is 0.
module bcd_output_mux_tb;

  logic       sel;
  logic [3:0] m, s;
  logic [4:0] r;
  int         checks = 0, failures = 0;

  bcd_output_mux dut (.sel(sel), .m(m), .s(s), .r(r));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int x = 0; x < 16; x++)
        for (int y = 0; y < 16; y++) begin
          int exp_r;
          sel = 1'(c); m = 4'(x); s = 4'(y);
          #1;
          exp_r = (c == 1) ? 16 + x : y;
          checks++;
          if (r != 5'(exp_r)) begin
            failures++;
            $display("FAIL sel=%0d m=%0d s=%0d -> r=%0d expected %0d", c, x, y, r, exp_r);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
