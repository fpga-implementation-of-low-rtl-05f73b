// Self-checking testbench of flag_inversion_logic: every pair of flags F and
// sum S; each output bit must be S_i inverted where F_i is 1 and S_i
// unchanged where it is 0.
module flag_inversion_logic_tb;

  logic [3:0] f, s, m;
  int         checks = 0, failures = 0;

  flag_inversion_logic dut (.f(f), .s(s), .m(m));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        logic [3:0] exp_m;
        f = 4'(x);
        s = 4'(y);
        #1;
        for (int i = 0; i < 4; i++) exp_m[i] = f[i] ? !s[i] : s[i];
        checks++;
        if (m != exp_m) begin
          failures++;
          $display("FAIL F=%b S=%b -> M=%b expected %b", f, s, m, exp_m);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
