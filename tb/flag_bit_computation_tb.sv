// Self-checking testbench of flag_bit_computation: every sum S3..S0 with cout
// 1 and 0. With cout = 1 the flags must turn S into S + 6 (mod 16) by
// inversion, S ^ F == (S + 6) % 16, with F0 = 0, and F4 must be
// (S1 | S2) & S3. With cout = 0 the gated chain is idle: F = 0110, F4 = 0.
module flag_bit_computation_tb;

  logic       cout, f4;
  logic [3:0] s, f;
  int         checks = 0, failures = 0;

  flag_bit_computation dut (.cout(cout), .s(s), .f(f), .f4(f4));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 2; c++)
      for (int v = 0; v < 16; v++) begin
        logic [3:0] exp_f;
        logic       exp_f4;
        cout = 1'(c);
        s    = 4'(v);
        #1;
        if (c == 1) begin
          exp_f  = 4'(v) ^ 4'((v + 6) % 16);
          exp_f4 = (s[1] | s[2]) & s[3];
        end else begin
          exp_f  = 4'b0110;
          exp_f4 = 1'b0;
        end
        checks++;
        if (f != exp_f || f4 != exp_f4) begin
          failures++;
          $display("FAIL cout=%0d S=%b -> F=%b F4=%b expected F=%b F4=%b",
                   c, s, f, f4, exp_f, exp_f4);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
