// tb_bs_neg - exhaustive check of the tri-level negation: every valid code
// must come out as the code of the negated value.
module tb_bs_neg;
  import tbs_pkg::*;

  int checks = 0, failures = 0;
  tri_t x, z;

  bs_neg dut (.x(x), .z(z));

  initial begin
    tri_t codes [3] = '{2'b11, 2'b00, 2'b01};
    int   vals  [3] = '{-1, 0, 1};
    for (int r = 0; r < 4; r++)
      for (int i = 0; i < 3; i++) begin
        int exp_v;
        x = codes[i];
        #1;
        exp_v = -vals[i];
        checks++;
        if (!((exp_v == 1 && z == 2'b01) || (exp_v == 0 && z == 2'b00) ||
              (exp_v == -1 && z == 2'b11))) begin
          failures++;
          $display("FAIL: neg(%b) = %b, expected value %0d", x, z, exp_v);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
