// tb_uhd_counter - up/hold/down counter (A = 5, 4-bit count) against a
// saturating integer model. Biased random input drives the count into both
// limits many times; the count must never pass +-A.
module tb_uhd_counter;
  import tbs_pkg::*;

  localparam int A = 5;
  localparam int NCYC = 4000;

  logic clk = 0, rst_n = 0;
  tri_t d = TRI_ZERO;
  logic signed [3:0] cnt;
  int checks = 0, failures = 0;
  int ref_cnt = 0, hits_hi = 0, hits_lo = 0;

  always #5 clk = ~clk;

  uhd_counter #(.CW(4), .A(A), .INIT(0)) dut (.clk(clk), .rst_n(rst_n), .d(d), .cnt(cnt));

  initial begin
    int dv;
    repeat (3) @(posedge clk);
    @(negedge clk);
    checks++;
    if (cnt != 0) begin failures++; $display("FAIL reset value %0d", cnt); end
    rst_n = 1;
    for (int n = 0; n < NCYC; n++) begin
      int r;
      r = int'($urandom_range(0, 9));
      // Bias changes sign every 200 cycles.
      if ((n / 200) % 2 == 0) dv = (r < 6) ? 1 : (r < 8 ? 0 : -1);
      else                    dv = (r < 6) ? -1 : (r < 8 ? 0 : 1);
      d = dv > 0 ? TRI_POS : (dv < 0 ? TRI_NEG : TRI_ZERO);
      @(negedge clk);
      ref_cnt = ref_cnt + dv;
      if (ref_cnt > A) ref_cnt = A;
      if (ref_cnt < -A) ref_cnt = -A;
      if (ref_cnt == A) hits_hi++;
      if (ref_cnt == -A) hits_lo++;
      checks++;
      if (int'(cnt) != ref_cnt) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d cnt=%0d expected %0d", n, cnt, ref_cnt);
      end
    end
    checks++;
    if (hits_hi == 0 || hits_lo == 0) begin failures++; $display("FAIL limits not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
