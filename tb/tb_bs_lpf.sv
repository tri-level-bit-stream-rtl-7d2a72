// tb_bs_lpf - bit-stream lowpass filter with a = b = 6, K = 512 (cut-off
// about 1.87e-3 cycles/sample, DC gain 1).
//
// 1. Cycle-accurate integer model: w = clamp(w_prev + a*x - b*y, +-K),
//    y = q(u) with threshold 128, u' = u + w - K*y; compared every cycle.
// 2. DC gain: for a modulated constant 0.3 the output mean settles at 0.3.
// 3. Frequency response: a modulated sinusoid of amplitude 0.8 at the
//    cut-off frequency 0.00189 comes out with the amplitude
//    0.8*|H(f)|, H(z) = (a/K) z^-1 / (1 - (1 - b/K) z^-1), measured by
//    correlation over whole periods.
module tb_bs_lpf;
  import tbs_pkg::*;

  localparam int K = 512, AG = 6, BG = 6;
  localparam int NDC = 6000;
  localparam real F0 = 0.00189;
  localparam int NSETTLE = 4000;
  localparam int NMEAS = 10 * 529;
  localparam int NCYC = NDC + NSETTLE + NMEAS;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  real  v = 0.0;
  tri_t x, y;
  logic signed [10:0] w;
  int checks = 0, failures = 0;
  int w_ref = 0, u_ref = 0;

  always #5 clk = ~clk;

  tri_sdm_model u_src (.clk(clk), .rst_n(rst_n), .v(v), .y(x));
  bs_lpf #(.W(11), .K(K), .ALPHA(128), .A_GAIN(AG), .B_GAIN(BG)) dut (
    .clk(clk), .rst_n(rst_n), .x(x), .y(y), .w(w)
  );

  initial begin
    int yexp, wn;
    longint dc_sum = 0;
    real sc = 0.0, ss = 0.0, amp, hmag, p, wv, dc;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      if (n < NDC) v = 0.3;
      else         v = 0.8 * $sin(2.0 * PI * F0 * real'(n - NDC));
      #1;
      yexp = (u_ref >= 128) ? 1 : ((u_ref < -128) ? -1 : 0);
      wn = w_ref + AG * tri_val(x) - BG * yexp;
      if (wn > K) wn = K;
      if (wn < -K) wn = -K;
      checks++;
      if (tri_val(y) != yexp || int'(w) != wn) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=%b w=%0d expected %0d %0d", n, y, w, yexp, wn);
      end
      u_ref = u_ref + wn - K * yexp;
      w_ref = wn;
      if (n >= NDC - 3000 && n < NDC) dc_sum += yexp;
      if (n >= NDC + NSETTLE) begin
        p  = 2.0 * PI * F0 * real'(n - NDC);
        sc += real'(tri_val(y)) * $cos(p);
        ss += real'(tri_val(y)) * $sin(p);
      end
    end
    dc = real'(dc_sum) / 3000.0;
    checks++;
    if (dc < 0.28 || dc > 0.32) begin
      failures++;
      $display("FAIL DC output %f, expected 0.3", dc);
    end
    wv   = 2.0 * PI * F0;
    p    = 1.0 - real'(BG) / real'(K);
    hmag = (real'(AG) / real'(K)) / $sqrt(1.0 - 2.0 * p * $cos(wv) + p * p);
    amp  = 2.0 / real'(NMEAS) * $sqrt(sc * sc + ss * ss);
    checks++;
    if (amp < 0.8 * hmag * 0.95 || amp > 0.8 * hmag * 1.05) begin
      failures++;
      $display("FAIL amplitude at cut-off %f, expected %f", amp, 0.8 * hmag);
    end
    $display("DC %f, amplitude at cut-off %f (model %f)", dc, amp, 0.8 * hmag);
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
