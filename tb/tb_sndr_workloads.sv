// tb_sndr_workloads - signal-to-noise-and-distortion ratio of the lowpass
// filter, the NCO and the locked DPLL, measured the way such figures are
// usually quoted for over-sampled streams: over-sampling ratio 128, so the
// band of interest is 0 .. 1/256 cycles/sample.
//
// Each output stream is recorded for N = 65536 samples after settling,
// Hann-windowed, and transformed at every DFT bin of the band (bins 1..256).
// Signal power is the peak bin +-3 bins; noise and distortion power is the
// rest of the band. Cases (default sizes of each block):
//  - LPF a = b = 6, K = 512, input a modulated unit-amplitude sinusoid at
//    124/65536 = 0.00189 (close to the cut-off);
//  - NCO A = 75, K0 = 79, DK = 4 with the control held at 0, output Qc;
//  - DPLL A = 80, K0 = 82, DK = 5 locked to a complex input of frequency
//    1/512 (amplitude 0.95), output Qc.
// Pass criterion: each SNDR is above the figure published for the 1-bit
// (bi-level) version of the same circuit (53.6, 42.2 and 35.5 dB), i.e. the
// tri-level circuit keeps its claimed advantage. The published tri-level
// figures (62.5, 48.2, 46.7 dB) are printed for comparison; they depend on
// the input modulator, which differs here.
module tb_sndr_workloads;
  import tbs_pkg::*;

  localparam int N = 65536, NB = 256, NSETTLE = 40000;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  real  v_lpf = 0.0, vc = 0.0, vs = 0.0;
  tri_t x_lpf, y_lpf, qc_nco, qs_nco, ic, is, z_pll, qc_pll, qs_pll;
  logic signed [10:0] w_lpf;
  logic signed [7:0]  wc_nco, ws_nco, wc_pll, ws_pll;
  int checks = 0, failures = 0;

  int rec_lpf [N];
  int rec_nco [N];
  int rec_pll [N];

  always #5 clk = ~clk;

  tri_sdm_model u_src  (.clk(clk), .rst_n(rst_n), .v(v_lpf), .y(x_lpf));
  tri_sdm_model u_src_c (.clk(clk), .rst_n(rst_n), .v(vc), .y(ic));
  tri_sdm_model u_src_s (.clk(clk), .rst_n(rst_n), .v(vs), .y(is));

  bs_lpf u_lpf (.clk(clk), .rst_n(rst_n), .x(x_lpf), .y(y_lpf), .w(w_lpf));
  bs_nco u_nco (.clk(clk), .rst_n(rst_n), .c(TRI_ZERO), .qc(qc_nco), .qs(qs_nco),
                .wc(wc_nco), .ws(ws_nco));
  dpll   u_pll (.clk(clk), .rst_n(rst_n), .ic(ic), .is(is), .z(z_pll), .qc(qc_pll),
                .qs(qs_pll), .wc(wc_pll), .ws(ws_pll));

  function automatic real sndr_db(ref int rec [N]);
    real pw [NB+1];
    real re, im, cr, ci, sr, si, t, win, ps, pn;
    int pk;
    pk = 1;
    for (int k = 1; k <= NB; k++) begin
      re = 0.0; im = 0.0;
      cr = 1.0; ci = 0.0;
      sr = $cos(2.0 * PI * real'(k) / real'(N));
      si = -$sin(2.0 * PI * real'(k) / real'(N));
      for (int n = 0; n < N; n++) begin
        win = 0.5 - 0.5 * $cos(2.0 * PI * real'(n) / real'(N));
        re += win * real'(rec[n]) * cr;
        im += win * real'(rec[n]) * ci;
        t  = cr * sr - ci * si;
        ci = cr * si + ci * sr;
        cr = t;
      end
      pw[k] = re * re + im * im;
      if (pw[k] > pw[pk]) pk = k;
    end
    ps = 0.0; pn = 0.0;
    for (int k = 1; k <= NB; k++)
      if (k >= pk - 3 && k <= pk + 3) ps += pw[k];
      else                            pn += pw[k];
    return 10.0 * $log10(ps / pn);
  endfunction

  initial begin
    real s_lpf, s_nco, s_pll;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < NSETTLE + N; n++) begin
      @(negedge clk);
      v_lpf = $sin(2.0 * PI * 124.0 / real'(N) * real'(n));
      vc = 0.95 * $cos(2.0 * PI * real'(n) / 512.0);
      vs = 0.95 * $sin(2.0 * PI * real'(n) / 512.0);
      if (n >= NSETTLE) begin
        rec_lpf[n - NSETTLE] = tri_val(y_lpf);
        rec_nco[n - NSETTLE] = tri_val(qc_nco);
        rec_pll[n - NSETTLE] = tri_val(qc_pll);
      end
    end
    s_lpf = sndr_db(rec_lpf);
    s_nco = sndr_db(rec_nco);
    s_pll = sndr_db(rec_pll);
    $display("SNDR LPF  %0.1f dB (published: tri-level 62.5, bi-level 53.6)", s_lpf);
    $display("SNDR NCO  %0.1f dB (published: tri-level 48.2, bi-level 42.2)", s_nco);
    $display("SNDR DPLL %0.1f dB (published: tri-level 46.7, bi-level 35.5)", s_pll);
    checks++;
    if (s_lpf < 53.6) begin failures++; $display("FAIL LPF SNDR"); end
    checks++;
    if (s_nco < 42.2) begin failures++; $display("FAIL NCO SNDR"); end
    checks++;
    if (s_pll < 35.5) begin failures++; $display("FAIL DPLL SNDR"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSETTLE + N + 100) @(posedge clk);
    #1;
    // the analysis runs in zero simulated time after the last sample
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
