// tb_qpsk_sync - synchronisation part of the QPSK demodulator (Costas loop).
//
// Input: a modulated carrier of normalised frequency 0.002 and amplitude
// 0.9 with a fixed phase. The NCO's free-running frequency is
// f0 = 1/(2*pi*79) = 0.0020146, so the loop must pull it down. After
// settling, over a long window:
//  - the loop sits on a diagonal: the angle of (Zc, Zs) is within 0.2 rad
//    of an odd multiple of pi/4 (a type-1 loop keeps a small static error);
//  - the baseband magnitude is that of the mixer and filter chain,
//    sqrt(Zc^2 + Zs^2) = (4/3) * (1/2) * 0.9 * (75/79), within 15 %;
//  - the NCO control mean is negative (it must slow the NCO) and smaller in
//    size than the constant-control estimate 2*pi*(0.002 - f0)*79^2/4 =
//    -0.143 plus a margin: between -0.2 and -0.01;
//  - the NCO period equals the carrier period 500 (within 0.5 %).
// Checked for two carrier phases.
module tb_qpsk_sync;
  import tbs_pkg::*;

  localparam real F = 0.002, AIN = 0.9;
  localparam int NSETTLE = 40000, NMEAS = 20000;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  real  v = 0.0;
  tri_t din, zc, zs, p, m, ctrl, qc, qs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tri_sdm_model u_src (.clk(clk), .rst_n(rst_n), .v(v), .y(din));

  qpsk_sync dut (
    .clk(clk), .rst_n(rst_n), .din(din), .zc(zc), .zs(zs), .p(p), .m(m),
    .ctrl(ctrl), .qc(qc), .qs(qs)
  );

  initial begin
    real phs [2] = '{0.3, 2.0};
    real mzc, mzs, mc, mag, mag_exp, c_exp, per, ang;
    longint szc, szs, sc;
    int first, last, ncross, prev_wc;
    mag_exp = (4.0 / 3.0) * 0.5 * AIN * (75.0 / 79.0);
    c_exp   = 2.0 * PI * (F - 1.0 / (2.0 * PI * 79.0)) * 79.0 * 79.0 / 4.0;
    for (int t = 0; t < 2; t++) begin
      rst_n = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
      szc = 0; szs = 0; sc = 0; first = -1; last = -1; ncross = 0; prev_wc = 0;
      for (int n = 0; n < NSETTLE + NMEAS; n++) begin
        @(negedge clk);
        v = AIN * $cos(2.0 * PI * F * real'(n) + phs[t]);
        if (n >= NSETTLE) begin
          szc += tri_val(zc); szs += tri_val(zs); sc += tri_val(ctrl);
          if (prev_wc < 0 && dut.u_nco.wc >= 0) begin
            if (first < 0) first = n;
            last = n;
            ncross++;
          end
        end
        prev_wc = int'(dut.u_nco.wc);
      end
      mzc = real'(szc) / NMEAS; mzs = real'(szs) / NMEAS; mc = real'(sc) / NMEAS;
      mag = $sqrt(mzc * mzc + mzs * mzs);
      per = real'(last - first) / real'(ncross - 1);
      $display("phase %f: Zc %f Zs %f |Z| %f (exp %f) ctrl %f (exp %f) NCO period %f",
               phs[t], mzc, mzs, mag, mag_exp, mc, c_exp, per);
      checks++;
      ang = $atan2(mzs, mzc) - PI / 4.0;
      while (ang > PI / 4.0) ang -= PI / 2.0;
      while (ang <= -PI / 4.0) ang += PI / 2.0;
      if (ang > 0.2 || ang < -0.2) begin
        failures++; $display("FAIL not on a diagonal");
      end
      checks++;
      if (mag < 0.85 * mag_exp || mag > 1.15 * mag_exp) begin
        failures++; $display("FAIL baseband magnitude");
      end
      checks++;
      if (mc < -0.2 || mc > -0.01) begin
        failures++; $display("FAIL control mean");
      end
      checks++;
      if (per < 497.5 || per > 502.5) begin
        failures++; $display("FAIL NCO period");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * (NSETTLE + NMEAS + 10) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
