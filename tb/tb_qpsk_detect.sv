// tb_qpsk_detect - detection part of the QPSK demodulator.
//
// The inputs are modulated constants standing for a settled baseband pair
// (Zc, Zs) and the matching products P = Zc(Zc+Zs)/2, M = Zs(Zc-Zs)/2.
// After settling:
//  - the direction is kept: I/Q = Zc/Zs within 0.05 and the signs match;
//  - the magnitude is normalised: R = 3*sqrt((Zc^2+Zs^2)/4) and
//    |(I,Q)| = |Z|/R = 1/1.5 for an exact square root. The bit-stream square
//    root settles below the exact root for inputs under 0.25 (here about
//    0.09), so R may be up to 35 % low and |(I,Q)| correspondingly high:
//    R in [0.65, 1.02] * exact and |(I,Q)| in [0.95, 1.55] * (1/1.5).
module tb_qpsk_detect;
  import tbs_pkg::*;

  localparam int NPTS = 2;
  localparam int NSETTLE = 40000, NMEAS = 20000;

  logic clk = 0, rst_n = 0;
  real  vzc = 0.0, vzs = 0.0, vp = 0.0, vm = 0.0;
  tri_t zc, zs, p, m, i_out, q_out, r;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tri_sdm_model u_zc (.clk(clk), .rst_n(rst_n), .v(vzc), .y(zc));
  tri_sdm_model u_zs (.clk(clk), .rst_n(rst_n), .v(vzs), .y(zs));
  tri_sdm_model u_p  (.clk(clk), .rst_n(rst_n), .v(vp),  .y(p));
  tri_sdm_model u_m  (.clk(clk), .rst_n(rst_n), .v(vm),  .y(m));

  qpsk_detect dut (
    .clk(clk), .rst_n(rst_n), .zc(zc), .zs(zs), .p(p), .m(m),
    .i_out(i_out), .q_out(q_out), .r(r)
  );

  initial begin
    real zcs [NPTS] = '{0.36, -0.3};
    real zss [NPTS] = '{-0.48, -0.3};
    real mi, mq, mr, r_exact, nrm;
    longint si, sq, sr;
    for (int t = 0; t < NPTS; t++) begin
      vzc = zcs[t]; vzs = zss[t];
      vp  = zcs[t] * (zcs[t] + zss[t]) / 2.0;
      vm  = zss[t] * (zcs[t] - zss[t]) / 2.0;
      rst_n = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
      repeat (NSETTLE) @(posedge clk);
      si = 0; sq = 0; sr = 0;
      for (int n = 0; n < NMEAS; n++) begin
        @(negedge clk);
        si += tri_val(i_out); sq += tri_val(q_out); sr += tri_val(r);
      end
      mi = real'(si) / NMEAS; mq = real'(sq) / NMEAS; mr = real'(sr) / NMEAS;
      r_exact = 3.0 * $sqrt((zcs[t] * zcs[t] + zss[t] * zss[t]) / 4.0);
      nrm = $sqrt(mi * mi + mq * mq);
      $display("Zc %f Zs %f: I %f Q %f R %f (exact root %f) |IQ| %f",
               zcs[t], zss[t], mi, mq, mr, r_exact, nrm);
      checks++;
      if ((mi > 0) != (zcs[t] > 0) || (mq > 0) != (zss[t] > 0) ||
          mi / mq < zcs[t] / zss[t] - 0.05 || mi / mq > zcs[t] / zss[t] + 0.05) begin
        failures++; $display("FAIL direction not kept");
      end
      checks++;
      if (mr < 0.65 * r_exact || mr > 1.02 * r_exact) begin
        failures++; $display("FAIL magnitude R");
      end
      checks++;
      if (nrm < 0.95 / 1.5 || nrm > 1.55 / 1.5) begin
        failures++; $display("FAIL normalised magnitude");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPTS * (NSETTLE + NMEAS + 10) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
