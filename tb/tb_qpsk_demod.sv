// tb_qpsk_demod - complete QPSK demodulator on a QPSK carrier.
//
// The carrier (normalised frequency 0.002, amplitude 0.9) changes its phase
// by a random multiple of pi/2 every 5000 samples, the published phase
// shift interval. The first 30000 samples carry a fixed phase for carrier
// acquisition; the quadrant the loop settles in there fixes the constellation
// rotation (the four-fold ambiguity of any QPSK carrier loop). For every
// following symbol the means of I and Q over the last 1500 samples of the
// interval must:
//  - lie in the quadrant predicted from the phase step: the baseband pair is
//    (cos psi, -sin psi) for a phase error psi, so a step of +pi/2 in the
//    carrier turns the constellation point by -pi/2;
//  - have |I| and |Q| between 0.3 and 0.95 (normalised magnitude; the
//    published constellation sits near 0.6).
module tb_qpsk_demod;
  import tbs_pkg::*;

  localparam real F = 0.002, AIN = 0.9;
  localparam int NACQ = 30000, NSYM = 16, TSYM = 5000, NMEAS = 1500;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  real  v = 0.0;
  tri_t din, i_out, q_out, zc, zs, ctrl;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tri_sdm_model u_src (.clk(clk), .rst_n(rst_n), .v(v), .y(din));

  qpsk_demod dut (
    .clk(clk), .rst_n(rst_n), .din(din), .i_out(i_out), .q_out(q_out),
    .zc(zc), .zs(zs), .ctrl(ctrl)
  );

  function automatic int quadrant(real i, real q);
    // 0: (+,+), 1: (-,+), 2: (-,-), 3: (+,-) - counter-clockwise order
    if (i >= 0 && q >= 0) return 0;
    if (i < 0 && q >= 0)  return 1;
    if (i < 0)            return 2;
    return 3;
  endfunction

  initial begin
    int k = 0, k0 = 0, q0 = 0, qexp, qgot, nsym_ok = 0;
    longint si, sq;
    real mi, mq;
    int n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = -1; s < NSYM; s++) begin
      int len;
      len = (s < 0) ? NACQ : TSYM;
      if (s >= 0) k = (k + int'($urandom_range(0, 3))) % 4;
      si = 0; sq = 0;
      for (int t = 0; t < len; t++) begin
        @(negedge clk);
        v = AIN * $cos(2.0 * PI * F * real'(n) + real'(k) * PI / 2.0);
        n++;
        if (t >= len - NMEAS) begin si += tri_val(i_out); sq += tri_val(q_out); end
      end
      mi = real'(si) / NMEAS; mq = real'(sq) / NMEAS;
      qgot = quadrant(mi, mq);
      if (s < 0) begin
        k0 = k; q0 = qgot;
        $display("acquired: I %f Q %f quadrant %0d", mi, mq, qgot);
      end else begin
        qexp = ((q0 - (k - k0)) % 4 + 4) % 4;
        checks++;
        if (qgot != qexp) begin
          failures++;
          $display("FAIL symbol %0d: phase step %0d, I %f Q %f quadrant %0d expected %0d",
                   s, k, mi, mq, qgot, qexp);
        end else nsym_ok++;
        checks++;
        if ((mi < 0 ? -mi : mi) < 0.3 || (mi < 0 ? -mi : mi) > 0.95 ||
            (mq < 0 ? -mq : mq) < 0.3 || (mq < 0 ? -mq : mq) > 0.95) begin
          failures++;
          $display("FAIL symbol %0d: magnitude I %f Q %f", s, mi, mq);
        end
        $display("symbol %0d phase %0d: I %f Q %f", s, k, mi, mq);
      end
    end
    $display("%0d of %0d symbols correct", nsym_ok, NSYM);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NACQ + NSYM * TSYM + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
