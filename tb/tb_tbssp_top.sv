// tb_tbssp_top - end-to-end run of the whole design at its default sizes.
//
// Both applications run at once:
//  - DPLL: a complex input sinusoid of period 512 samples (amplitude 0.95)
//    on ic/is. After acquisition the NCO period must equal 512 (within
//    0.5 %) and the phase difference at each rising zero crossing of the
//    NCO cosine counter must stay within a 0.5 rad band (locked, no slips).
//  - QPSK: a carrier of normalised frequency 0.002 (amplitude 0.9) whose
//    phase steps by a random multiple of pi/2 every 5000 samples. Each
//    symbol's I/Q means over the last 1500 samples of its interval must lie
//    in the quadrant predicted from the phase step (a +pi/2 carrier step
//    turns the point by -pi/2) with |I|, |Q| in [0.3, 0.95].
// Mechanisms counted over the run, each of which must occur at least once:
// NCO control at +1 and at -1 (gain K0-DK and K0+DK) in both NCOs, NCO
// counters held at their limits +-A, all three levels of a DSDM quantizer,
// carrier phase steps of every size (+pi/2, pi, -pi/2) recovered, the
// DPLL lock. The phase steps follow a fixed cycle of 1, 2, 3 quarter turns.
module tb_tbssp_top;
  import tbs_pkg::*;

  localparam real PI = 3.14159265358979;
  localparam real FP = 1.0 / 512.0, AP = 0.95;
  localparam real FQ = 0.002, AQ = 0.9;
  localparam int NACQ = 30000, NSYM = 12, TSYM = 5000, NMEAS = 1500;
  localparam int NCYC = NACQ + NSYM * TSYM;

  logic clk = 0, rst_n = 0;
  real  vc = 0.0, vs = 0.0, vq = 0.0;
  tri_t ic, is, qin;
  tri_t pll_err, pll_qc, pll_qs, qpsk_i, qpsk_q, qpsk_zc, qpsk_zs, qpsk_ctrl;
  logic signed [7:0] pll_wc, pll_ws;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_pll_up = 0, n_pll_dn = 0, n_q_up = 0, n_q_dn = 0;
  int n_lim_pll = 0, n_lim_q = 0;
  int n_lvl [3] = '{0, 0, 0};
  int n_step [4] = '{0, 0, 0, 0};
  int n_lock = 0;

  always #5 clk = ~clk;

  tri_sdm_model u_sc (.clk(clk), .rst_n(rst_n), .v(vc), .y(ic));
  tri_sdm_model u_ss (.clk(clk), .rst_n(rst_n), .v(vs), .y(is));
  tri_sdm_model u_sq (.clk(clk), .rst_n(rst_n), .v(vq), .y(qin));

  tbssp_top dut (
    .clk(clk), .rst_n(rst_n),
    .ic(ic), .is(is), .pll_err(pll_err), .pll_qc(pll_qc), .pll_qs(pll_qs),
    .pll_wc(pll_wc), .pll_ws(pll_ws),
    .qpsk_in(qin), .qpsk_i(qpsk_i), .qpsk_q(qpsk_q), .qpsk_zc(qpsk_zc),
    .qpsk_zs(qpsk_zs), .qpsk_ctrl(qpsk_ctrl)
  );

  function automatic real wrap(real p);
    while (p > PI) p -= 2.0 * PI;
    while (p <= -PI) p += 2.0 * PI;
    return p;
  endfunction

  function automatic int quadrant(real i, real q);
    if (i >= 0 && q >= 0) return 0;
    if (i < 0 && q >= 0)  return 1;
    if (i < 0)            return 2;
    return 3;
  endfunction

  // Mechanism monitor.
  always @(negedge clk) if (rst_n) begin
    if (pll_err == TRI_POS) n_pll_up++;
    if (pll_err == TRI_NEG) n_pll_dn++;
    if (qpsk_ctrl == TRI_POS) n_q_up++;
    if (qpsk_ctrl == TRI_NEG) n_q_dn++;
    if (pll_wc == 8'sd80 || pll_wc == -8'sd80) n_lim_pll++;
    if (dut.u_qpsk.u_sync.u_nco.wc == 8'sd75 || dut.u_qpsk.u_sync.u_nco.wc == -8'sd75) n_lim_q++;
    n_lvl[tri_val(qpsk_zc) + 1]++;
  end

  initial begin
    int n = 0, k = 0, k0 = 0, q0 = 0, dk, qexp, qgot, prev_wc = 0, first = -1, last = -1, ncross = 0;
    real d, dmin = 10.0, dmax = -10.0, per, mi, mq;
    longint si, sq;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = -1; s < NSYM; s++) begin
      int len;
      len = (s < 0) ? NACQ : TSYM;
      dk = 0;
      if (s >= 0) begin
        dk = 1 + (s % 3);
        k = (k + dk) % 4;
      end
      si = 0; sq = 0;
      for (int t = 0; t < len; t++) begin
        @(negedge clk);
        vc = AP * $cos(2.0 * PI * FP * real'(n));
        vs = AP * $sin(2.0 * PI * FP * real'(n));
        vq = AQ * $cos(2.0 * PI * FQ * real'(n) + real'(k) * PI / 2.0);
        if (n >= NACQ && prev_wc < 0 && pll_wc >= 0) begin
          d = wrap(2.0 * PI * FP * real'(n) + PI / 2.0);
          if (d < dmin) dmin = d;
          if (d > dmax) dmax = d;
          if (first < 0) first = n;
          last = n;
          ncross++;
        end
        prev_wc = pll_wc;
        n++;
        if (t >= len - NMEAS) begin si += tri_val(qpsk_i); sq += tri_val(qpsk_q); end
      end
      mi = real'(si) / NMEAS; mq = real'(sq) / NMEAS;
      qgot = quadrant(mi, mq);
      if (s < 0) begin
        k0 = k; q0 = qgot;
      end else begin
        qexp = ((q0 - (k - k0)) % 4 + 4) % 4;
        checks++;
        if (qgot != qexp) begin
          failures++;
          $display("FAIL QPSK symbol %0d: I %f Q %f quadrant %0d expected %0d", s, mi, mq, qgot, qexp);
        end else n_step[dk]++;
        checks++;
        if ((mi < 0 ? -mi : mi) < 0.3 || (mi < 0 ? -mi : mi) > 0.95 ||
            (mq < 0 ? -mq : mq) < 0.3 || (mq < 0 ? -mq : mq) > 0.95) begin
          failures++;
          $display("FAIL QPSK symbol %0d magnitude: I %f Q %f", s, mi, mq);
        end
      end
    end
    per = real'(last - first) / real'(ncross - 1);
    checks++;
    if (per < 512.0 * 0.995 || per > 512.0 * 1.005) begin
      failures++;
      $display("FAIL DPLL NCO period %f", per);
    end
    checks++;
    if (dmax - dmin > 0.5) begin
      failures++;
      $display("FAIL DPLL phase not steady: %f..%f", dmin, dmax);
    end else n_lock++;
    $display("DPLL: NCO period %f, phase error band %f..%f", per, dmin, dmax);
    $display("mechanisms: pll ctrl +1 %0d / -1 %0d, qpsk ctrl +1 %0d / -1 %0d, NCO limits pll %0d qpsk %0d",
             n_pll_up, n_pll_dn, n_q_up, n_q_dn, n_lim_pll, n_lim_q);
    $display("mechanisms: DSDM levels -1 %0d 0 %0d +1 %0d, phase steps recovered +1 %0d +2 %0d +3 %0d, DPLL lock %0d",
             n_lvl[0], n_lvl[1], n_lvl[2], n_step[1], n_step[2], n_step[3], n_lock);
    checks++;
    if (n_pll_up == 0 || n_pll_dn == 0 || n_q_up == 0 || n_q_dn == 0) begin
      failures++; $display("FAIL an NCO control level never occurred");
    end
    checks++;
    if (n_lim_pll == 0 || n_lim_q == 0) begin
      failures++; $display("FAIL an NCO counter never reached its limit");
    end
    checks++;
    if (n_lvl[0] == 0 || n_lvl[1] == 0 || n_lvl[2] == 0) begin
      failures++; $display("FAIL a quantizer level never occurred");
    end
    checks++;
    if (n_step[1] == 0 || n_step[2] == 0 || n_step[3] == 0) begin
      failures++; $display("FAIL a phase-step size was never recovered");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
