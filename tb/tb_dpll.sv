// tb_dpll - type-1 bit-stream DPLL (A = 80, K0 = 82, DK = 5).
//
// The input is a complex sinusoid of amplitude 0.95, its cosine and sine
// each turned into a tri-level bit-stream. Three input periods are run:
// 512 samples (the published case) and 505 and 525, which lie either side
// of the NCO's free-running period 2*pi*82 = 515.2 and so need a control
// average of opposite signs.
//
// After the loop settles, at every rising zero crossing of the NCO's cosine
// counter (NCO phase -pi/2) the phase difference d between input and NCO is
// taken. Checks: the NCO period equals the input period (within 0.5 %); d
// stays within a band of 0.5 rad (no cycle slips, locked); and d matches the
// static phase error of a type-1 loop,
//     (a_in * a_nco / 2) * sin(d) = mean control = 2*pi*(f_in - f0)*K0^2/DK,
// with a_nco = A/K0 and f0 = 1/(2*pi*K0), within 0.35 rad.
module tb_dpll;
  import tbs_pkg::*;

  localparam int A = 80, K0 = 82, DK = 5;
  localparam real AIN = 0.95;
  localparam int NSETTLE = 40000, NMEAS = 30000;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  real  vc = 0.0, vs = 0.0;
  tri_t ic, is, z, qc, qs;
  logic signed [7:0] wc, ws;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tri_sdm_model u_sc (.clk(clk), .rst_n(rst_n), .v(vc), .y(ic));
  tri_sdm_model u_ss (.clk(clk), .rst_n(rst_n), .v(vs), .y(is));

  dpll #(.L(4), .W(8), .A(A), .K0(K0), .DK(DK), .ALPHA(16)) dut (
    .clk(clk), .rst_n(rst_n), .ic(ic), .is(is), .z(z), .qc(qc), .qs(qs), .wc(wc), .ws(ws)
  );

  function automatic real wrap(real p);
    while (p > PI) p -= 2.0 * PI;
    while (p <= -PI) p += 2.0 * PI;
    return p;
  endfunction

  initial begin
    real pers [3] = '{512.0, 505.0, 525.0};
    real f, d, dmin, dmax, dsum, dexp, cexp, per;
    int  prev_wc, ncross, first, last;
    for (int t = 0; t < 3; t++) begin
      f = 1.0 / pers[t];
      rst_n = 0;
      repeat (3) @(posedge clk);
      rst_n = 1;
      ncross = 0; first = -1; last = -1; prev_wc = 0;
      dmin = 10.0; dmax = -10.0; dsum = 0.0;
      for (int n = 0; n < NSETTLE + NMEAS; n++) begin
        @(negedge clk);
        vc = AIN * $cos(2.0 * PI * f * real'(n));
        vs = AIN * $sin(2.0 * PI * f * real'(n));
        if (n >= NSETTLE && prev_wc < 0 && wc >= 0) begin
          d = wrap(2.0 * PI * f * real'(n) + PI / 2.0);
          if (d < dmin) dmin = d;
          if (d > dmax) dmax = d;
          dsum += d;
          if (first < 0) first = n;
          last = n;
          ncross++;
        end
        prev_wc = wc;
      end
      per  = real'(last - first) / real'(ncross - 1);
      d    = dsum / real'(ncross);
      cexp = 2.0 * PI * (f - 1.0 / (2.0 * PI * real'(K0))) * real'(K0 * K0) / real'(DK);
      dexp = $asin(2.0 * cexp / (AIN * real'(A) / real'(K0)));
      $display("input period %f: NCO period %f, phase error %f (band %f..%f), type-1 estimate %f",
               pers[t], per, d, dmin, dmax, dexp);
      checks++;
      if (per < pers[t] * 0.995 || per > pers[t] * 1.005) begin
        failures++;
        $display("FAIL NCO period %f, input period %f", per, pers[t]);
      end
      checks++;
      if (dmax - dmin > 0.5) begin
        failures++;
        $display("FAIL phase error not steady: %f..%f", dmin, dmax);
      end
      checks++;
      if (d < dexp - 0.35 || d > dexp + 0.35) begin
        failures++;
        $display("FAIL static phase error %f, expected about %f", d, dexp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * (NSETTLE + NMEAS + 10) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
