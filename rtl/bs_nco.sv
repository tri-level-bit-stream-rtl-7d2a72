// bs_nco - sigma-delta quadrature oscillator / numerically controlled
// oscillator.
//
// Two up/hold/down counters and two tri-level DSDMs form a discrete rotator.
// The cosine counter integrates the negated sine bit-stream and the sine
// counter integrates the cosine bit-stream:
//     wc[n+1] = wc[n] - Qs[n],   ws[n+1] = ws[n] + Qc[n],
//     Qc = DSDM(wc), Qs = DSDM(ws), both with gain K, so Q ~ w/K.
// The pair rotates by 1/K radian per sample: Qc and Qs are bit-streams of a
// cosine and a sine of frequency 1/(2*pi*K), a quarter period apart. The
// rotation slowly gains amplitude until the counters hit their limits +-A
// (1 << A < K), which sets the output amplitude to about A/K.
//
// The tri-level control c[n] moves the gain of both modulators around the
// centre value: K[n] = K0 - DK*c[n]. c = +1 makes K smaller and the
// oscillator faster, which matches the phase law
//     theta[n] = n/K0 + (DK/K0^2) * sum c[i].
//
// Interface: c tri-level control in; qc, qs tri-level outputs; wc, ws the
// counter values (for observation). Synchronous active-low reset loads
// wc = A, ws = 0 (start at phase 0, full amplitude). The outputs depend on
// c only through the registers, one cycle later.
//
// Structure, limits and the example numbers (A = 75, K0 = 79, DK = 4) follow
// the design description. This design's own choices: the sign of the
// control (taken from the phase law and the measured spectra, which move up
// in frequency for c = +1), the reset state, the counter and modulator width
// W, and the quantizer threshold ALPHA = 16 (a power of two near K0/4).
module bs_nco
  import tbs_pkg::*;
#(
  parameter int W     = 8,
  parameter int A     = 75,
  parameter int K0    = 79,
  parameter int DK    = 4,
  parameter int ALPHA = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tri_t                c,
  output tri_t                qc,
  output tri_t                qs,
  output logic signed [W-1:0] wc,
  output logic signed [W-1:0] ws
);

  logic [W-1:0] k;
  tri_t         qs_neg;

  always_comb begin
    unique case (c)
      TRI_POS: k = W'(K0 - DK);
      TRI_NEG: k = W'(K0 + DK);
      default: k = W'(K0);
    endcase
  end

  bs_neg u_neg (.x(qs), .z(qs_neg));

  uhd_counter #(.CW(W), .A(A), .INIT(A)) u_cnt_c (
    .clk(clk), .rst_n(rst_n), .d(qs_neg), .cnt(wc)
  );

  uhd_counter #(.CW(W), .A(A), .INIT(0)) u_cnt_s (
    .clk(clk), .rst_n(rst_n), .d(qc), .cnt(ws)
  );

  dsdm #(.W(W), .ALPHA(ALPHA)) u_dsdm_c (
    .clk(clk), .rst_n(rst_n), .x(wc), .k(k), .y(qc)
  );

  dsdm #(.W(W), .ALPHA(ALPHA)) u_dsdm_s (
    .clk(clk), .rst_n(rst_n), .x(ws), .k(k), .y(qs)
  );

  initial assert (A < K0 && K0 + DK <= 2 ** (W - 1))
    else $error("bs_nco: need A < K0 and K0+DK <= 2**(W-1)");

  a_valid_in: assert property (@(posedge clk) disable iff (!rst_n) tri_valid(c));

endmodule
