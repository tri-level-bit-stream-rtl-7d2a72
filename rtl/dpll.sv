// dpll - type-1 tri-level bit-stream digital phase-locked loop.
//
// Locks a bit-stream NCO to a complex input sinusoid i = ic + j*is given as
// two tri-level bit-streams. The phase detector forms
//     z = Im(i * conj(q)) = is*Qc - ic*Qs      (halved by the adder)
// with two bit-stream multipliers, a negation and a bit-stream adder, where
// q = Qc + j*Qs is the NCO output. z ~ sin(phase(i) - phase(q)) / 2 is fed
// straight to the NCO's control input with no loop filter (type 1): a
// positive z raises the NCO frequency and pulls its phase forward. At lock
// the NCO runs at the input frequency with a small static phase offset that
// supplies the needed control average.
//
// Interface: ic, is tri-level in; z the phase-error bit-stream (the loop's
// output); qc, qs the NCO outputs. Synchronous active-low reset.
//
// Structure and the example numbers (A = 80, K0 = 82, DK = 5 for an input
// frequency of 1/512) follow the design description. This design's choices:
// multiplier window L = 4, NCO width W = 8 and quantizer threshold
// ALPHA = 16 (a power of two near K0/4).
module dpll
  import tbs_pkg::*;
#(
  parameter int L     = 4,
  parameter int W     = 8,
  parameter int A     = 80,
  parameter int K0    = 82,
  parameter int DK    = 5,
  parameter int ALPHA = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tri_t                ic,
  input  tri_t                is,
  output tri_t                z,
  output tri_t                qc,
  output tri_t                qs,
  output logic signed [W-1:0] wc,
  output logic signed [W-1:0] ws
);

  tri_t is_qc, ic_qs, ic_qs_neg;

  bs_multiplier #(.L(L)) u_mul_s (
    .clk(clk), .rst_n(rst_n), .x(is), .y(qc), .z(is_qc)
  );

  bs_multiplier #(.L(L)) u_mul_c (
    .clk(clk), .rst_n(rst_n), .x(ic), .y(qs), .z(ic_qs)
  );

  bs_neg u_neg (.x(ic_qs), .z(ic_qs_neg));

  bs_adder u_pd (
    .clk(clk), .rst_n(rst_n), .x(is_qc), .y(ic_qs_neg), .z(z)
  );

  bs_nco #(.W(W), .A(A), .K0(K0), .DK(DK), .ALPHA(ALPHA)) u_nco (
    .clk(clk), .rst_n(rst_n), .c(z), .qc(qc), .qs(qs), .wc(wc), .ws(ws)
  );

endmodule
