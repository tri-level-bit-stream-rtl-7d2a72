// qpsk_sync - synchronisation part of the tri-level QPSK demodulator
// (generalised Costas loop).
//
// The input carrier bit-stream is mixed with the NCO's cosine and sine
// bit-streams and lowpass filtered to give the baseband pair Zc, Zs. The
// fourth-order phase error of QPSK is formed from them with bit-stream
// adders and multipliers:
//     P  = Zc*(Zc+Zs)/2,   M = Zs*(Zc-Zs)/2,   e = P*M ~ Zc*Zs*(Zc^2-Zs^2)/4
// which is proportional to sin(4*psi) for a carrier phase error psi, so the
// loop cannot tell the four QPSK phases apart and tracks the carrier through
// data phase jumps. e is smoothed by the loop filter (L) and drives the
// NCO's control input. The loop settles with the symbols on the diagonals
// (|Zc| = |Zs|).
//
// Interface: din tri-level carrier in; zc, zs the filtered baseband
// bit-streams; p = Zc(Zc+Zs)/2 and m = Zs(Zc-Zs)/2 (used by the detection
// part); ctrl the NCO control; qc, qs the NCO outputs. Synchronous
// active-low reset.
//
// Structure and the numbers follow the design description: NCO A = 75,
// K0 = 79, DK = 4; lowpass filters C and S with cut-off 1.87e-3 and gain
// 4/3 (a = 8, b = 6, K = 512) and loop filter L with the same cut-off and
// gain 16 (a = 96, b = 6). This design's choices: multiplier window L = 4,
// the widths, the NCO quantizer threshold 16 and the filters' threshold 128
// (K/4).
module qpsk_sync
  import tbs_pkg::*;
#(
  parameter int L          = 4,
  parameter int NCO_W      = 8,
  parameter int NCO_A      = 75,
  parameter int NCO_K0     = 79,
  parameter int NCO_DK     = 4,
  parameter int NCO_ALPHA  = 16,
  parameter int LPF_W      = 11,
  parameter int LPF_K      = 512,
  parameter int LPF_ALPHA  = 128,
  parameter int MIX_A      = 8,
  parameter int MIX_B      = 6,
  parameter int LOOP_A     = 96,
  parameter int LOOP_B     = 6
) (
  input  logic clk,
  input  logic rst_n,
  input  tri_t din,
  output tri_t zc,
  output tri_t zs,
  output tri_t p,
  output tri_t m,
  output tri_t ctrl,
  output tri_t qc,
  output tri_t qs
);

  tri_t mix_c, mix_s, sum_cs, dif_cs, zs_neg, err;
  logic signed [LPF_W-1:0] w_c, w_s, w_l;
  logic signed [NCO_W-1:0] wc, ws;

  // Mixers and baseband filters C and S.
  bs_multiplier #(.L(L)) u_mix_c (.clk(clk), .rst_n(rst_n), .x(din), .y(qc), .z(mix_c));
  bs_multiplier #(.L(L)) u_mix_s (.clk(clk), .rst_n(rst_n), .x(din), .y(qs), .z(mix_s));

  bs_lpf #(.W(LPF_W), .K(LPF_K), .ALPHA(LPF_ALPHA), .A_GAIN(MIX_A), .B_GAIN(MIX_B))
    u_lpf_c (.clk(clk), .rst_n(rst_n), .x(mix_c), .y(zc), .w(w_c));
  bs_lpf #(.W(LPF_W), .K(LPF_K), .ALPHA(LPF_ALPHA), .A_GAIN(MIX_A), .B_GAIN(MIX_B))
    u_lpf_s (.clk(clk), .rst_n(rst_n), .x(mix_s), .y(zs), .w(w_s));

  // Phase error Zc*Zs*(Zc^2 - Zs^2).
  bs_adder u_add_sum (.clk(clk), .rst_n(rst_n), .x(zc), .y(zs), .z(sum_cs));
  bs_neg   u_neg_zs  (.x(zs), .z(zs_neg));
  bs_adder u_add_dif (.clk(clk), .rst_n(rst_n), .x(zc), .y(zs_neg), .z(dif_cs));

  bs_multiplier #(.L(L)) u_mul_p (.clk(clk), .rst_n(rst_n), .x(zc), .y(sum_cs), .z(p));
  bs_multiplier #(.L(L)) u_mul_m (.clk(clk), .rst_n(rst_n), .x(zs), .y(dif_cs), .z(m));
  bs_multiplier #(.L(L)) u_mul_e (.clk(clk), .rst_n(rst_n), .x(p), .y(m), .z(err));

  // Loop filter L and NCO.
  bs_lpf #(.W(LPF_W), .K(LPF_K), .ALPHA(LPF_ALPHA), .A_GAIN(LOOP_A), .B_GAIN(LOOP_B))
    u_lpf_l (.clk(clk), .rst_n(rst_n), .x(err), .y(ctrl), .w(w_l));

  bs_nco #(.W(NCO_W), .A(NCO_A), .K0(NCO_K0), .DK(NCO_DK), .ALPHA(NCO_ALPHA)) u_nco (
    .clk(clk), .rst_n(rst_n), .c(ctrl), .qc(qc), .qs(qs), .wc(wc), .ws(ws)
  );

  a_valid_in: assert property (@(posedge clk) disable iff (!rst_n) tri_valid(din));

endmodule
