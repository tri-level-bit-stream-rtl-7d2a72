// qpsk_detect - detection part of the tri-level QPSK demodulator
// (magnitude normalisation).
//
// Takes the baseband pair Zc, Zs and the two products P = Zc(Zc+Zs)/2 and
// M = Zs(Zc-Zs)/2 from the synchronisation part and returns the symbol
// coordinates with the carrier amplitude divided out:
//     (P - M)/2 = (Zc^2 + Zs^2)/4
//     R = G_R * sqrt((Zc^2 + Zs^2)/4)          (square root, filter R)
//     I = Zc / R,   Q = Zs / R                  (dividers, filters X, Y)
// so that the symbols land on fixed points of the (I, Q) plane whatever
// the received amplitude.
//
// Interface: zc, zs, p, m tri-level in; i_out, q_out the tri-level symbol
// bit-streams; r the magnitude bit-stream (divisor). Synchronous
// active-low reset.
//
// Structure and the filter numbers follow the design description: filter R
// with cut-off 1.87e-3 and gain 3 (a = 18, b = 6, K = 512), filters X and Y
// with cut-off 3.11e-4 and gain 1 (a = b = 1, K = 512). This design's
// choices: divider and square-root sizes (K = 256, A = 255, L = 4), widths
// and the filters' quantizer threshold 128.
module qpsk_detect
  import tbs_pkg::*;
#(
  parameter int L         = 4,
  parameter int DIV_W     = 9,
  parameter int DIV_K     = 256,
  parameter int DIV_A     = 255,
  parameter int DIV_ALPHA = 64,
  parameter int LPF_W     = 11,
  parameter int LPF_K     = 512,
  parameter int LPF_ALPHA = 128,
  parameter int MAG_A     = 18,
  parameter int MAG_B     = 6,
  parameter int OUT_A     = 1,
  parameter int OUT_B     = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  tri_t zc,
  input  tri_t zs,
  input  tri_t p,
  input  tri_t m,
  output tri_t i_out,
  output tri_t q_out,
  output tri_t r
);

  tri_t m_neg, pwr, mag, i_raw, q_raw;
  logic signed [DIV_W-1:0] w_sqrt, w_div_i, w_div_q;
  logic signed [LPF_W-1:0] w_r, w_x, w_y;

  bs_neg   u_neg (.x(m), .z(m_neg));
  bs_adder u_add (.clk(clk), .rst_n(rst_n), .x(p), .y(m_neg), .z(pwr));

  bs_sqrt #(.L(L), .W(DIV_W), .K(DIV_K), .A(DIV_A), .ALPHA(DIV_ALPHA)) u_sqrt (
    .clk(clk), .rst_n(rst_n), .x(pwr), .z(mag), .w(w_sqrt)
  );

  bs_lpf #(.W(LPF_W), .K(LPF_K), .ALPHA(LPF_ALPHA), .A_GAIN(MAG_A), .B_GAIN(MAG_B))
    u_lpf_r (.clk(clk), .rst_n(rst_n), .x(mag), .y(r), .w(w_r));

  bs_divider #(.L(L), .W(DIV_W), .K(DIV_K), .A(DIV_A), .ALPHA(DIV_ALPHA)) u_div_i (
    .clk(clk), .rst_n(rst_n), .x(zc), .y(r), .z(i_raw), .w(w_div_i)
  );
  bs_divider #(.L(L), .W(DIV_W), .K(DIV_K), .A(DIV_A), .ALPHA(DIV_ALPHA)) u_div_q (
    .clk(clk), .rst_n(rst_n), .x(zs), .y(r), .z(q_raw), .w(w_div_q)
  );

  bs_lpf #(.W(LPF_W), .K(LPF_K), .ALPHA(LPF_ALPHA), .A_GAIN(OUT_A), .B_GAIN(OUT_B))
    u_lpf_x (.clk(clk), .rst_n(rst_n), .x(i_raw), .y(i_out), .w(w_x));
  bs_lpf #(.W(LPF_W), .K(LPF_K), .ALPHA(LPF_ALPHA), .A_GAIN(OUT_A), .B_GAIN(OUT_B))
    u_lpf_y (.clk(clk), .rst_n(rst_n), .x(q_raw), .y(q_out), .w(w_y));

endmodule
