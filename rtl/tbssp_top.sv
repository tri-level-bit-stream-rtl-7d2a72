// tbssp_top - the two tri-level bit-stream applications side by side.
//
// Holds the type-1 DPLL and the QPSK demodulator built from the tri-level
// bit-stream library (adder, negation, multiplier, DSDM, up/hold/down
// counter, lowpass filter, NCO, divider, square root). The two share only
// the clock and reset; each has its own ports.
//
// DPLL: ic, is are the two tri-level bit-streams of the complex input
// sinusoid; pll_err is the phase-detector output that steers the NCO,
// pll_qc / pll_qs the locked NCO bit-streams and pll_wc / pll_ws the NCO's
// counter values (a multi-bit view of the recovered cosine and sine).
// QPSK: qpsk_in is the tri-level carrier; qpsk_i / qpsk_q the demodulated
// symbol streams, qpsk_zc / qpsk_zs the baseband streams before
// normalisation and qpsk_ctrl the carrier loop's NCO control.
//
// One sample per clock everywhere; synchronous active-low reset. All sizes
// are those of the two applications' own modules.
module tbssp_top
  import tbs_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // DPLL
  input  tri_t        ic,
  input  tri_t        is,
  output tri_t        pll_err,
  output tri_t        pll_qc,
  output tri_t        pll_qs,
  output logic signed [7:0] pll_wc,
  output logic signed [7:0] pll_ws,
  // QPSK demodulator
  input  tri_t        qpsk_in,
  output tri_t        qpsk_i,
  output tri_t        qpsk_q,
  output tri_t        qpsk_zc,
  output tri_t        qpsk_zs,
  output tri_t        qpsk_ctrl
);

  dpll u_dpll (
    .clk(clk), .rst_n(rst_n), .ic(ic), .is(is),
    .z(pll_err), .qc(pll_qc), .qs(pll_qs), .wc(pll_wc), .ws(pll_ws)
  );

  qpsk_demod u_qpsk (
    .clk(clk), .rst_n(rst_n), .din(qpsk_in),
    .i_out(qpsk_i), .q_out(qpsk_q), .zc(qpsk_zc), .zs(qpsk_zs), .ctrl(qpsk_ctrl)
  );

endmodule
