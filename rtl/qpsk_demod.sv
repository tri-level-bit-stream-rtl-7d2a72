// qpsk_demod - tri-level bit-stream QPSK demodulator.
//
// Demodulates a sigma-delta modulated QPSK carrier without leaving the
// bit-stream domain: the synchronisation part (qpsk_sync) recovers the
// carrier with a generalised Costas loop around a bit-stream NCO and yields
// the baseband pair Zc, Zs; the detection part (qpsk_detect) divides them
// by their magnitude, so that the outputs I and Q sit at fixed points
// whatever the received amplitude. Every signal between blocks is a
// tri-level bit-stream; the mean of a stream over many samples is its value.
//
// Interface: din tri-level carrier in (one sample per clock); i_out, q_out
// the demodulated symbol bit-streams; zc, zs the baseband streams before
// normalisation; ctrl the NCO control (carrier phase-error) stream.
// Synchronous active-low reset. The symbol decision (slicing I and Q) is
// left to the user of the streams.
//
// The division into the two parts and all numbers given for the example
// (carrier frequency 0.002, NCO A = 75, K0 = 79, DK = 4, filter cut-offs
// and gains) follow the design description; the sizes listed as this
// design's choices in the two parts apply here too.
module qpsk_demod
  import tbs_pkg::*;
#(
  parameter int L = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  tri_t din,
  output tri_t i_out,
  output tri_t q_out,
  output tri_t zc,
  output tri_t zs,
  output tri_t ctrl
);

  tri_t p, m, qc, qs, r;

  qpsk_sync #(.L(L)) u_sync (
    .clk(clk), .rst_n(rst_n), .din(din),
    .zc(zc), .zs(zs), .p(p), .m(m), .ctrl(ctrl), .qc(qc), .qs(qs)
  );

  qpsk_detect #(.L(L)) u_detect (
    .clk(clk), .rst_n(rst_n), .zc(zc), .zs(zs), .p(p), .m(m),
    .i_out(i_out), .q_out(q_out), .r(r)
  );

endmodule
