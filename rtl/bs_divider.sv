// bs_divider - tri-level bit-stream divider.
//
// Solves z = x/y by feedback. The output bit-stream z is multiplied by the
// divisor y in a bit-stream multiplier, negated, and added to the dividend x
// (the adder halves); an up/hold/down counter integrates that error and a
// DSDM with gain K turns the count back into the bit-stream z:
//     z[n+1] = z[n] + (x[n] - y[n]*z[n]) / (2K).
// At equilibrium the average of z is mean(x)/mean(y). The quotient must lie
// in [-1, 1] and the divisor must be positive for the loop to be stable (a
// negative divisor turns the negative feedback into positive feedback).
//
// Interface: x (dividend) and y (divisor) tri-level in, z tri-level out,
// w the counter value (~ K*z, for observation). z is decoded from the DSDM's
// register, so it changes one cycle after its inputs at the earliest.
// Synchronous active-low reset clears all state.
//
// The loop structure and difference equation follow the design description.
// This design's choices: K = 256, the counter limit A = 255 (just inside the
// DSDM's [-K, K] input range) and the multiplier window L = 4. K = 256 with
// a 9-bit counter and 10-bit accumulator matches the worked DSDM example and
// the flip-flop count reported for the tri-level divider.
module bs_divider
  import tbs_pkg::*;
#(
  parameter int L     = 4,
  parameter int W     = 9,
  parameter int K     = 256,
  parameter int A     = 255,
  parameter int ALPHA = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tri_t                x,
  input  tri_t                y,
  output tri_t                z,
  output logic signed [W-1:0] w
);

  tri_t yz, yz_neg, err;

  bs_multiplier #(.L(L)) u_mul (
    .clk(clk), .rst_n(rst_n), .x(z), .y(y), .z(yz)
  );

  bs_neg u_neg (.x(yz), .z(yz_neg));

  bs_adder u_add (
    .clk(clk), .rst_n(rst_n), .x(x), .y(yz_neg), .z(err)
  );

  uhd_counter #(.CW(W), .A(A), .INIT(0)) u_cnt (
    .clk(clk), .rst_n(rst_n), .d(err), .cnt(w)
  );

  dsdm #(.W(W), .ALPHA(ALPHA)) u_dsdm (
    .clk(clk), .rst_n(rst_n), .x(w), .k(W'(K)), .y(z)
  );

  initial assert (A <= K && K <= 2 ** (W - 1))
    else $error("bs_divider: need A <= K <= 2**(W-1)");

endmodule
