// bs_sqrt - tri-level bit-stream square root.
//
// Solves z = sqrt(x) by feedback. The output bit-stream z is squared in a
// bit-stream multiplier (both operands are z), negated and added to the
// input x (the adder halves); an up/hold/down counter integrates the error
// and a DSDM with gain K turns the count back into the bit-stream z:
//     z[n+1] = z[n] + (x[n] - z[n]^2) / (2K).
// For a mean input in [0, 1] the mean output settles at +sqrt(mean(x)):
// starting from zero the output rises, and the positive root is the stable
// one.
//
// Interface: x tri-level in, z tri-level out, w the counter value (~ K*z,
// for observation). z is decoded from the DSDM's register. Synchronous
// active-low reset clears all state.
//
// The loop structure and difference equation follow the design description.
// This design's choices: K = 256, counter limit A = 255 and multiplier window
// L = 4, as for the divider.
module bs_sqrt
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
  output tri_t                z,
  output logic signed [W-1:0] w
);

  tri_t zz, zz_neg, err;

  bs_multiplier #(.L(L)) u_mul (
    .clk(clk), .rst_n(rst_n), .x(z), .y(z), .z(zz)
  );

  bs_neg u_neg (.x(zz), .z(zz_neg));

  bs_adder u_add (
    .clk(clk), .rst_n(rst_n), .x(x), .y(zz_neg), .z(err)
  );

  uhd_counter #(.CW(W), .A(A), .INIT(0)) u_cnt (
    .clk(clk), .rst_n(rst_n), .d(err), .cnt(w)
  );

  dsdm #(.W(W), .ALPHA(ALPHA)) u_dsdm (
    .clk(clk), .rst_n(rst_n), .x(w), .k(W'(K)), .y(z)
  );

  initial assert (A <= K && K <= 2 ** (W - 1))
    else $error("bs_sqrt: need A <= K <= 2**(W-1)");

endmodule
