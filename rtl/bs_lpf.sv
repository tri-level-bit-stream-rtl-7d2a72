// bs_lpf - first-order tri-level bit-stream lowpass filter.
//
// A leaky integrator whose leak is the filter's own bit-stream output:
//     w[n] = w[n-1] + a*x[n] - b*y[n],    y = DSDM(w) with gain K.
// Because the modulator makes y ~ w/K, the loop is a one-pole lowpass with
// pole 1 - b/K, DC gain a/b and a cut-off of about b/(2*pi*K) cycles per
// sample; the modulator's quantisation noise is first-order shaped.
// Example: a = b = 6, K = 512 gives a cut-off near 1.87e-3.
//
// Interface: x tri-level in, y tri-level out, w the filter state (for
// observation). y[n] is decoded from the modulator's accumulator, so it
// depends on x up to x[n-1]. Synchronous active-low reset clears the state.
//
// The loop (gains a and b, integrator, modulator) follows the design
// description. This design adds one thing of its own: w is clamped to
// [-K, K], the modulator's input range, so that an overdriven filter (a gain
// a/b that asks for an output beyond +-1) saturates instead of wrapping.
module bs_lpf
  import tbs_pkg::*;
#(
  parameter int W      = 11,
  parameter int K      = 512,
  parameter int ALPHA  = 128,
  parameter int A_GAIN = 6,
  parameter int B_GAIN = 6
) (
  input  logic                clk,
  input  logic                rst_n,
  input  tri_t                x,
  output tri_t                y,
  output logic signed [W-1:0] w
);

  localparam int SW = W + 2;

  logic signed [W-1:0]  w_q;
  logic signed [SW-1:0] w_sum;

  always_comb begin
    w_sum = SW'(w_q) + SW'(A_GAIN * tri_val(x)) - SW'(B_GAIN * tri_val(y));
    if (w_sum > SW'(K))        w = W'(K);
    else if (w_sum < SW'(-K))  w = W'(-K);
    else                       w = w_sum[W-1:0];
  end

  always_ff @(posedge clk)
    if (!rst_n) w_q <= '0;
    else        w_q <= w;

  dsdm #(.W(W), .ALPHA(ALPHA)) u_dsdm (
    .clk  (clk),
    .rst_n(rst_n),
    .x    (w),
    .k    (W'(K)),
    .y    (y)
  );

  initial assert (K <= 2 ** (W - 1) && A_GAIN + B_GAIN + K < 2 ** W)
    else $error("bs_lpf: W too narrow for K and gains");

  a_valid_in: assert property (@(posedge clk) disable iff (!rst_n) tri_valid(x));

endmodule
