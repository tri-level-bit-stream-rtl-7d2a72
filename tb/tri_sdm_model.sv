// tri_sdm_model - behavioural model of a tri-level sigma-delta modulator
// (the converter that turns an analogue signal into a tri-level bit-stream).
// Not synthesizable: it takes a real-valued input. Testbenches use it to
// produce the input bit-streams of the design (constants, sinusoids, QPSK
// carriers).
//
// First-order loop with a real accumulator: u[n+1] = u[n] + v[n] - y[n],
// y[n] = +1 if u[n] >= 0.25, -1 if u[n] < -0.25, else 0 (threshold 1/4 of
// full scale, as in the design's own digital modulator). |v| <= 1.
// Output registered state decoded combinationally; synchronous active-low
// reset clears the accumulator.
module tri_sdm_model
  import tbs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  real  v,
  output tri_t y
);

  real u;
  real yv;

  always_comb begin
    if (u >= 0.25)       begin y = TRI_POS;  yv =  1.0; end
    else if (u < -0.25)  begin y = TRI_NEG;  yv = -1.0; end
    else                 begin y = TRI_ZERO; yv =  0.0; end
  end

  always_ff @(posedge clk)
    if (!rst_n) u <= 0.0;
    else        u <= u + v - yv;

endmodule
