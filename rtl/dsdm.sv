// dsdm - digital sigma-delta modulator with tri-level output.
//
// Converts a multi-bit signed input x[n], limited to [-K, K], into a
// tri-level bit-stream whose average is x/K. One accumulator integrates the
// error between the input and the fed-back output scaled by the gain K:
//     u[n+1] = u[n] + x[n] - K * q(u[n]),    y[n] = q(u[n])
// and a three-level quantizer with threshold ALPHA (about K/4) decides
//     q(u) = +1 if u >= ALPHA,  -1 if u < -ALPHA,  0 otherwise.
// With the example size (K = 256, 9-bit input, 10-bit accumulator,
// ALPHA = 64) this is exactly a decode of the top four accumulator bits:
// 0001..0111 -> +1, 0000 and 1111 -> 0, 1000..1110 -> -1.
//
// The gain K is an input port, not a parameter, because the oscillator
// changes it from cycle to cycle; every other user ties it to a constant.
// The accumulator is W+1 bits wide, which cannot overflow while |x| fits W
// bits and K <= 2**(W-1) (|u| stays below 2K).
//
// Interface: x (W-bit signed), k (W-bit unsigned gain), y (tri-level). The
// output is decoded from the accumulator register, so y[n] depends on inputs
// up to x[n-1] only: it is safe to close feedback loops through this block.
// Synchronous active-low reset clears the accumulator (this design's
// choice). Structure, quantizer and example sizes follow the design
// description; the quantizer boundary at u = ALPHA follows the top-bit table
// (which puts u = ALPHA at +1) rather than the strict inequality u > ALPHA.
module dsdm
  import tbs_pkg::*;
#(
  parameter int W     = 9,
  parameter int ALPHA = 64
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic signed [W-1:0] x,
  input  logic        [W-1:0] k,
  output tri_t                y
);

  localparam int AW = W + 1;

  logic signed [AW-1:0] u;
  logic signed [AW:0]   u_next;
  logic signed [AW:0]   fb;

  always_comb begin
    if (u >= AW'(ALPHA))       y = TRI_POS;
    else if (u < AW'(-ALPHA))  y = TRI_NEG;
    else                       y = TRI_ZERO;
  end

  always_comb begin
    unique case (y)
      TRI_POS: fb = (AW+1)'(signed'({1'b0, k}));
      TRI_NEG: fb = -(AW+1)'(signed'({1'b0, k}));
      default: fb = '0;
    endcase
    u_next = (AW+1)'(u) + (AW+1)'(x) - fb;
  end

  always_ff @(posedge clk)
    if (!rst_n) u <= '0;
    else        u <= u_next[AW-1:0];

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                  u_next[AW] == u_next[AW-1]);

endmodule
