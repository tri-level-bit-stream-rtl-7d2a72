// uhd_counter - up/hold/down counter with symmetric limits.
//
// Integrates a tri-level bit-stream: the count goes up by one on +1, holds on
// 0 and goes down by one on -1, and it saturates at +A and -A. Its output is
// the multi-bit signal that feeds a digital sigma-delta modulator in the
// oscillator, divider and square-root circuits.
//
// Interface: d is the tri-level input, cnt the signed count (CW bits, must
// hold +-A). The count is registered: cnt changes one cycle after d. The
// synchronous active-low reset loads INIT. The up/hold/down/limit function
// follows the design description; the register-output timing, the reset
// value and saturation (rather than wrap) at exactly +-A are this design's
// reading of "upper and lower limits".
module uhd_counter
  import tbs_pkg::*;
#(
  parameter int CW   = 9,
  parameter int A    = 255,
  parameter int INIT = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  tri_t                 d,
  output logic signed [CW-1:0] cnt
);

  localparam logic signed [CW-1:0] LIM_HI = CW'(A);
  localparam logic signed [CW-1:0] LIM_LO = CW'(-A);

  always_ff @(posedge clk)
    if (!rst_n)
      cnt <= CW'(INIT);
    else if (d == TRI_POS && cnt < LIM_HI)
      cnt <= cnt + 1'b1;
    else if (d == TRI_NEG && cnt > LIM_LO)
      cnt <= cnt - 1'b1;

  initial assert (A > 0 && A < 2 ** (CW - 1)) else $error("uhd_counter: A does not fit CW");

  a_valid_in: assert property (@(posedge clk) disable iff (!rst_n) tri_valid(d));
  a_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                               cnt <= LIM_HI && cnt >= LIM_LO);

endmodule
