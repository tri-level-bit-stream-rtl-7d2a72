// bs_adder - tri-level bit-stream adder.
//
// Adds two tri-level bit-streams and halves the result so that the sum stays
// tri-level:  Z(z) = ( X(z) + Y(z) - (1 - z^-1) LSB(z) ) / 2.
// It is a 3-bit ripple adder: the two inputs are sign-extended to three bits
// ({x1,x1,x0} + {y1,y1,y0}), the carry-in is the bit dropped in the previous
// cycle, the sum's least significant bit is that dropped bit (stored in the
// one flip-flop of the block), and the upper two sum bits are the output.
// Dropping the bit and adding it back one cycle later keeps the running sum
// of the output exactly half the running sum of the inputs, to within one.
//
// Interface: x, y are tri-level inputs, z the tri-level sum/2. The output is
// combinational from x, y and the stored bit (no latency); the stored bit is
// updated on every rising clock edge and cleared by the synchronous
// active-low reset (reset behaviour is this design's choice).
// Structure and equation follow the design description.
module bs_adder
  import tbs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  tri_t x,
  input  tri_t y,
  output tri_t z
);

  logic       lsb_q;
  logic [2:0] sum;

  always_comb sum = {x[1], x} + {y[1], y} + {2'b00, lsb_q};
  assign z = sum[2:1];

  always_ff @(posedge clk)
    if (!rst_n) lsb_q <= 1'b0;
    else        lsb_q <= sum[0];

  a_valid_in: assert property (@(posedge clk) disable iff (!rst_n)
                               tri_valid(x) && tri_valid(y));

endmodule
