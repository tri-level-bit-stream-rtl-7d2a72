// bs_neg - tri-level bit-stream negation.
//
// Negates a tri-level sample with two gates: z0 = x0 and z1 = ~x1 & x0, so
// +1 (01) becomes -1 (11), -1 becomes +1 and 0 stays 0. Used as the
// subtrahend inverter in front of a bit-stream adder and in the feedback
// paths of the oscillator, divider and square-root circuits.
//
// Interface: x in, z out, purely combinational. The logic equations follow
// the design description.
module bs_neg
  import tbs_pkg::*;
(
  input  tri_t x,
  output tri_t z
);

  assign z = {~x[1] & x[0], x[0]};

endmodule
