// tbs_pkg - shared definitions for tri-level bit-stream signal processing.
//
// A tri-level bit-stream sample takes one of the values -1, 0 or +1 and is
// carried on two wires in 2's complement: -1 -> 2'b11, 0 -> 2'b00,
// +1 -> 2'b01. The code 2'b10 (-2) is never produced by any block here and
// the blocks assert that it never arrives.
//
// The package holds the sample type, its code constants and three small
// combinational helpers:
//   tri_neg  - negation by the two logic equations z0 = x0, z1 = ~x1 & x0
//   tri_mul  - the product of two tri-level samples (the "tri-level
//              multiplier" cell of the bit-stream multiplier); it is zero
//              when either operand is zero, otherwise its sign is the XOR
//              of the operand signs
//   tri_val  - the integer value of a sample, for arithmetic on it
// The encoding and the negation equations follow the design description;
// writing the product cell as sign/magnitude logic is this design's choice.
package tbs_pkg;

  typedef logic [1:0] tri_t;

  localparam tri_t TRI_NEG  = 2'b11;
  localparam tri_t TRI_ZERO = 2'b00;
  localparam tri_t TRI_POS  = 2'b01;

  function automatic tri_t tri_neg(tri_t x);
    return {~x[1] & x[0], x[0]};
  endfunction

  function automatic tri_t tri_mul(tri_t a, tri_t b);
    logic nz;
    nz = a[0] & b[0];
    return {nz & (a[1] ^ b[1]), nz};
  endfunction

  function automatic int tri_val(tri_t x);
    return x[0] ? (x[1] ? -1 : 1) : 0;
  endfunction

  function automatic logic tri_valid(tri_t x);
    return x != 2'b10;
  endfunction

endpackage
