// bs_multiplier - tri-level bit-stream multiplier over a window of L samples.
//
// Multiplies two tri-level bit-streams x[n] and y[n]:
//     z[n] ~ (1/L^2) * sum_{i=n-L+1..n} sum_{j=n-L+1..n} x[i] * y[j].
// Each input runs through a chain of L-1 two-bit unit delays, giving L taps
// per input (the current sample and L-1 past ones). Every pair of taps meets
// in a tri-level multiplier cell (L*L exact tri-level products) and the
// products are summed by a balanced tree of L*L-1 bit-stream adders. Each
// adder halves its sum, so the log2(L*L) levels divide by exactly L*L.
//
// Leaves are ordered so that each group of four products fed to two levels
// of adders is a 2x2 block of taps (two x taps by two y taps), as in the
// drawn L = 4 circuit with its four quadrants of four multiplier cells; the
// quadrant results then meet pairwise and in a final adder. L must be a power
// of two.
//
// Interface: x, y tri-level in, z tri-level out. z is combinational from the
// current inputs, the delay lines and the adders' stored bits. Synchronous
// active-low reset clears the delay lines and the adders. Structure and
// equation follow the design description; the exact pairing of products
// inside a quadrant and the generalisation to other L are this design's.
module bs_multiplier
  import tbs_pkg::*;
#(
  parameter int L = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  tri_t x,
  input  tri_t y,
  output tri_t z
);

  localparam int N  = L * L;
  localparam int LB = $clog2(L);

  // Tap i of a leaf index k: odd bits of k; tap j: even bits of k.
  function automatic int tap_i(int k);
    int r = 0;
    for (int b = 0; b < LB; b++) r |= ((k >> (2 * b + 1)) & 1) << b;
    return r;
  endfunction

  function automatic int tap_j(int k);
    int r = 0;
    for (int b = 0; b < LB; b++) r |= ((k >> (2 * b)) & 1) << b;
    return r;
  endfunction

  tri_t xt [L];
  tri_t yt [L];
  tri_t node [2*N-1];   // heap order: node 0 is the root, leaves at N-1..2N-2

  assign xt[0] = x;
  assign yt[0] = y;

  for (genvar t = 1; t < L; t++) begin : g_delay
    always_ff @(posedge clk)
      if (!rst_n) begin
        xt[t] <= TRI_ZERO;
        yt[t] <= TRI_ZERO;
      end else begin
        xt[t] <= xt[t-1];
        yt[t] <= yt[t-1];
      end
  end

  for (genvar k = 0; k < N; k++) begin : g_cell
    assign node[N-1+k] = tri_mul(xt[tap_i(k)], yt[tap_j(k)]);
  end

  for (genvar a = 0; a < N - 1; a++) begin : g_tree
    bs_adder u_add (
      .clk  (clk),
      .rst_n(rst_n),
      .x    (node[2*a+1]),
      .y    (node[2*a+2]),
      .z    (node[a])
    );
  end

  assign z = node[0];

  initial assert (L >= 2 && (L & (L - 1)) == 0) else $error("bs_multiplier: L must be a power of two");

  a_valid_in: assert property (@(posedge clk) disable iff (!rst_n)
                               tri_valid(x) && tri_valid(y));

endmodule
