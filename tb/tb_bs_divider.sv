// tb_bs_divider - bit-stream divider (K = 256, A = 255, L = 4).
//
// For several (mean x, mean y) pairs, with x fixed at 0.037 for most of
// them as in the published input/output characteristic, the two inputs are
// modulated constants. After the loop settles (several time constants
// 2K/y) the mean of the output bit-stream over a long window must equal
// x/y within 0.01 + 5 %.
module tb_bs_divider;
  import tbs_pkg::*;

  localparam int NPTS = 5;
  localparam int NSETTLE = 70000, NMEAS = 30000;

  logic clk = 0, rst_n = 0;
  real  vx = 0.0, vy = 0.0;
  tri_t x, y, z;
  logic signed [8:0] w;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tri_sdm_model u_sx (.clk(clk), .rst_n(rst_n), .v(vx), .y(x));
  tri_sdm_model u_sy (.clk(clk), .rst_n(rst_n), .v(vy), .y(y));

  bs_divider #(.L(4), .W(9), .K(256), .A(255), .ALPHA(64)) dut (
    .clk(clk), .rst_n(rst_n), .x(x), .y(y), .z(z), .w(w)
  );

  initial begin
    real xs [NPTS] = '{0.037, 0.037, 0.037, -0.2, 0.45};
    real ys [NPTS] = '{0.05, 0.1, 0.5, 0.5, 0.6};
    real m, e;
    longint acc;
    for (int p = 0; p < NPTS; p++) begin
      rst_n = 0;
      vx = xs[p]; vy = ys[p];
      repeat (3) @(posedge clk);
      rst_n = 1;
      repeat (NSETTLE) @(posedge clk);
      acc = 0;
      for (int n = 0; n < NMEAS; n++) begin
        @(negedge clk);
        acc += tri_val(z);
      end
      m = real'(acc) / real'(NMEAS);
      e = xs[p] / ys[p];
      checks++;
      if (m < e - 0.01 - 0.05 * (e < 0 ? -e : e) || m > e + 0.01 + 0.05 * (e < 0 ? -e : e)) begin
        failures++;
        $display("FAIL x=%f y=%f: mean z %f, expected %f", xs[p], ys[p], m, e);
      end
      $display("x=%f y=%f: z %f (x/y %f)", xs[p], ys[p], m, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NPTS * (NSETTLE + NMEAS + 10) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
