// tb_bs_sqrt - bit-stream square root (K = 256, A = 255, L = 4).
//
// For several input means the input is a modulated constant; after the loop
// settles the mean of the output bit-stream over a long window must equal
// sqrt(mean x) within 0.01 + 5 % for inputs of 0.25 and above. Below 0.25 the
// circuit is known to settle low: the squarer averages products of nearby
// samples, and the modulation noise of a small-valued stream adds to the
// square. There the output must lie below the exact root by a relative
// error of at most 40 % (the published error curve is about 30 % at 0.04).
module tb_bs_sqrt;
  import tbs_pkg::*;

  localparam int NPTS = 4;
  localparam int NSETTLE = 30000, NMEAS = 30000;

  logic clk = 0, rst_n = 0;
  real  vx = 0.0;
  tri_t x, z;
  logic signed [8:0] w;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  tri_sdm_model u_sx (.clk(clk), .rst_n(rst_n), .v(vx), .y(x));

  bs_sqrt #(.L(4), .W(9), .K(256), .A(255), .ALPHA(64)) dut (
    .clk(clk), .rst_n(rst_n), .x(x), .z(z), .w(w)
  );

  initial begin
    real xs [NPTS] = '{0.04, 0.25, 0.5, 0.81};
    real m, e;
    longint acc;
    for (int p = 0; p < NPTS; p++) begin
      rst_n = 0;
      vx = xs[p];
      repeat (3) @(posedge clk);
      rst_n = 1;
      repeat (NSETTLE) @(posedge clk);
      acc = 0;
      for (int n = 0; n < NMEAS; n++) begin
        @(negedge clk);
        acc += tri_val(z);
      end
      m = real'(acc) / real'(NMEAS);
      e = $sqrt(xs[p]);
      checks++;
      if (xs[p] >= 0.25 ? (m < e - 0.01 - 0.05 * e || m > e + 0.01 + 0.05 * e)
                        : (m < 0.6 * e || m > e + 0.01)) begin
        failures++;
        $display("FAIL x=%f: mean z %f, expected %f", xs[p], m, e);
      end
      $display("x=%f: z %f (sqrt %f)", xs[p], m, e);
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
