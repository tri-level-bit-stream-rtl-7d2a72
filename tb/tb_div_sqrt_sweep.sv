// tb_div_sqrt_sweep - input/output characteristics of the bit-stream divider
// and square root over a sweep of inputs (default sizes: K = 256, A = 255,
// L = 4).
//
// Divider: mean x fixed at 0.037, mean y from 0.05 to 0.95 in steps of
// 0.05. The relative output error (x/y - mean z)/(x/y) must stay within
// +-3 % (the published tri-level error curve stays within about +-3 %).
// Square root: mean x from 0.01 to 0.91 in steps of 0.05 (plus 0.04). The
// relative error must stay within 4 % for x >= 0.25; below 0.25 the output
// must lie under the exact root with a relative error of at most 40 %
// (at most 80 % below 0.04), the shape of the published error curve.
// Each point starts from reset; the loop settles for about eight time
// constants before a 30000-sample average is taken.
module tb_div_sqrt_sweep;
  import tbs_pkg::*;

  localparam int NMEAS = 30000;

  logic clk = 0, rst_n = 0;
  real  vx = 0.0, vy = 0.0;
  tri_t x, y, zd, zs;
  logic signed [8:0] wd, ws;
  int checks = 0, failures = 0;
  int cycles = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  tri_sdm_model u_sx (.clk(clk), .rst_n(rst_n), .v(vx), .y(x));
  tri_sdm_model u_sy (.clk(clk), .rst_n(rst_n), .v(vy), .y(y));

  bs_divider u_div (.clk(clk), .rst_n(rst_n), .x(x), .y(y), .z(zd), .w(wd));
  bs_sqrt    u_sqrt (.clk(clk), .rst_n(rst_n), .x(x), .z(zs), .w(ws));

  task automatic measure(int nsettle, output real md, output real ms);
    longint ad = 0, as_ = 0;
    rst_n = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (nsettle) @(posedge clk);
    for (int n = 0; n < NMEAS; n++) begin
      @(negedge clk);
      ad += tri_val(zd);
      as_ += tri_val(zs);
    end
    md = real'(ad) / NMEAS;
    ms = real'(as_) / NMEAS;
  endtask

  initial begin
    real md, ms, e, rel, worst_d = 0.0;
    // divider sweep
    for (int p = 1; p <= 19; p++) begin
      vx = 0.037;
      vy = 0.05 * real'(p);
      measure(int'(8.0 * 512.0 / vy), md, ms);
      e = vx / vy;
      rel = (e - md) / e;
      if ((rel < 0 ? -rel : rel) > worst_d) worst_d = (rel < 0 ? -rel : rel);
      checks++;
      if (rel > 0.03 || rel < -0.03) begin
        failures++;
        $display("FAIL divider y=%f: z %f, x/y %f", vy, md, e);
      end
    end
    $display("divider: worst relative error %f over y = 0.05..0.95", worst_d);
    // square-root sweep
    vy = 0.5;
    for (int p = 0; p <= 19; p++) begin
      vx = (p == 19) ? 0.04 : 0.01 + 0.05 * real'(p);
      measure(int'(8.0 * 256.0 / $sqrt(vx)), md, ms);
      e = $sqrt(vx);
      rel = (e - ms) / e;
      $display("sqrt x=%f: z %f, exact %f, relative error %f", vx, ms, e, rel);
      checks++;
      if (vx >= 0.25 ? (rel > 0.04 || rel < -0.04)
                     : (rel < -0.01 || rel > (vx < 0.04 ? 0.8 : 0.4))) begin
        failures++;
        $display("FAIL sqrt x=%f", vx);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
