// tb_bs_multiplier - bit-stream multiplier (L = 4) against a cycle-accurate
// integer model, the windowed-product identity and a mean-value check.
//
// Model: taps x[n..n-3], y[n..n-3]; the 16 tri-level products are summed
// pairwise by a tree of halving adders (s = a + b + c, out = floor(s/2),
// c' = s mod 2), leaves ordered so that each group of four is a 2x2 block of
// taps. Identity: 16*sum(z) equals the sum over n of the windowed products
// sum_i x[n-i] * sum_j y[n-j] to within the adders' stored bits (<= 85).
// Mean: with x ~ 0.5 and y ~ -0.3 (modulated constants) the mean of z must
// be close to -0.15.
module tb_bs_multiplier;
  import tbs_pkg::*;

  localparam int L = 4;
  localparam int N = L * L;
  localparam int NRAND = 3000;
  localparam int NCONST = 8000;

  logic clk = 0, rst_n = 0;
  tri_t x_r = TRI_ZERO, y_r = TRI_ZERO, x, y, z, x_sdm, y_sdm;
  logic use_sdm = 0;
  real  vx = 0.0, vy = 0.0;
  int   checks = 0, failures = 0;

  int xt [L], yt [L];
  int cst [N-1];
  int val [2*N-1];
  longint leaf_sum = 0, out_sum = 0;

  always #5 clk = ~clk;

  tri_sdm_model u_sx (.clk(clk), .rst_n(rst_n), .v(vx), .y(x_sdm));
  tri_sdm_model u_sy (.clk(clk), .rst_n(rst_n), .v(vy), .y(y_sdm));

  assign x = use_sdm ? x_sdm : x_r;
  assign y = use_sdm ? y_sdm : y_r;

  bs_multiplier #(.L(L)) dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y), .z(z));

  function automatic tri_t enc(int v);
    return v > 0 ? TRI_POS : (v < 0 ? TRI_NEG : TRI_ZERO);
  endfunction

  function automatic int fdiv2(int s);
    return (s >= 0) ? s / 2 : -((-s + 1) / 2);
  endfunction

  // x tap of leaf k: bits 1 and 3 of k; y tap: bits 0 and 2.
  function automatic int ti(int k); return ((k >> 1) & 1) | (((k >> 3) & 1) << 1); endfunction
  function automatic int tj(int k); return (k & 1) | (((k >> 2) & 1) << 1); endfunction

  task automatic step_model(int xv, int yv, output int zexp);
    int sx = 0, sy = 0;
    xt[0] = xv; yt[0] = yv;
    for (int k = 0; k < N; k++) val[N-1+k] = xt[ti(k)] * yt[tj(k)];
    for (int a = N - 2; a >= 0; a--) begin
      int s = val[2*a+1] + val[2*a+2] + cst[a];
      val[a] = fdiv2(s);
      cst[a] = s - 2 * val[a];
    end
    zexp = val[0];
    for (int i = 0; i < L; i++) begin sx += xt[i]; sy += yt[i]; end
    leaf_sum += sx * sy;
    for (int i = L - 1; i > 0; i--) begin xt[i] = xt[i-1]; yt[i] = yt[i-1]; end
  endtask

  initial begin
    int zexp;
    longint mean_sum = 0;
    foreach (xt[i]) begin xt[i] = 0; yt[i] = 0; end
    foreach (cst[i]) cst[i] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // Random streams, then modulated constants.
    for (int n = 0; n < NRAND + NCONST; n++) begin
      @(negedge clk);
      if (n == NRAND) begin use_sdm = 1; vx = 0.5; vy = -0.3; end
      if (!use_sdm) begin
        x_r = enc(int'($urandom_range(0, 2)) - 1);
        y_r = enc(int'($urandom_range(0, 2)) - 1);
      end
      #1;
      step_model(tri_val(x), tri_val(y), zexp);
      checks++;
      if (tri_val(z) != zexp || z == 2'b10) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d z=%b expected %0d", n, z, zexp);
      end
      out_sum += tri_val(z);
      if (n >= NRAND + 1000) mean_sum += tri_val(z);
    end
    checks++;
    if (leaf_sum - N * out_sum > 85 || N * out_sum - leaf_sum > 85) begin
      failures++;
      $display("FAIL windowed-product identity: 16*%0d vs %0d", out_sum, leaf_sum);
    end
    begin
      real m;
      m = real'(mean_sum) / real'(NCONST - 1000);
      checks++;
      if (m < -0.17 || m > -0.13) begin
        failures++;
        $display("FAIL mean product %f, expected -0.15", m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NRAND + NCONST + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
