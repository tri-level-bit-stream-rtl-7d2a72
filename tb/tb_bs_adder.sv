// tb_bs_adder - bit-stream adder against an integer model.
//
// Reference: s = x + y + c (c = bit kept from the previous cycle),
// z = floor(s/2), c' = s mod 2. Random tri-level inputs, with stretches of
// constant inputs; also checks the running-sum identity
// 2*sum(z) = sum(x) + sum(y) - c_last (from a cleared start).
module tb_bs_adder;
  import tbs_pkg::*;

  localparam int NCYC = 5000;

  logic clk = 0, rst_n = 0;
  tri_t x = TRI_ZERO, y = TRI_ZERO, z;
  int   checks = 0, failures = 0;
  int   c_ref = 0;
  longint sum_in = 0, sum_out = 0;

  always #5 clk = ~clk;

  bs_adder dut (.clk(clk), .rst_n(rst_n), .x(x), .y(y), .z(z));

  function automatic tri_t enc(int v);
    return v > 0 ? TRI_POS : (v < 0 ? TRI_NEG : TRI_ZERO);
  endfunction

  function automatic int rnd_tri();
    return int'($urandom_range(0, 2)) - 1;
  endfunction

  initial begin
    int xv, yv, s, zexp;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      if ((n / 500) % 3 == 2) begin xv = 1; yv = (n / 1000) % 2 ? -1 : 0; end
      else begin xv = rnd_tri(); yv = rnd_tri(); end
      x = enc(xv); y = enc(yv);
      #1;
      s    = xv + yv + c_ref;
      zexp = (s >= 0) ? s / 2 : -((-s + 1) / 2);
      checks++;
      if (tri_val(z) != zexp || z == 2'b10) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d x=%0d y=%0d c=%0d z=%b exp %0d", n, xv, yv, c_ref, z, zexp);
      end
      c_ref = s - 2 * zexp;
      sum_in  += xv + yv;
      sum_out += tri_val(z);
      @(posedge clk);
    end
    checks++;
    if (2 * sum_out != sum_in - c_ref) begin
      failures++;
      $display("FAIL running sum: 2*%0d vs %0d - %0d", sum_out, sum_in, c_ref);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCYC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
