// tb_bs_nco - bit-stream NCO at the example size (A = 75, K0 = 79, DK = 4).
//
// For each control value c = 0, +1, -1 held for a stretch of cycles, the
// oscillation period is measured from the rising zero crossings of the
// cosine counter and compared with 2*pi*K, K = K0 - DK*c (within 2 %).
// Also checked: the sine counter is at its negative peak when the cosine
// counter crosses zero upwards (quadrature, sine lagging cosine by a quarter
// period), and the cosine counter reaches its limit A.
module tb_bs_nco;
  import tbs_pkg::*;

  localparam int A = 75, K0 = 79, DK = 4;
  localparam int NSEG = 24000, NSKIP = 3000;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  tri_t c = TRI_ZERO, qc, qs;
  logic signed [7:0] wc, ws;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  bs_nco #(.W(8), .A(A), .K0(K0), .DK(DK), .ALPHA(16)) dut (
    .clk(clk), .rst_n(rst_n), .c(c), .qc(qc), .qs(qs), .wc(wc), .ws(ws)
  );

  task automatic run_segment(int cv, output real period);
    int first = -1, last = -1, ncross = 0, prev_wc = 0, max_wc = 0;
    c = cv > 0 ? TRI_POS : (cv < 0 ? TRI_NEG : TRI_ZERO);
    for (int n = 0; n < NSEG; n++) begin
      @(negedge clk);
      if (n >= NSKIP) begin
        if (prev_wc < 0 && wc >= 0) begin
          if (first < 0) first = n;
          last = n;
          ncross++;
          checks++;
          if (ws > -(A * 8 / 10)) begin
            failures++;
            if (failures < 10) $display("FAIL c=%0d quadrature: ws=%0d at cosine up-crossing", cv, ws);
          end
        end
        if (wc > max_wc) max_wc = wc;
      end
      prev_wc = wc;
    end
    period = real'(last - first) / real'(ncross - 1);
    checks++;
    if (max_wc != A) begin
      failures++;
      $display("FAIL c=%0d counter peak %0d, expected limit %0d", cv, max_wc, A);
    end
  endtask

  initial begin
    real per, expv;
    int kv [3] = '{0, 1, -1};
    real pers [3];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int s = 0; s < 3; s++) begin
      run_segment(kv[s], per);
      pers[s] = per;
      expv = 2.0 * PI * real'(K0 - DK * kv[s]);
      checks++;
      if (per < expv * 0.98 || per > expv * 1.02) begin
        failures++;
        $display("FAIL c=%0d period %f, expected %f", kv[s], per, expv);
      end
      $display("c=%0d period %f (2*pi*K = %f)", kv[s], per, expv);
    end
    checks++;
    if (!(pers[1] < pers[0] && pers[0] < pers[2])) begin
      failures++;
      $display("FAIL frequency does not rise with the control");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3 * NSEG + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
