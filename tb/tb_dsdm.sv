// tb_dsdm - digital sigma-delta modulator at the worked example size
// (K = 256, 9-bit input, 10-bit accumulator, threshold 64).
//
// Reference: integer model u' = u + x - K*q(u) with q from the top four
// accumulator bits (0001..0111 -> +1, 0000/1111 -> 0, 1000..1110 -> -1),
// compared cycle by cycle. Inputs: constants, a slow ramp across the whole
// range [-256, 255] and random values. The output mean must track x/K:
// |K*sum(y) - sum(x)| stays bounded. All three output levels must occur.
module tb_dsdm;
  import tbs_pkg::*;

  localparam int W = 9, K = 256;
  localparam int NCYC = 6000;

  logic clk = 0, rst_n = 0;
  logic signed [W-1:0] x = '0;
  tri_t y;
  int checks = 0, failures = 0;
  int u_ref = 0;
  longint sx = 0, sy = 0;
  int seen [3] = '{0, 0, 0};

  always #5 clk = ~clk;

  dsdm #(.W(W), .ALPHA(64)) dut (.clk(clk), .rst_n(rst_n), .x(x), .k(W'(K)), .y(y));

  function automatic int q_table(int u);
    logic [9:0] ub = 10'(u);
    case (ub[9:6])
      4'b0000, 4'b1111: return 0;
      4'b0001, 4'b0010, 4'b0011, 4'b0100, 4'b0101, 4'b0110, 4'b0111: return 1;
      default: return -1;
    endcase
  endfunction

  initial begin
    int xv, qexp;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < NCYC; n++) begin
      @(negedge clk);
      if (n < 1000)      xv = 100;
      else if (n < 2000) xv = -37;
      else if (n < 4000) xv = -256 + (n - 2000) * 511 / 2000;
      else               xv = int'($urandom_range(0, 511)) - 256;
      x = W'(xv);
      #1;
      qexp = q_table(u_ref);
      checks++;
      if (tri_val(y) != qexp || y == 2'b10) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d u=%0d y=%b expected %0d", n, u_ref, y, qexp);
      end
      seen[qexp + 1]++;
      sx += xv;
      sy += qexp;
      u_ref = u_ref + xv - K * qexp;
    end
    checks++;
    if (K * sy - sx > 2 * K || sx - K * sy > 2 * K) begin
      failures++;
      $display("FAIL mean tracking: K*sum(y)=%0d sum(x)=%0d", K * sy, sx);
    end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) begin
      failures++;
      $display("FAIL not all output levels seen");
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
