// tb_residual_unit: streams random rows (P = 8, 16-QAM) with random valid
// gaps into the residual unit and checks, four clocks after each row is
// taken, e_t = y_t - sum_j Heff[t][j]*zhat_j computed here, the delayed
// Heff row and zhat, and the first/last tags.  Also checks that no output
// appears without an input four clocks earlier.
module tb_residual_unit;
  localparam int P = 8, HW = 12, YW = 16, PTW = 3;
  localparam int EW = ((HW + PTW > YW) ? HW + PTW : YW) + $clog2(P) + 2;
  localparam int LAT = 4;
  localparam int N = 400;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_first, in_last;
  logic signed [HW-1:0]  h_re [P], h_im [P], eh_re [P], eh_im [P];
  logic signed [YW-1:0]  y_re, y_im;
  logic signed [PTW-1:0] zh_re [P], zh_im [P], ezh_re [P], ezh_im [P];
  logic e_valid, e_first, e_last;
  logic signed [EW-1:0]  e_re, e_im;

  residual_unit #(.P(P), .Q(16), .HW(HW), .YW(YW), .PTW(PTW)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  // expected values, indexed by the cycle the row was taken
  int xe_re [N * 2 + 20], xe_im [N * 2 + 20], xh0 [N * 2 + 20], xz0 [N * 2 + 20];
  bit xv [N * 2 + 20], xf [N * 2 + 20], xl [N * 2 + 20];

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; y_re = 0; y_im = 0;
    for (int j = 0; j < P; j++) begin h_re[j] = 0; h_im[j] = 0; zh_re[j] = 1; zh_im[j] = 1; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      int sr, si;
      @(negedge clk);
      in_valid = ($urandom % 4 != 0);
      in_first = $urandom % 2;
      in_last  = $urandom % 2;
      y_re = YW'($urandom % 20000) - YW'(10000);
      y_im = YW'($urandom % 20000) - YW'(10000);
      sr = int'(y_re); si = int'(y_im);
      for (int j = 0; j < P; j++) begin
        h_re[j]  = HW'($urandom);
        h_im[j]  = HW'($urandom);
        zh_re[j] = PTW'(2 * int'($urandom % 4) - 3);
        zh_im[j] = PTW'(2 * int'($urandom % 4) - 3);
        sr -= int'(h_re[j]) * int'(zh_re[j]) - int'(h_im[j]) * int'(zh_im[j]);
        si -= int'(h_re[j]) * int'(zh_im[j]) + int'(h_im[j]) * int'(zh_re[j]);
      end
      xv[cyc + 1] = in_valid; xf[cyc + 1] = in_first; xl[cyc + 1] = in_last;
      xe_re[cyc + 1] = sr; xe_im[cyc + 1] = si;
      xh0[cyc + 1] = int'(h_re[P - 1]); xz0[cyc + 1] = int'(zh_im[0]);
    end
    @(negedge clk);
    in_valid = 0;
    repeat (LAT + 2) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && cyc > LAT + 1) begin
      int c;
      c = cyc - LAT + 1;   // cycle at which the row now at the output was taken
      checks++;
      if (e_valid != xv[c]) begin
        failures++;
        $display("cyc %0d: e_valid %0b expected %0b", cyc, e_valid, xv[c]);
      end else if (e_valid) begin
        checks++;
        if (int'(e_re) != xe_re[c] || int'(e_im) != xe_im[c] || e_first != xf[c] || e_last != xl[c] ||
            int'(eh_re[P - 1]) != xh0[c] || int'(ezh_im[0]) != xz0[c]) begin
          failures++;
          $display("cyc %0d: e=(%0d,%0d) expected (%0d,%0d)", cyc, e_re, e_im, xe_re[c], xe_im[c]);
        end
      end
    end
  end

  initial begin
    repeat (N + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
