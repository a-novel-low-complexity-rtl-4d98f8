// tb_qam_map: exhaustive test of the QAM slicer.  Every ZW-bit input value
// is applied to a 16-QAM and a 64-QAM instance, on Re and Im with different
// values, and the result is compared with the nearest odd level worked out
// here by rounding (z / 2^ZFRAC - 1) / 2 and clipping to the outer level.
module tb_qam_map;
  import mimo_pkg::*;

  localparam int ZW = DEF_ZW;
  localparam int ZF = DEF_ZFRAC;

  logic signed [ZW-1:0] zr, zi;
  logic signed [2:0] p16r, p16i;
  logic signed [3:0] p64r, p64i;

  qam_map #(.Q(16), .ZW(ZW), .ZFRAC(ZF)) u16 (.z_re(zr), .z_im(zi), .pt_re(p16r), .pt_im(p16i));
  qam_map #(.Q(64), .ZW(ZW), .ZFRAC(ZF)) u64 (.z_re(zr), .z_im(zi), .pt_re(p64r), .pt_im(p64i));

  int checks = 0, failures = 0;

  // nearest odd integer to v/2^ZF (ties upward), clipped to +-lmax
  function automatic int expect_pt(int v, int lmax);
    real x;
    int n;
    x = real'(v) / real'(1 << ZF);
    n = 2 * int'($floor((x - 1.0) / 2.0 + 0.5)) + 1;
    if (n > lmax) n = lmax;
    if (n < -lmax) n = -lmax;
    return n;
  endfunction

  initial begin
    for (int v = -(1 << (ZW - 1)); v < (1 << (ZW - 1)); v++) begin
      zr = ZW'(v);
      zi = ZW'(-v - 1);
      #1;
      checks++;
      if (int'(p16r) != expect_pt(v, 3) || int'(p16i) != expect_pt(-v - 1, 3) ||
          int'(p64r) != expect_pt(v, 7) || int'(p64i) != expect_pt(-v - 1, 7)) begin
        failures++;
        if (failures < 10)
          $display("z=%0d: got 16:%0d,%0d 64:%0d,%0d expected 16:%0d,%0d 64:%0d,%0d", v,
                   p16r, p16i, p64r, p64i, expect_pt(v, 3), expect_pt(-v - 1, 3),
                   expect_pt(v, 7), expect_pt(-v - 1, 7));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
