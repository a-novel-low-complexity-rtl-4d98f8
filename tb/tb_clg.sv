// tb_clg: applies every point of the 16-QAM and 64-QAM constellations and
// checks each of the eight neighbour candidates: an axis or diagonal step of
// 2, valid exactly when both coordinates stay within +-(L-1).  The offsets
// are written out here as a table, independently of the package functions.
module tb_clg;
  localparam int NC = 8;
  localparam int DRE [NC] = '{2, -2, 0, 0, 2, 2, -2, -2};
  localparam int DIM [NC] = '{0, 0, 2, -2, 2, -2, 2, -2};

  logic signed [2:0] a_re, a_im, ca_re [NC], ca_im [NC];
  logic signed [3:0] b_re, b_im, cb_re [NC], cb_im [NC];
  logic              ca_ok [NC], cb_ok [NC];

  clg #(.Q(16), .NC(NC)) u16 (.zh_re(a_re), .zh_im(a_im), .cand_re(ca_re), .cand_im(ca_im), .cand_ok(ca_ok));
  clg #(.Q(64), .NC(NC)) u64 (.zh_re(b_re), .zh_im(b_im), .cand_re(cb_re), .cand_im(cb_im), .cand_ok(cb_ok));

  int checks = 0, failures = 0, nvalid = 0, ninvalid = 0;

  task automatic check(int lmax, int pr, int pi, bit ok[NC], int cr[NC], int ci[NC]);
    for (int k = 0; k < NC; k++) begin
      int er, ei;
      bit eok;
      er = pr + DRE[k];
      ei = pi + DIM[k];
      eok = (er <= lmax && er >= -lmax && ei <= lmax && ei >= -lmax);
      checks++;
      if (eok) nvalid++; else ninvalid++;
      if (ok[k] != eok || (eok && (cr[k] != er || ci[k] != ei))) begin
        failures++;
        $display("L=%0d point (%0d,%0d) cand %0d: got %0b (%0d,%0d)", lmax + 1, pr, pi, k, ok[k], cr[k], ci[k]);
      end
    end
  endtask

  initial begin
    for (int r = -7; r <= 7; r += 2)
      for (int i = -7; i <= 7; i += 2) begin
        bit ok[NC];
        int cr[NC], ci[NC];
        b_re = 4'(r); b_im = 4'(i);
        a_re = 3'((r > 3) ? 3 : (r < -3) ? -3 : r);
        a_im = 3'((i > 3) ? 3 : (i < -3) ? -3 : i);
        #1;
        for (int k = 0; k < NC; k++) begin ok[k] = cb_ok[k]; cr[k] = int'(cb_re[k]); ci[k] = int'(cb_im[k]); end
        check(7, r, i, ok, cr, ci);
        for (int k = 0; k < NC; k++) begin ok[k] = ca_ok[k]; cr[k] = int'(ca_re[k]); ci[k] = int'(ca_im[k]); end
        check(3, int'(a_re), int'(a_im), ok, cr, ci);
      end
    checks++;
    if (nvalid == 0 || ninvalid == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
