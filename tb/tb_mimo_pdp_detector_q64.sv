// tb_mimo_pdp_detector_q64: the end-to-end test of tb_mimo_pdp_detector run
// for 64-QAM with a block of P = 8 symbols (8 candidates, 2 selected).
//
// Each block draws a diagonally dominant random effective channel Heff,
// random 64-QAM symbols s, y = Heff*s + noise, and soft MMSE-like estimates
// z = s + noise, noisy enough that some hard decisions are wrong.  The
// expected outputs are computed here by brute force: every candidate
// distance is ||y - Heff*z'||_1 over the whole modified vector z', not the
// incremental residual form the hardware uses.  Blocks are sent back to back
// and with random gaps.  Checked: every output symbol, the replaced flags,
// MD_init, the latency (P+6 = 14 clocks from the last row to out_valid) and the
// block spacing of P clocks for back-to-back input.  Counted mechanisms:
// replacement, block without replacement, wrong hard decision corrected,
// candidate outside the constellation, Map clipping, back-to-back blocks and
// input gaps; each must occur at least once.
module tb_mimo_pdp_detector_q64;
  import mimo_pkg::*;

  localparam int P     = 8;
  localparam int Q     = 64;
  localparam int HW    = DEF_HW;
  localparam int YW    = DEF_YW;
  localparam int ZW    = DEF_ZW;
  localparam int ZFRAC = DEF_ZFRAC;
  localparam int NC    = DEF_NC;
  localparam int NS    = DEF_NS;
  localparam int PTW   = pt_width(Q);
  localparam int EW    = ((HW + PTW > YW) ? HW + PTW : YW) + $clog2(P) + 2;
  localparam int MDW   = EW + 4 + $clog2(P);
  localparam int L     = qam_levels(Q);
  localparam int NBLK  = 60;
  localparam int LAT   = P + 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                  in_valid;
  logic signed [HW-1:0]  h_re [P], h_im [P];
  logic signed [YW-1:0]  y_re, y_im;
  logic signed [ZW-1:0]  z_re [P], z_im [P];
  logic                  out_valid;
  logic signed [PTW-1:0] o_re [P], o_im [P];
  logic                  o_replaced [P];
  logic        [MDW-1:0] o_md_init;

  mimo_pdp_detector #(.P(P), .Q(Q)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // stimulus and expected values per block
  int hr [NBLK][P][P], hi [NBLK][P][P];
  int yr [NBLK][P], yi [NBLK][P];
  int zr [NBLK][P], zi [NBLK][P];
  int sr [NBLK][P], si [NBLK][P];
  int xr [NBLK][P], xi [NBLK][P];      // expected outputs
  bit xrep [NBLK][P];
  longint xmdi [NBLK];
  int last_cyc [NBLK];

  // counters of mechanisms
  int n_repl = 0, n_norepl = 0, n_fix = 0, n_edge = 0, n_clip = 0, n_b2b = 0, n_gap = 0;

  function automatic int rnd(int lo, int hi_);
    return lo + int'($urandom % (hi_ - lo + 1));
  endfunction

  function automatic int fdiv(int a, int b);   // floor division, b > 0
    int q;
    q = a / b;
    if ((a % b) != 0 && a < 0) q = q - 1;
    return q;
  endfunction

  function automatic int slice(int v);
    int pt;
    pt = 2 * fdiv(v, 2 << ZFRAC) + 1;
    if (pt > L - 1) pt = L - 1;
    if (pt < -(L - 1)) pt = -(L - 1);
    return pt;
  endfunction

  function automatic int iabs(int v);
    return v < 0 ? -v : v;
  endfunction

  // ||y - H v||_1 for block b and candidate vector (vr, vi)
  function automatic longint l1dist(int b, int vr[P], int vi[P]);
    longint d = 0;
    for (int t = 0; t < P; t++) begin
      int ar, ai;
      ar = yr[b][t];
      ai = yi[b][t];
      for (int j = 0; j < P; j++) begin
        ar -= hr[b][t][j] * vr[j] - hi[b][t][j] * vi[j];
        ai -= hr[b][t][j] * vi[j] + hi[b][t][j] * vr[j];
      end
      d += iabs(ar) + iabs(ai);
    end
    return d;
  endfunction

  task automatic make_block(int b);
    int zhr[P], zhi[P], vr[P], vi[P];
    longint best[P], mdi;
    int bestr[P], besti[P];
    int order[P];
    for (int p = 0; p < P; p++) begin
      sr[b][p] = 2 * rnd(0, L - 1) - (L - 1);
      si[b][p] = 2 * rnd(0, L - 1) - (L - 1);
    end
    for (int t = 0; t < P; t++)
      for (int j = 0; j < P; j++) begin
        if (t == j) begin
          hr[b][t][j] = rnd(60, 160) * ((rnd(0, 1) == 1) ? 1 : -1);
          hi[b][t][j] = rnd(-60, 60);
        end else begin
          hr[b][t][j] = rnd(-25, 25);
          hi[b][t][j] = rnd(-25, 25);
        end
      end
    for (int t = 0; t < P; t++) begin
      yr[b][t] = rnd(-30, 30);
      yi[b][t] = rnd(-30, 30);
      for (int j = 0; j < P; j++) begin
        yr[b][t] += hr[b][t][j] * sr[b][j] - hi[b][t][j] * si[b][j];
        yi[b][t] += hr[b][t][j] * si[b][j] + hi[b][t][j] * sr[b][j];
      end
    end
    for (int p = 0; p < P; p++) begin
      // every fourth block has clean estimates, so nothing should change
      zr[b][p] = sr[b][p] * (1 << ZFRAC) + ((b % 4 == 3) ? rnd(-6, 6) : rnd(-22, 22));
      zi[b][p] = si[b][p] * (1 << ZFRAC) + ((b % 4 == 3) ? rnd(-6, 6) : rnd(-22, 22));
      if (p == 0 && (b % 4) == 1) zr[b][p] = 200;   // beyond the outer level
      zhr[p] = slice(zr[b][p]);
      zhi[p] = slice(zi[b][p]);
      if (zr[b][p] >= (L << ZFRAC) || zr[b][p] < -(L << ZFRAC) ||
          zi[b][p] >= (L << ZFRAC) || zi[b][p] < -(L << ZFRAC)) n_clip++;
    end
    mdi = l1dist(b, zhr, zhi);
    xmdi[b] = mdi;
    // best neighbour of each symbol, by brute-force distance
    for (int p = 0; p < P; p++) begin
      best[p] = -1;
      for (int k = 0; k < NC; k++) begin
        int cr, ci;
        cr = zhr[p] + cand_dre(k);
        ci = zhi[p] + cand_dim(k);
        if (cr > L - 1 || cr < -(L - 1) || ci > L - 1 || ci < -(L - 1)) begin
          n_edge++;
          continue;
        end
        vr = zhr; vi = zhi;
        vr[p] = cr; vi[p] = ci;
        begin
          longint d;
          d = l1dist(b, vr, vi);
          if (best[p] < 0 || d < best[p]) begin
            best[p] = d; bestr[p] = cr; besti[p] = ci;
          end
        end
      end
    end
    // stable selection of the NS smallest
    for (int p = 0; p < P; p++) order[p] = p;
    for (int i = 0; i < P; i++)
      for (int j = 0; j < P - 1 - i; j++)
        if (best[order[j + 1]] < best[order[j]]) begin
          int tmp;
          tmp = order[j]; order[j] = order[j + 1]; order[j + 1] = tmp;
        end
    for (int p = 0; p < P; p++) begin
      xr[b][p] = zhr[p]; xi[b][p] = zhi[p]; xrep[b][p] = 1'b0;
    end
    for (int i = 0; i < NS; i++) begin
      int p;
      p = order[i];
      if (best[p] < mdi) begin
        xr[b][p] = bestr[p]; xi[b][p] = besti[p]; xrep[b][p] = 1'b1;
      end
    end
  endtask

  // ------------------------------------------------------------ driver
  initial begin
    in_valid = 1'b0;
    y_re = '0; y_im = '0;
    for (int p = 0; p < P; p++) begin
      h_re[p] = '0; h_im[p] = '0; z_re[p] = '0; z_im[p] = '0;
    end
    for (int b = 0; b < NBLK; b++) make_block(b);
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int b = 0; b < NBLK; b++) begin
      bit gappy;
      gappy = (b % 3) == 2;
      for (int t = 0; t < P; t++) begin
        @(negedge clk);
        in_valid = 1'b1;
        for (int j = 0; j < P; j++) begin
          h_re[j] = HW'(hr[b][t][j]);
          h_im[j] = HW'(hi[b][t][j]);
          // z is only sampled with row 0; scramble it elsewhere
          z_re[j] = (t == 0) ? ZW'(zr[b][j]) : ZW'($urandom);
          z_im[j] = (t == 0) ? ZW'(zi[b][j]) : ZW'($urandom);
        end
        y_re = YW'(yr[b][t]);
        y_im = YW'(yi[b][t]);
        @(posedge clk);
        if (t == P - 1) last_cyc[b] = cyc;
        if (gappy && t < P - 1 && rnd(0, 3) == 0) begin
          @(negedge clk);
          in_valid = 1'b0;
          n_gap++;
          @(posedge clk);
        end
      end
      if (b % 3 == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
        repeat (rnd(1, 5)) @(posedge clk);
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
  end

  // ------------------------------------------------------------ monitor
  int ob = 0;
  int prev_out = -1;
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int nrep;
      nrep = 0;
      if (ob >= NBLK) begin
        failures++;
        $display("unexpected output block");
      end else begin
        checks++;
        if (cyc - 1 - last_cyc[ob] != LAT) begin
          failures++;
          $display("block %0d: latency %0d, expected %0d", ob, cyc - 1 - last_cyc[ob], LAT);
        end
        if (ob > 0 && last_cyc[ob] - last_cyc[ob - 1] == P) begin
          n_b2b++;
          checks++;
          if (cyc - prev_out != P) begin
            failures++;
            $display("block %0d: spacing %0d, expected %0d", ob, cyc - prev_out, P);
          end
        end
        checks++;
        if (longint'(o_md_init) != xmdi[ob]) begin
          failures++;
          $display("block %0d: md_init %0d, expected %0d", ob, o_md_init, xmdi[ob]);
        end
        for (int p = 0; p < P; p++) begin
          checks++;
          if (int'(o_re[p]) != xr[ob][p] || int'(o_im[p]) != xi[ob][p] || o_replaced[p] != xrep[ob][p]) begin
            failures++;
            $display("block %0d sym %0d: got (%0d,%0d,%0b) expected (%0d,%0d,%0b)", ob, p,
                     o_re[p], o_im[p], o_replaced[p], xr[ob][p], xi[ob][p], xrep[ob][p]);
          end
          if (o_replaced[p]) begin
            nrep++;
            if (int'(o_re[p]) == sr[ob][p] && int'(o_im[p]) == si[ob][p]) n_fix++;
          end
        end
        if (nrep > 0) n_repl++;
        else          n_norepl++;
      end
      prev_out = cyc;
      ob++;
    end
  end

  task automatic need(string what, int n);
    checks++;
    $display("  %-28s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    wait (ob == NBLK);
    repeat (5) @(posedge clk);
    $display("mechanisms:");
    need("blocks with replacement", n_repl);
    need("blocks without replacement", n_norepl);
    need("wrong decisions corrected", n_fix);
    need("candidates off constellation", n_edge);
    need("map clipping", n_clip);
    need("back-to-back blocks", n_b2b);
    need("input gaps", n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NBLK * (P + 16) + 400) @(posedge clk);
    failures++;
    $display("watchdog: %0d of %0d blocks seen", ob, NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
