// tb_ep_sorter: streams blocks of P = 24 EP metrics (symbol index with each,
// one per clock, with occasional gaps) into a sorter keeping NS = 3, and
// compares the final list with a selection sort done here that keeps the
// lower symbol index first among equal metrics.  Small metric ranges force
// ties.  Checks the done pulse one clock after the last entry, and that
// the list spans P clocks per block, i.e. one comparator pass per entry.
module tb_ep_sorter;
  localparam int P = 24, NS = 3, MDW = 10, PTW = 3, IW = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_first, in_last, done;
  logic [MDW-1:0] in_md;
  logic [IW-1:0] in_idx;
  logic signed [PTW-1:0] in_re, in_im;
  logic sel_ok [NS];
  logic [MDW-1:0] sel_md [NS];
  logic [IW-1:0] sel_idx [NS];
  logic signed [PTW-1:0] sel_re [NS], sel_im [NS];

  ep_sorter #(.P(P), .NS(NS), .MDW(MDW), .PTW(PTW), .IW(IW)) dut (.*);

  int checks = 0, failures = 0, nties = 0;

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; in_md = 0; in_idx = 0; in_re = 0; in_im = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 200; b++) begin
      int m[P], r[P], taken[P];
      int range;
      range = (b % 3 == 0) ? 6 : 1000;
      for (int t = 0; t < P; t++) begin
        m[t] = int'($urandom % range);
        r[t] = 2 * int'($urandom % 4) - 3;
        taken[t] = 0;
        @(negedge clk);
        in_valid = 1; in_first = (t == 0); in_last = (t == P - 1);
        in_md = MDW'(m[t]); in_idx = IW'(t); in_re = PTW'(r[t]); in_im = PTW'(-r[t]);
        @(posedge clk);
        #1;
        in_valid = 0;
        checks++;
        if (done != (t == P - 1)) begin
          failures++;
          $display("block %0d entry %0d: done %0b", b, t, done);
        end
        if (b % 5 == 4 && t < P - 1 && $urandom % 4 == 0) @(posedge clk);
      end
      for (int i = 0; i < NS; i++) begin
        int bi;
        bi = -1;
        for (int t = 0; t < P; t++)
          if (!taken[t] && (bi < 0 || m[t] < m[bi])) bi = t;
        taken[bi] = 1;
        for (int t = 0; t < bi; t++) if (!taken[t] && m[t] == m[bi]) nties++;
        checks++;
        if (!sel_ok[i] || int'(sel_md[i]) != m[bi] || int'(sel_idx[i]) != bi ||
            int'(sel_re[i]) != r[bi] || int'(sel_im[i]) != -r[bi]) begin
          failures++;
          $display("block %0d place %0d: got ok=%0b md=%0d idx=%0d, expected md=%0d idx=%0d", b, i,
                   sel_ok[i], sel_md[i], sel_idx[i], m[bi], bi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
