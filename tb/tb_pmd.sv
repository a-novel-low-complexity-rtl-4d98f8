// tb_pmd: feeds blocks of P = 6 rows (residual e_t and the symbol's Heff
// element) with random gaps, back to back and with a block that restarts
// early, into one PMD unit with 8 candidates.  Expected distances are
// worked out here as sum_t |Re r| + |Im r| with r = e_t - h_t * delta_k,
// delta_k written out as complex numbers.  Checks md[] and that md_done
// pulses exactly one clock after each last row.
module tb_pmd;
  localparam int P = 6, NC = 8, HW = 12, EW = 20;
  localparam int MDW = EW + 4 + $clog2(P);
  localparam int DRE [NC] = '{2, -2, 0, 0, 2, 2, -2, -2};
  localparam int DIM [NC] = '{0, 0, 2, -2, 2, -2, 2, -2};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_first, in_last, md_done;
  logic signed [EW-1:0] e_re, e_im;
  logic signed [HW-1:0] h_re, h_im;
  logic [MDW-1:0] md [NC];

  pmd #(.P(P), .NC(NC), .HW(HW), .EW(EW)) dut (.*);

  int checks = 0, failures = 0, nblk = 0;
  longint acc [NC];
  bit expect_done = 0;

  task automatic row(bit first, bit last);
    @(negedge clk);
    in_valid = 1; in_first = first; in_last = last;
    e_re = EW'(int'($urandom % 400000) - 200000);
    e_im = EW'(int'($urandom % 400000) - 200000);
    h_re = HW'($urandom);
    h_im = HW'($urandom);
    for (int k = 0; k < NC; k++) begin
      longint rr, ri;
      rr = longint'(e_re) - (DRE[k] * longint'(h_re) - DIM[k] * longint'(h_im));
      ri = longint'(e_im) - (DRE[k] * longint'(h_im) + DIM[k] * longint'(h_re));
      if (first) acc[k] = 0;
      acc[k] += (rr < 0 ? -rr : rr) + (ri < 0 ? -ri : ri);
    end
    @(posedge clk);
    #1;
    in_valid = 0;
    checks++;
    if (md_done != last) begin
      failures++;
      $display("md_done %0b after row with last=%0b", md_done, last);
    end
    if (last) begin
      nblk++;
      for (int k = 0; k < NC; k++) begin
        checks++;
        if (longint'(md[k]) != acc[k]) begin
          failures++;
          $display("block %0d cand %0d: md %0d expected %0d", nblk, k, md[k], acc[k]);
        end
      end
    end
  endtask

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; e_re = 0; e_im = 0; h_re = 0; h_im = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 60; b++) begin
      int len;
      len = (b % 7 == 3) ? 3 : P;   // an early restart now and then
      for (int t = 0; t < len; t++) begin
        row(t == 0, t == P - 1);
        if (b % 2 == 1 && $urandom % 3 == 0) repeat (1 + $urandom % 3) @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
