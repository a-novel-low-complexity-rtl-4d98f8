// tb_md_init_acc: random blocks of P = 5 residuals with gaps into the
// MD_init accumulator; the expected sum of |Re e| + |Im e| is worked out
// here.  Checks md_init and that md_done pulses one clock after each last
// row, and only then.
module tb_md_init_acc;
  localparam int P = 5, EW = 22;
  localparam int MDW = EW + 4 + $clog2(P);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_first, in_last, md_done;
  logic signed [EW-1:0] e_re, e_im;
  logic [MDW-1:0] md_init;

  md_init_acc #(.P(P), .EW(EW)) dut (.*);

  int checks = 0, failures = 0;
  longint acc;

  initial begin
    in_valid = 0; in_first = 0; in_last = 0; e_re = 0; e_im = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 80; b++)
      for (int t = 0; t < P; t++) begin
        @(negedge clk);
        in_valid = 1; in_first = (t == 0); in_last = (t == P - 1);
        e_re = EW'($urandom); e_im = EW'($urandom);
        if (t == 0) acc = 0;
        acc += (e_re < 0 ? -longint'(e_re) : longint'(e_re)) + (e_im < 0 ? -longint'(e_im) : longint'(e_im));
        @(posedge clk);
        #1;
        in_valid = 0;
        checks++;
        if (md_done != (t == P - 1) || (t == P - 1 && longint'(md_init) != acc)) begin
          failures++;
          $display("block %0d row %0d: done %0b md_init %0d expected %0d", b, t, md_done, md_init, acc);
        end
        if ($urandom % 4 == 0) begin
          @(posedge clk);
          #1;
          checks++;
          if (md_done) begin
            failures++;
            $display("md_done during a gap");
          end
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
