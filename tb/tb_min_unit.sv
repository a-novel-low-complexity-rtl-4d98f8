// tb_min_unit: random distance vectors with random validity (including
// all-invalid and forced ties) into an 8-candidate Min block; the expected
// minimum, its point and min_ok are found here by a scan that keeps the
// first of equal values.
module tb_min_unit;
  localparam int NC  = 8;
  localparam int MDW = 16;
  localparam int PTW = 3;

  logic        [MDW-1:0] md [NC];
  logic                  ok [NC];
  logic signed [PTW-1:0] cr [NC], ci [NC];
  logic        [MDW-1:0] min_md;
  logic signed [PTW-1:0] min_re, min_im;
  logic                  min_ok;

  min_unit #(.NC(NC), .MDW(MDW), .PTW(PTW)) dut (
    .md, .cand_ok(ok), .cand_re(cr), .cand_im(ci), .min_md, .min_re, .min_im, .min_ok);

  int checks = 0, failures = 0;

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int bi;
      for (int k = 0; k < NC; k++) begin
        md[k] = MDW'($urandom % ((n % 2) ? 8 : 65536));   // small range: many ties
        ok[k] = (n % 50 == 7) ? 1'b0 : ($urandom % 4 != 0);
        cr[k] = PTW'(k - 3);
        ci[k] = PTW'(3 - k);
      end
      #1;
      bi = -1;
      for (int k = 0; k < NC; k++)
        if (ok[k] && (bi < 0 || md[k] < md[bi])) bi = k;
      checks++;
      if (bi < 0) begin
        if (min_ok !== 1'b0 || min_md != '1) begin
          failures++;
          $display("all invalid: got ok=%0b md=%0d", min_ok, min_md);
        end
      end else if (!min_ok || min_md != md[bi] || min_re != cr[bi] || min_im != ci[bi]) begin
        failures++;
        $display("n=%0d: got %0d (%0d,%0d) expected %0d (%0d,%0d)", n, min_md, min_re, min_im,
                 md[bi], cr[bi], ci[bi]);
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
