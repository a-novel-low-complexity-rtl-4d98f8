// min_unit: the "Min" block of one symbol.  Among the NC candidate
// distances md[] whose candidate lies inside the constellation (cand_ok) it
// returns the smallest, min_md (the symbol's EP metric), and the candidate
// point that gives it.  Ties go to the lower candidate index.  If no
// candidate is valid, min_md is all ones and min_ok is 0.  Combinational: a
// linear compare chain over NC entries.
module min_unit
  import mimo_pkg::*;
#(
  parameter int unsigned NC  = DEF_NC,
  parameter int unsigned MDW = 32,
  parameter int unsigned PTW = pt_width(DEF_Q)
) (
  input  logic        [MDW-1:0] md      [NC],
  input  logic                  cand_ok [NC],
  input  logic signed [PTW-1:0] cand_re [NC],
  input  logic signed [PTW-1:0] cand_im [NC],
  output logic        [MDW-1:0] min_md,
  output logic signed [PTW-1:0] min_re,
  output logic signed [PTW-1:0] min_im,
  output logic                  min_ok
);

  always_comb begin
    min_md = '1;
    min_re = '0;
    min_im = '0;
    min_ok = 1'b0;
    for (int k = 0; k < int'(NC); k++) begin
      if (cand_ok[k] && (!min_ok || md[k] < min_md)) begin
        min_md = md[k];
        min_re = cand_re[k];
        min_im = cand_im[k];
        min_ok = 1'b1;
      end
    end
  end

endmodule
