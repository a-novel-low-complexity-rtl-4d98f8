// clg: candidate list generator.  For the hard-decided point (zh_re, zh_im)
// of one symbol it lists the NC alternative constellation points browsed by
// the post-detection processor: the nearest grid neighbours (offsets from
// mimo_pkg::cand_dre/cand_dim, spacing 2) and a flag telling whether each
// lies inside the Q-QAM constellation.  A candidate outside it is reported
// with cand_ok = 0 and must not be chosen downstream.  Combinational.
// The document names the block; the neighbour rule is this design's choice.
module clg
  import mimo_pkg::*;
#(
  parameter int unsigned Q   = DEF_Q,
  parameter int unsigned NC  = DEF_NC,
  parameter int unsigned PTW = pt_width(Q)
) (
  input  logic signed [PTW-1:0] zh_re,
  input  logic signed [PTW-1:0] zh_im,
  output logic signed [PTW-1:0] cand_re [NC],
  output logic signed [PTW-1:0] cand_im [NC],
  output logic                  cand_ok [NC]
);

  localparam int LMAX = int'(qam_levels(Q)) - 1;

  always_comb begin
    for (int k = 0; k < int'(NC); k++) begin
      int cr, ci;
      cr = int'(zh_re) + cand_dre(k);
      ci = int'(zh_im) + cand_dim(k);
      cand_ok[k] = (cr >= -LMAX) && (cr <= LMAX) && (ci >= -LMAX) && (ci <= LMAX);
      cand_re[k] = cand_ok[k] ? PTW'(cr) : zh_re;
      cand_im[k] = cand_ok[k] ? PTW'(ci) : zh_im;
    end
  end

endmodule
