// pmd: partial Manhattan distance unit for one symbol p.  For every
// candidate point c_k = zhat_p + delta_k browsed for the symbol it
// accumulates, over the P rows of the block,
//     MD_k = sum_t |Re(r)| + |Im(r)|,  r = e_t + Heff[t][p] * (zhat_p - c_k)
//          = e_t - Heff[t][p] * delta_k
// i.e. the Manhattan distance ||Y - Heff*z'||_1 of the estimate in which
// only symbol p is changed to c_k.  delta_k has components in {-2,0,+2}, so
// Heff*delta_k is formed with shifts and adds only.
//
// Timing: one row per clock on in_valid; in_first restarts the sums.  The
// clock after the in_last row has been added, md_done pulses for one cycle
// and md[] holds the complete distances until the next in_first row.
// The document gives the block's role (distance metrics of the candidates of
// each symbol, Manhattan norm); the candidate offsets are this design's.
module pmd
  import mimo_pkg::*;
#(
  parameter int unsigned P   = DEF_P,
  parameter int unsigned NC  = DEF_NC,
  parameter int unsigned HW  = DEF_HW,
  parameter int unsigned EW  = 24,
  parameter int unsigned MDW = EW + 4 + $clog2(P)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic                  in_last,
  input  logic signed [EW-1:0]  e_re,
  input  logic signed [EW-1:0]  e_im,
  input  logic signed [HW-1:0]  h_re,
  input  logic signed [HW-1:0]  h_im,
  output logic                  md_done,
  output logic        [MDW-1:0] md [NC]
);

  localparam int unsigned TW = EW + 3;   // e_t + Heff*offset

  logic [MDW-1:0] term [NC];

  always_comb begin
    for (int k = 0; k < int'(NC); k++) begin
      logic signed [TW-1:0] r_re, r_im;
      logic        [TW-1:0] a_re, a_im;
      r_re = TW'(e_re) - TW'(cand_dre(k)) * TW'(h_re) + TW'(cand_dim(k)) * TW'(h_im);
      r_im = TW'(e_im) - TW'(cand_dre(k)) * TW'(h_im) - TW'(cand_dim(k)) * TW'(h_re);
      a_re = (r_re < 0) ? TW'(-r_re) : TW'(r_re);
      a_im = (r_im < 0) ? TW'(-r_im) : TW'(r_im);
      term[k] = MDW'(a_re) + MDW'(a_im);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) md_done <= 1'b0;
    else        md_done <= in_valid && in_last;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int k = 0; k < int'(NC); k++)
        md[k] <= in_first ? term[k] : md[k] + term[k];
    end
  end

endmodule
