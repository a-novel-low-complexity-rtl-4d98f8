// crs: candidate replacement and selection, giving the detector outputs
// O1..OP.  Each symbol selected by the sorter as likely erroneous is
// replaced by its best candidate point when that candidate's distance is
// below MD_init, the distance of the unchanged estimate; every other
// symbol keeps its hard-decided MMSE value.  replaced[] flags the symbols
// that were changed.  Combinational.
// The document names the block and its outputs; the replacement rule
// (distance below MD_init) is this design's reading of it.
module crs
  import mimo_pkg::*;
#(
  parameter int unsigned P   = DEF_P,
  parameter int unsigned NS  = DEF_NS,
  parameter int unsigned MDW = 32,
  parameter int unsigned PTW = pt_width(DEF_Q),
  parameter int unsigned IW  = (P > 1) ? $clog2(P) : 1
) (
  input  logic signed [PTW-1:0] zh_re    [P],
  input  logic signed [PTW-1:0] zh_im    [P],
  input  logic        [MDW-1:0] md_init,
  input  logic                  sel_ok   [NS],
  input  logic        [MDW-1:0] sel_md   [NS],
  input  logic        [IW-1:0]  sel_idx  [NS],
  input  logic signed [PTW-1:0] sel_re   [NS],
  input  logic signed [PTW-1:0] sel_im   [NS],
  output logic signed [PTW-1:0] o_re     [P],
  output logic signed [PTW-1:0] o_im     [P],
  output logic                  replaced [P]
);

  always_comb begin
    for (int p = 0; p < int'(P); p++) begin
      o_re[p]     = zh_re[p];
      o_im[p]     = zh_im[p];
      replaced[p] = 1'b0;
    end
    for (int i = 0; i < int'(NS); i++) begin
      if (sel_ok[i] && sel_md[i] < md_init && int'(sel_idx[i]) < int'(P)) begin
        o_re[sel_idx[i]]     = sel_re[i];
        o_im[sel_idx[i]]     = sel_im[i];
        replaced[sel_idx[i]] = 1'b1;
      end
    end
  end

endmodule
