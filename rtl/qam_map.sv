// qam_map: the "Map" slicer of the post-detection processor.  It maps one
// soft MMSE estimate z (Re and Im in ZW-bit two's complement with ZFRAC
// fractional bits) to the nearest point of the square Q-QAM grid whose
// coordinates are the odd integers -(L-1) .. L-1.
//
// Per axis: k = floor(z / 2) is an arithmetic shift by ZFRAC+1, the point is
// 2k+1, and it is clipped to the outermost level.  Purely combinational.
// The document names this block only; the rounding rule is this design's.
module qam_map
  import mimo_pkg::*;
#(
  parameter int unsigned Q     = DEF_Q,
  parameter int unsigned ZW    = DEF_ZW,
  parameter int unsigned ZFRAC = DEF_ZFRAC,
  parameter int unsigned PTW   = pt_width(Q)
) (
  input  logic signed [ZW-1:0]  z_re,
  input  logic signed [ZW-1:0]  z_im,
  output logic signed [PTW-1:0] pt_re,
  output logic signed [PTW-1:0] pt_im
);

  localparam int LMAX = int'(qam_levels(Q)) - 1;

  function automatic logic signed [PTW-1:0] slice(input logic signed [ZW-1:0] v);
    logic signed [ZW:0] k;
    logic signed [ZW+1:0] pt;
    k  = (ZW+1)'(v >>> (ZFRAC + 1));
    pt = (ZW+2)'(k) * 2 + 1;
    if (pt > (ZW+2)'(LMAX))       return PTW'(LMAX);
    else if (pt < -(ZW+2)'(LMAX)) return PTW'(-LMAX);
    else                 return PTW'(pt);
  endfunction

  always_comb begin
    pt_re = slice(z_re);
    pt_im = slice(z_im);
  end

endmodule
