// mimo_pkg: constants and helper functions shared by the SC-FDMA MIMO
// post-detection processing (PDP) datapath.
//
// Number format used throughout: constellation points are the odd integers of
// an unnormalised square QAM grid (-(L-1) .. L-1 per axis, L = sqrt(Q)), so a
// received sample is y = sum_j Heff[t][j]*s_j + w with Heff and y in plain
// signed fixed-point integers.  Candidate points browsed for a symbol are its
// nearest neighbours on that grid: four along the axes and, when NC is 8,
// the four diagonal ones.  The grid spacing is 2, so every offset component
// is -2, 0 or +2 and the product Heff*offset needs no multiplier.
package mimo_pkg;

  // Default sizes.  The block length P is the number of symbols detected
  // together: M (DFT length) times Mt (transmit antennas).
  localparam int unsigned DEF_M     = 12;  // one LTE resource block of sub-carriers
  localparam int unsigned DEF_MT    = 2;   // transmit antennas (layers)
  localparam int unsigned DEF_P     = DEF_M * DEF_MT;
  localparam int unsigned DEF_Q     = 16;  // QAM order
  localparam int unsigned DEF_HW    = 12;  // bits of Re/Im of one Heff element
  localparam int unsigned DEF_YW    = 16;  // bits of Re/Im of one Y element
  localparam int unsigned DEF_ZW    = 10;  // bits of Re/Im of one soft MMSE output
  localparam int unsigned DEF_ZFRAC = 4;   // fractional bits of the soft MMSE output
  localparam int unsigned DEF_NC    = 8;   // candidates browsed per symbol
  localparam int unsigned DEF_NS    = 2;   // symbols selected as erroneous per block

  // Points per axis of a square Q-QAM constellation.
  function automatic int unsigned qam_levels(input int unsigned q);
    int unsigned l;
    l = 1;
    while (l * l < q) l = l + 1;
    return l;
  endfunction

  // Bits of a signed point coordinate, -(L-1) .. L-1.
  function automatic int unsigned pt_width(input int unsigned q);
    return $clog2(qam_levels(q)) + 1;
  endfunction

  // Offset (in grid units of 2) from a symbol's point to candidate k:
  // k = 0..3 axis neighbours (+re, -re, +im, -im), k = 4..7 diagonals.
  function automatic int cand_dre(input int unsigned k);
    case (k)
      0, 4, 5: return  2;
      1, 6, 7: return -2;
      default: return  0;
    endcase
  endfunction

  function automatic int cand_dim(input int unsigned k);
    case (k)
      2, 4, 6: return  2;
      3, 5, 7: return -2;
      default: return  0;
    endcase
  endfunction

endpackage
