// mimo_pdp_detector: low-complexity post-detection processor for MIMO
// SC-FDMA.  A linear MMSE detector (outside this module) delivers soft
// estimates z of the P = M*Mt time-domain symbols of a block.  This module
// slices them to QAM points (zhat), measures how well zhat explains the
// received block Y through the effective channel Heff, and for every symbol
// measures the same fit with that one symbol moved to each of its NC
// neighbouring constellation points.  The per-symbol best alternative (the
// EP metric) says how likely the symbol is wrong; the NS symbols with the
// smallest EP metric are replaced by their best alternative when it fits Y
// better than zhat.  All fits are Manhattan (|Re|+|Im|) distances.
//
// Data flow (one block = P rows, one row per clock):
//   qam_map -> residual_unit (4 stages: e_t = y_t - Heff[t]*zhat)
//           -> P x pmd + md_init_acc (accumulate distances over P rows)
//           -> P x clg/min_unit (EP metric per symbol, loaded into a bank)
//           -> ep_sorter (scans the bank one symbol per clock, P clocks)
//           -> crs (replacement) -> output registers O1..OP
//
// Interface: on each in_valid clock, h_re/h_im carry row t of Heff and
// y_re/y_im element t of Y, t = 0..P-1 counted internally.  z_re/z_im (the
// MMSE soft outputs, ZFRAC fractional bits) are sampled with row 0.  There
// is no back-pressure: rows may come back to back, so one block is accepted
// every P clocks; gaps (in_valid low) are allowed anywhere.  out_valid pulses
// for one clock with o_re/o_im (odd-integer QAM coordinates), o_replaced
// and o_md_init; it rises P+6 clocks after the clock that took row P-1.
//
// The document gives the structure (mapping, complex multipliers and adder
// tree in 4 stages, PMD, Min, |Re|+|Im| accumulator, Sorter over P clocks,
// CRS) and the row-per-clock input schedule; the number formats, candidate
// set, NS and the replacement rule are this design's choices.
module mimo_pdp_detector
  import mimo_pkg::*;
#(
  parameter int unsigned P     = DEF_P,
  parameter int unsigned Q     = DEF_Q,
  parameter int unsigned HW    = DEF_HW,
  parameter int unsigned YW    = DEF_YW,
  parameter int unsigned ZW    = DEF_ZW,
  parameter int unsigned ZFRAC = DEF_ZFRAC,
  parameter int unsigned NC    = DEF_NC,
  parameter int unsigned NS    = DEF_NS,
  parameter int unsigned PTW   = pt_width(Q),
  parameter int unsigned EW    = ((HW + PTW > YW) ? HW + PTW : YW) + $clog2(P) + 2,
  parameter int unsigned MDW   = EW + 4 + $clog2(P),
  parameter int unsigned IW    = (P > 1) ? $clog2(P) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic signed [HW-1:0]  h_re       [P],
  input  logic signed [HW-1:0]  h_im       [P],
  input  logic signed [YW-1:0]  y_re,
  input  logic signed [YW-1:0]  y_im,
  input  logic signed [ZW-1:0]  z_re       [P],
  input  logic signed [ZW-1:0]  z_im       [P],
  output logic                  out_valid,
  output logic signed [PTW-1:0] o_re       [P],
  output logic signed [PTW-1:0] o_im       [P],
  output logic                  o_replaced [P],
  output logic        [MDW-1:0] o_md_init
);

  // ---------------------------------------------------------------- rows
  logic [IW-1:0] row_q;
  logic          row_first, row_last;
  assign row_first = (row_q == '0);
  assign row_last  = (int'(row_q) == int'(P) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        row_q <= '0;
    else if (in_valid) row_q <= row_last ? '0 : row_q + 1'b1;
  end

  // ---------------------------------------------------------------- Map
  logic signed [PTW-1:0] map_re [P], map_im [P];
  logic signed [PTW-1:0] zh_hold_re [P], zh_hold_im [P];
  logic signed [PTW-1:0] zh_re [P], zh_im [P];

  for (genvar p = 0; p < int'(P); p++) begin : g_map
    qam_map #(.Q(Q), .ZW(ZW), .ZFRAC(ZFRAC), .PTW(PTW)) u_map (
      .z_re(z_re[p]), .z_im(z_im[p]), .pt_re(map_re[p]), .pt_im(map_im[p])
    );
  end

  always_ff @(posedge clk) begin
    if (in_valid && row_first) begin
      zh_hold_re <= map_re;
      zh_hold_im <= map_im;
    end
  end

  always_comb begin
    for (int p = 0; p < int'(P); p++) begin
      zh_re[p] = row_first ? map_re[p] : zh_hold_re[p];
      zh_im[p] = row_first ? map_im[p] : zh_hold_im[p];
    end
  end

  // ---------------------------------------------------------------- residual
  logic                  e_valid, e_first, e_last;
  logic signed [EW-1:0]  e_re, e_im;
  logic signed [HW-1:0]  eh_re [P], eh_im [P];
  logic signed [PTW-1:0] ezh_re [P], ezh_im [P];

  residual_unit #(.P(P), .Q(Q), .HW(HW), .YW(YW), .PTW(PTW), .EW(EW)) u_res (
    .clk, .rst_n,
    .in_valid, .in_first(row_first), .in_last(row_last),
    .h_re, .h_im, .y_re, .y_im, .zh_re, .zh_im,
    .e_valid, .e_first, .e_last, .e_re, .e_im,
    .eh_re, .eh_im, .ezh_re, .ezh_im
  );

  // ---------------------------------------------------------------- distances
  logic           md_done;
  logic           pmd_done [P];
  logic [MDW-1:0] md [P][NC];
  logic [MDW-1:0] md_init;

  for (genvar p = 0; p < int'(P); p++) begin : g_pmd
    pmd #(.P(P), .NC(NC), .HW(HW), .EW(EW), .MDW(MDW)) u_pmd (
      .clk, .rst_n,
      .in_valid(e_valid), .in_first(e_first), .in_last(e_last),
      .e_re, .e_im, .h_re(eh_re[p]), .h_im(eh_im[p]),
      .md_done(pmd_done[p]), .md(md[p])
    );
  end

  md_init_acc #(.P(P), .EW(EW), .MDW(MDW)) u_mdi (
    .clk, .rst_n,
    .in_valid(e_valid), .in_first(e_first), .in_last(e_last),
    .e_re, .e_im, .md_done, .md_init
  );

  // zhat of the block whose distances are being accumulated
  logic signed [PTW-1:0] zp_re [P], zp_im [P];
  always_ff @(posedge clk) begin
    if (e_valid && e_first) begin
      zp_re <= ezh_re;
      zp_im <= ezh_im;
    end
  end

  // ---------------------------------------------------------------- CLG + Min
  logic signed [PTW-1:0] cand_re [P][NC], cand_im [P][NC];
  logic                  cand_ok [P][NC];
  logic        [MDW-1:0] ep_md [P];
  logic signed [PTW-1:0] ep_re [P], ep_im [P];
  logic                  ep_ok [P];

  for (genvar p = 0; p < int'(P); p++) begin : g_min
    clg #(.Q(Q), .NC(NC), .PTW(PTW)) u_clg (
      .zh_re(zp_re[p]), .zh_im(zp_im[p]),
      .cand_re(cand_re[p]), .cand_im(cand_im[p]), .cand_ok(cand_ok[p])
    );
    min_unit #(.NC(NC), .MDW(MDW), .PTW(PTW)) u_min (
      .md(md[p]), .cand_ok(cand_ok[p]), .cand_re(cand_re[p]), .cand_im(cand_im[p]),
      .min_md(ep_md[p]), .min_re(ep_re[p]), .min_im(ep_im[p]), .min_ok(ep_ok[p])
    );
  end

  // EP bank: one block's metrics, read by the sorter over the next P clocks
  logic        [MDW-1:0] bk_md [P];
  logic signed [PTW-1:0] bk_re [P], bk_im [P];
  logic signed [PTW-1:0] bk_zr [P], bk_zi [P];
  logic        [MDW-1:0] bk_mdi;

  always_ff @(posedge clk) begin
    if (md_done) begin
      for (int p = 0; p < int'(P); p++) bk_md[p] <= ep_ok[p] ? ep_md[p] : '1;
      bk_re  <= ep_re;
      bk_im  <= ep_im;
      bk_zr  <= zp_re;
      bk_zi  <= zp_im;
      bk_mdi <= md_init;
    end
  end

  // ---------------------------------------------------------------- Sorter
  logic          scan_q;
  logic [IW-1:0] sidx_q;
  logic          scan_last;
  assign scan_last = (int'(sidx_q) == int'(P) - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_q <= 1'b0;
      sidx_q <= '0;
    end else if (md_done) begin
      scan_q <= 1'b1;
      sidx_q <= '0;
    end else if (scan_q) begin
      scan_q <= !scan_last;
      sidx_q <= scan_last ? '0 : sidx_q + 1'b1;
    end
  end

  logic                  srt_done;
  logic                  sel_ok  [NS];
  logic        [MDW-1:0] sel_md  [NS];
  logic        [IW-1:0]  sel_idx [NS];
  logic signed [PTW-1:0] sel_re  [NS], sel_im [NS];

  ep_sorter #(.P(P), .NS(NS), .MDW(MDW), .PTW(PTW), .IW(IW)) u_sort (
    .clk, .rst_n,
    .in_valid(scan_q), .in_first(sidx_q == '0), .in_last(scan_last),
    .in_md(bk_md[sidx_q]), .in_idx(sidx_q), .in_re(bk_re[sidx_q]), .in_im(bk_im[sidx_q]),
    .done(srt_done), .sel_ok, .sel_md, .sel_idx, .sel_re, .sel_im
  );

  // copy of zhat and MD_init for the block being sorted
  logic signed [PTW-1:0] sz_re [P], sz_im [P];
  logic        [MDW-1:0] s_mdi;
  always_ff @(posedge clk) begin
    if (scan_q && sidx_q == '0) begin
      sz_re <= bk_zr;
      sz_im <= bk_zi;
      s_mdi <= bk_mdi;
    end
  end

  // ---------------------------------------------------------------- CRS
  logic signed [PTW-1:0] c_re [P], c_im [P];
  logic                  c_rep [P];

  crs #(.P(P), .NS(NS), .MDW(MDW), .PTW(PTW), .IW(IW)) u_crs (
    .zh_re(sz_re), .zh_im(sz_im), .md_init(s_mdi),
    .sel_ok, .sel_md, .sel_idx, .sel_re, .sel_im,
    .o_re(c_re), .o_im(c_im), .replaced(c_rep)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= srt_done;
  end

  always_ff @(posedge clk) begin
    if (srt_done) begin
      o_re       <= c_re;
      o_im       <= c_im;
      o_replaced <= c_rep;
      o_md_init  <= s_mdi;
    end
  end

  // all distance units run in lock step
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) pmd_done[0] == md_done)
    else $error("distance units out of step");

endmodule
