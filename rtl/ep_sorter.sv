// ep_sorter: the "Sorter" of the post-detection processor.  The EP metrics
// of the P symbols of a block (the smallest candidate distance of each
// symbol, with the candidate point) are streamed in one per clock, symbol
// index with them, so a block is sorted in P clocks with a single
// comparator chain.  The sorter keeps the NS smallest metrics seen, in
// ascending order, in a register list (insertion: every entry above the new
// one moves down one place).  Equal metrics keep the earlier symbol first.
//
// Timing: in_first starts a new list with the incoming entry; in the clock
// after the in_last entry, done pulses and sel_* hold the final list until
// the next in_first entry.  sel_ok marks list places that were filled.
module ep_sorter
  import mimo_pkg::*;
#(
  parameter int unsigned P   = DEF_P,
  parameter int unsigned NS  = DEF_NS,
  parameter int unsigned MDW = 32,
  parameter int unsigned PTW = pt_width(DEF_Q),
  parameter int unsigned IW  = (P > 1) ? $clog2(P) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic                  in_last,
  input  logic        [MDW-1:0] in_md,
  input  logic        [IW-1:0]  in_idx,
  input  logic signed [PTW-1:0] in_re,
  input  logic signed [PTW-1:0] in_im,
  output logic                  done,
  output logic                  sel_ok  [NS],
  output logic        [MDW-1:0] sel_md  [NS],
  output logic        [IW-1:0]  sel_idx [NS],
  output logic signed [PTW-1:0] sel_re  [NS],
  output logic signed [PTW-1:0] sel_im  [NS]
);

  typedef struct packed {
    logic                  ok;
    logic        [MDW-1:0] md;
    logic        [IW-1:0]  idx;
    logic signed [PTW-1:0] re;
    logic signed [PTW-1:0] im;
  } entry_t;

  entry_t list_q [NS];
  entry_t list_d [NS];
  entry_t cur    [NS];
  entry_t item;

  always_comb begin
    item = '{ok: 1'b1, md: in_md, idx: in_idx, re: in_re, im: in_im};
    for (int i = 0; i < int'(NS); i++)
      cur[i] = in_first ? entry_t'('0) : list_q[i];
    // place i takes the new entry if it beats place i and not place i-1;
    // it takes place i-1 if the new entry beat that one
    for (int i = 0; i < int'(NS); i++) begin
      logic beats_i, beats_prev;
      beats_i    = !cur[i].ok || (item.md < cur[i].md);
      beats_prev = (i > 0) && (!cur[(i > 0) ? i - 1 : 0].ok || (item.md < cur[(i > 0) ? i - 1 : 0].md));
      if (beats_prev)   list_d[i] = cur[(i > 0) ? i - 1 : 0];
      else if (beats_i) list_d[i] = item;
      else              list_d[i] = cur[i];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0;
      for (int i = 0; i < int'(NS); i++) list_q[i] <= '0;
    end else begin
      done <= in_valid && in_last;
      if (in_valid) list_q <= list_d;
    end
  end

  always_comb begin
    for (int i = 0; i < int'(NS); i++) begin
      sel_ok[i]  = list_q[i].ok;
      sel_md[i]  = list_q[i].md;
      sel_idx[i] = list_q[i].idx;
      sel_re[i]  = list_q[i].re;
      sel_im[i]  = list_q[i].im;
    end
  end

endmodule
