// md_init_acc: the |Re{}| + |Im{}| unit with accumulator.  It sums the
// Manhattan norm of the residual e_t = y_t - (Heff*zhat)_t over the P rows
// of a block, giving MD_init = ||Y - Heff*zhat||_1, the distance of the
// unchanged hard-decided MMSE estimate.  A candidate only replaces a symbol
// when its own distance is below this value.
//
// Timing as in pmd: in_first restarts the sum, md_done pulses the clock
// after the in_last row and md_init holds until the next in_first row.
module md_init_acc
  import mimo_pkg::*;
#(
  parameter int unsigned P   = DEF_P,
  parameter int unsigned EW  = 24,
  parameter int unsigned MDW = EW + 4 + $clog2(P)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic                 in_first,
  input  logic                 in_last,
  input  logic signed [EW-1:0] e_re,
  input  logic signed [EW-1:0] e_im,
  output logic                 md_done,
  output logic       [MDW-1:0] md_init
);

  logic [EW-1:0]  a_re, a_im;
  logic [MDW-1:0] term;
  assign a_re = (e_re < 0) ? EW'(-e_re) : EW'(e_re);
  assign a_im = (e_im < 0) ? EW'(-e_im) : EW'(e_im);
  assign term = MDW'(a_re) + MDW'(a_im);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) md_done <= 1'b0;
    else        md_done <= in_valid && in_last;
  end

  always_ff @(posedge clk) begin
    if (in_valid) md_init <= in_first ? term : md_init + term;
  end

endmodule
