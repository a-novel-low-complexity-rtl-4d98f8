// residual_unit: complex multipliers, adder tree and subtraction from Y of
// the post-detection processor.  One row t of the effective channel Heff
// (all P elements) and the element y_t arrive per clock together with the
// hard-decided estimate zhat of the current block; the unit returns
//     e_t = y_t - sum_j Heff[t][j] * zhat_j
// which is the t-th element of the residual Y - Heff*zhat.
//
// Pipeline, four register stages (in_* to e_*: 4 clocks):
//   1 input registers, 2 P complex products, 3 adder tree, 4 subtraction.
// The Heff row and zhat are delayed with the data so that the downstream
// distance units see Heff[t][p] in the same clock as e_t.  valid/first/last
// travel with each row; only the valid bits are reset.
// The document gives the multipliers, the adder, the subtraction from Y and
// the four stages; the stage boundaries are this design's choice.
module residual_unit
  import mimo_pkg::*;
#(
  parameter int unsigned P   = DEF_P,
  parameter int unsigned Q   = DEF_Q,
  parameter int unsigned HW  = DEF_HW,
  parameter int unsigned YW  = DEF_YW,
  parameter int unsigned PTW = pt_width(Q),
  parameter int unsigned EW  = ((HW + PTW > YW) ? HW + PTW : YW) + $clog2(P) + 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_first,
  input  logic                  in_last,
  input  logic signed [HW-1:0]  h_re   [P],
  input  logic signed [HW-1:0]  h_im   [P],
  input  logic signed [YW-1:0]  y_re,
  input  logic signed [YW-1:0]  y_im,
  input  logic signed [PTW-1:0] zh_re  [P],
  input  logic signed [PTW-1:0] zh_im  [P],
  output logic                  e_valid,
  output logic                  e_first,
  output logic                  e_last,
  output logic signed [EW-1:0]  e_re,
  output logic signed [EW-1:0]  e_im,
  output logic signed [HW-1:0]  eh_re  [P],
  output logic signed [HW-1:0]  eh_im  [P],
  output logic signed [PTW-1:0] ezh_re [P],
  output logic signed [PTW-1:0] ezh_im [P]
);

  localparam int unsigned PW = HW + PTW + 1;  // one complex product

  // stage-tagged control
  logic [3:1] vld, fst, lst;

  // stage 1: inputs
  logic signed [HW-1:0]  h1_re [P], h1_im [P];
  logic signed [PTW-1:0] z1_re [P], z1_im [P];
  logic signed [YW-1:0]  y1_re, y1_im;
  // stage 2: products
  logic signed [PW-1:0]  p2_re [P], p2_im [P];
  logic signed [HW-1:0]  h2_re [P], h2_im [P];
  logic signed [PTW-1:0] z2_re [P], z2_im [P];
  logic signed [YW-1:0]  y2_re, y2_im;
  // stage 3: adder tree
  logic signed [EW-1:0]  s3_re, s3_im;
  logic signed [HW-1:0]  h3_re [P], h3_im [P];
  logic signed [PTW-1:0] z3_re [P], z3_im [P];
  logic signed [YW-1:0]  y3_re, y3_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld     <= '0;
      e_valid <= 1'b0;
    end else begin
      vld     <= {vld[2:1], in_valid};
      e_valid <= vld[3];
    end
  end

  logic signed [EW-1:0] sum_re, sum_im;
  always_comb begin
    sum_re = '0;
    sum_im = '0;
    for (int j = 0; j < int'(P); j++) begin
      sum_re = sum_re + EW'(p2_re[j]);
      sum_im = sum_im + EW'(p2_im[j]);
    end
  end

  always_ff @(posedge clk) begin
    fst <= {fst[2:1], in_first};
    lst <= {lst[2:1], in_last};
    // stage 1
    h1_re <= h_re;  h1_im <= h_im;
    z1_re <= zh_re; z1_im <= zh_im;
    y1_re <= y_re;  y1_im <= y_im;
    // stage 2
    for (int j = 0; j < int'(P); j++) begin
      p2_re[j] <= PW'(h1_re[j]) * PW'(z1_re[j]) - PW'(h1_im[j]) * PW'(z1_im[j]);
      p2_im[j] <= PW'(h1_re[j]) * PW'(z1_im[j]) + PW'(h1_im[j]) * PW'(z1_re[j]);
    end
    h2_re <= h1_re; h2_im <= h1_im;
    z2_re <= z1_re; z2_im <= z1_im;
    y2_re <= y1_re; y2_im <= y1_im;
    // stage 3
    s3_re <= sum_re;
    s3_im <= sum_im;
    h3_re <= h2_re; h3_im <= h2_im;
    z3_re <= z2_re; z3_im <= z2_im;
    y3_re <= y2_re; y3_im <= y2_im;
    // stage 4
    e_re    <= EW'(y3_re) - s3_re;
    e_im    <= EW'(y3_im) - s3_im;
    e_first <= fst[3];
    e_last  <= lst[3];
    eh_re   <= h3_re;  eh_im  <= h3_im;
    ezh_re  <= z3_re;  ezh_im <= z3_im;
  end

endmodule
