// ffa_fir_top -- the parallel fast FIR filters of the family, side by side.
//
// Four independent filters share clock, reset and clock enable. Each is a
// registered L-parallel filter whose block size equals its length (N = L),
// built by applying the 2-parallel fast FIR algorithm recursively:
//     2-tap  : 2-parallel,  3 multipliers  (one 2-parallel FFA)
//     4-tap  : 4-parallel,  9 multipliers  (two cascaded 2-parallel FFAs)
//     8-tap  : 8-parallel, 27 multipliers  (2-parallel FFA applied three times)
//     16-tap : 16-parallel, 81 multipliers (2-parallel FFA applied four times)
// Each filter has its own sample, coefficient and output ports (suffix 2, 4,
// 8 or 16). Lane l of x<N> carries sample N*k+l; outputs appear two clocks
// after their inputs (see par_ffa_filter). Widths: 8-bit signed samples and
// coefficients; outputs of 8+8+log2(N) bits, which are exact.
// The four filter sizes are the ones the published design evaluates; the
// shared control signals and port naming are this design's choices.
module ffa_fir_top #(
  parameter int unsigned XW = ffa_pkg::SAMPLE_W,
  parameter int unsigned HW = ffa_pkg::COEF_W
) (
  input  logic                             clk,
  input  logic                             reset,
  input  logic                             clk_enable,
  input  logic signed [XW-1:0]             x2  [2],
  input  logic signed [HW-1:0]             h2  [2],
  output logic signed [XW+HW+1-1:0]        y2  [2],
  input  logic signed [XW-1:0]             x4  [4],
  input  logic signed [HW-1:0]             h4  [4],
  output logic signed [XW+HW+2-1:0]        y4  [4],
  input  logic signed [XW-1:0]             x8  [8],
  input  logic signed [HW-1:0]             h8  [8],
  output logic signed [XW+HW+3-1:0]        y8  [8],
  input  logic signed [XW-1:0]             x16 [16],
  input  logic signed [HW-1:0]             h16 [16],
  output logic signed [XW+HW+4-1:0]        y16 [16]
);

  par_ffa_filter #(.L(2), .N(2), .XW(XW), .HW(HW), .YW(XW+HW+1)) u_fir2 (
    .clk, .reset, .clk_enable, .x(x2), .h(h2), .y(y2)
  );

  par_ffa_filter #(.L(4), .N(4), .XW(XW), .HW(HW), .YW(XW+HW+2)) u_fir4 (
    .clk, .reset, .clk_enable, .x(x4), .h(h4), .y(y4)
  );

  par_ffa_filter #(.L(8), .N(8), .XW(XW), .HW(HW), .YW(XW+HW+3)) u_fir8 (
    .clk, .reset, .clk_enable, .x(x8), .h(h8), .y(y8)
  );

  par_ffa_filter #(.L(16), .N(16), .XW(XW), .HW(HW), .YW(XW+HW+4)) u_fir16 (
    .clk, .reset, .clk_enable, .x(x16), .h(h16), .y(y16)
  );

endmodule
