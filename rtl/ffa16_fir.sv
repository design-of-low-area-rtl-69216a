// ffa16_fir -- 16-parallel, N-tap fast FIR filter core.
//
// Computes y(n) = sum_{k=0}^{N-1} h(k) x(n-k) 16 samples per clock:
// x[l] carries x(16k+l) and y[l] carries y(16k+l).
//
// The structure applies the 2-parallel fast FIR algorithm (FFA) four times.
// One 2-parallel FFA stage splits the block into its even lanes (phase X0)
// and odd lanes (phase X1), each a 8-parallel stream at half the sample
// rate, and the coefficients into H0 (even taps) and H1 (odd taps). Three
// ffa8_fir sub-filters of N/2 taps compute H0 X0, (H0+H1)(X0+X1) and H1 X1,
// and ffa2_post rebuilds
//     Y0 = H0 X0 + z^-2 H1 X1
//     Y1 = (H0+H1)(X0+X1) - H0 X0 - H1 X1
// where the z^-2 (one sample of the half-rate stream) is a rotation of the
// 8 lanes plus one register. In all the filter uses 81 sub-filters
// of N/16 taps, against 16*16 for a plain 16-parallel polyphase filter.
//
// Each pre-add widens samples and coefficients by one bit; the outputs and
// post-adds use YW bits and wrap modulo 2**YW, leaving the result exact.
// Timing: combinational from x and h to y, apart from the post-processing
// delay registers and the sub-filter delay lines (when N > 16). They load
// when clk_enable is high and clear on a synchronous active-high reset.
// N must be a multiple of 16.
// The 16-tap filter extends the same recursion by one level, as the published
// design suggests for higher orders without drawing it. Widths, reset and
// clock enable are this design's choices.
module ffa16_fir #(
  parameter int unsigned N  = 16,
  parameter int unsigned XW = ffa_pkg::SAMPLE_W,
  parameter int unsigned HW = ffa_pkg::COEF_W,
  parameter int unsigned YW = ffa_pkg::out_width(XW, HW, N)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 clk_enable,
  input  logic signed [XW-1:0] x [16],
  input  logic signed [HW-1:0] h [N],
  output logic signed [YW-1:0] y [16]
);

  localparam int unsigned M  = 8;
  localparam int unsigned NH = N / 2;

  if (N % 16 != 0) begin : g_bad_n
    $error("ffa16_fir: N must be a multiple of 16");
  end

  // Pre-processing: even/odd phases and their sums.
  logic signed [XW-1:0] x0 [M];
  logic signed [XW-1:0] x1 [M];
  logic signed [XW:0]   xs [M];
  logic signed [HW-1:0] h0 [NH];
  logic signed [HW-1:0] h1 [NH];
  logic signed [HW:0]   hs [NH];

  ffa2_pre #(.M(M),  .W(XW)) u_xpre (.in_lane(x), .even(x0), .odd(x1), .sum(xs));
  ffa2_pre #(.M(NH), .W(HW)) u_hpre (.in_lane(h), .even(h0), .odd(h1), .sum(hs));

  // The three half-size sub-filters.
  logic signed [YW-1:0] ya [M];  // H0 X0
  logic signed [YW-1:0] yb [M];  // (H0+H1)(X0+X1)
  logic signed [YW-1:0] yc [M];  // H1 X1

  ffa8_fir #(.N(NH), .XW(XW), .HW(HW), .YW(YW)) u_a (
    .clk, .reset, .clk_enable, .x(x0), .h(h0), .y(ya)
  );
  ffa8_fir #(.N(NH), .XW(XW+1), .HW(HW+1), .YW(YW)) u_b (
    .clk, .reset, .clk_enable, .x(xs), .h(hs), .y(yb)
  );
  ffa8_fir #(.N(NH), .XW(XW), .HW(HW), .YW(YW)) u_c (
    .clk, .reset, .clk_enable, .x(x1), .h(h1), .y(yc)
  );

  // Post-processing.
  ffa2_post #(.M(M), .YW(YW)) u_post (
    .clk, .reset, .clk_enable, .a(ya), .b(yb), .c(yc), .y(y)
  );

endmodule
