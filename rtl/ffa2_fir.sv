// ffa2_fir -- 2-parallel, N-tap fast FIR filter core (one 2-parallel FFA).
//
// Computes y(n) = sum_{k=0}^{N-1} h(k) x(n-k) two samples per clock:
// x[0], x[1] carry x(2k), x(2k+1) and y[0], y[1] carry y(2k), y(2k+1).
// With X = X0 + z^-1 X1 and H = H0 + z^-1 H1 (even and odd phases) the
// 2-parallel fast FIR algorithm computes
//     Y0 = H0 X0 + z^-2 H1 X1
//     Y1 = (H0+H1)(X0+X1) - H0 X0 - H1 X1
// so three N/2-tap sub-filters (H0, H0+H1, H1) replace the four of a plain
// polyphase split. ffa2_pre forms X0+X1 and H0+H1, three block_fir
// instances filter, ffa2_post adds the results and holds the one-block
// delay of the H1 X1 product.
//
// Timing: combinational from x and h to y, apart from the delay register in
// ffa2_post and the sub-filter delay lines (when N > 2). They load when
// clk_enable is high and clear on a synchronous active-high reset. The
// outputs are YW bits wide; internal sums wrap modulo 2**YW and the result
// is exact. N must be even.
// The FFA equations and the three-sub-filter structure follow the published
// fast FIR design; widths, reset and clock enable are this design's choices.
module ffa2_fir #(
  parameter int unsigned N  = 2,
  parameter int unsigned XW = ffa_pkg::SAMPLE_W,
  parameter int unsigned HW = ffa_pkg::COEF_W,
  parameter int unsigned YW = ffa_pkg::out_width(XW, HW, N)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 clk_enable,
  input  logic signed [XW-1:0] x [2],
  input  logic signed [HW-1:0] h [N],
  output logic signed [YW-1:0] y [2]
);

  localparam int unsigned NH = N / 2;

  if (N % 2 != 0) begin : g_bad_n
    $error("ffa2_fir: N must be even");
  end

  // Pre-processing: even/odd phases and their sums.
  logic signed [XW-1:0] x0 [1];
  logic signed [XW-1:0] x1 [1];
  logic signed [XW:0]   xs [1];
  logic signed [HW-1:0] h0 [NH];
  logic signed [HW-1:0] h1 [NH];
  logic signed [HW:0]   hs [NH];

  ffa2_pre #(.M(1),  .W(XW)) u_xpre (.in_lane(x), .even(x0), .odd(x1), .sum(xs));
  ffa2_pre #(.M(NH), .W(HW)) u_hpre (.in_lane(h), .even(h0), .odd(h1), .sum(hs));

  // The three sub-filters.
  logic signed [YW-1:0] ya [1];  // H0 X0
  logic signed [YW-1:0] yb [1];  // (H0+H1)(X0+X1)
  logic signed [YW-1:0] yc [1];  // H1 X1

  block_fir #(.TAPS(NH), .XW(XW), .HW(HW), .YW(YW)) u_a (
    .clk, .reset, .clk_enable, .x(x0[0]), .h(h0), .y(ya[0])
  );
  block_fir #(.TAPS(NH), .XW(XW+1), .HW(HW+1), .YW(YW)) u_b (
    .clk, .reset, .clk_enable, .x(xs[0]), .h(hs), .y(yb[0])
  );
  block_fir #(.TAPS(NH), .XW(XW), .HW(HW), .YW(YW)) u_c (
    .clk, .reset, .clk_enable, .x(x1[0]), .h(h1), .y(yc[0])
  );

  // Post-processing.
  ffa2_post #(.M(1), .YW(YW)) u_post (
    .clk, .reset, .clk_enable, .a(ya), .b(yb), .c(yc), .y(y)
  );

endmodule
