// block_fir -- one sub-filter of a parallel fast-FIR structure.
//
// A TAPS-tap FIR filter that runs on one polyphase stream at the block rate:
//     y[k] = sum_{j=0}^{TAPS-1} h[j] * x[k-j]
// where k counts clock cycles in which clk_enable is high. In an L-parallel
// filter of length N every sub-filter has N/L taps, so for the main
// configurations (N = L) it is a single multiplier and has no registers.
// For TAPS > 1 it keeps a delay line of TAPS-1 past samples, cleared by a
// synchronous active-high reset and shifted when clk_enable is high.
//
// Timing: y is combinational from x and h (plus the registered history).
// Each product is formed at full XW+HW precision and then sign-extended or
// wrapped to YW bits; sums wrap modulo 2**YW (see ffa_pkg).
// With TAPS = 1 there is no delay line and clk, reset and clk_enable are
// unused; they stay on the port list so every sub-filter has one interface.
// The sub-filter's role and length follow the FFA formulation; its direct
// form, reset and enable are this design's choices.
module block_fir #(
  parameter int unsigned TAPS = 1,
  parameter int unsigned XW   = ffa_pkg::SAMPLE_W,
  parameter int unsigned HW   = ffa_pkg::COEF_W,
  parameter int unsigned YW   = ffa_pkg::out_width(XW, HW, TAPS)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 clk_enable,
  input  logic signed [XW-1:0] x,
  input  logic signed [HW-1:0] h [TAPS],
  output logic signed [YW-1:0] y
);

  // xs[j] is the sample j blocks old; xs[0] is the current input.
  logic signed [XW-1:0] xs [TAPS];

  assign xs[0] = x;

  if (TAPS > 1) begin : g_delay
    logic signed [XW-1:0] dl [TAPS-1];

    always_ff @(posedge clk) begin
      if (reset) begin
        for (int j = 0; j < TAPS-1; j++) dl[j] <= '0;
      end else if (clk_enable) begin
        dl[0] <= x;
        for (int j = 1; j < TAPS-1; j++) dl[j] <= dl[j-1];
      end
    end

    for (genvar j = 1; j < TAPS; j++) begin : g_tap
      assign xs[j] = dl[j-1];
    end
  end

  always_comb begin
    logic signed [XW+HW-1:0] p;
    y = '0;
    for (int j = 0; j < TAPS; j++) begin
      p = xs[j] * h[j];
      y = y + YW'(p);
    end
  end

endmodule
