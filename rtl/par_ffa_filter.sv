// par_ffa_filter -- registered L-parallel, N-tap fast FIR filter.
//
// Wraps an L-parallel fast FIR core (ffa2_fir, ffa4_fir, ffa8_fir or
// ffa16_fir, chosen by L) between an input register and an output register,
// so the multiply/add network is a clean register-to-register path. Each
// clock with clk_enable high accepts L new samples x(L*k) .. x(L*k+L-1) and
// delivers L outputs. Timing: a block applied before rising edge 1 is
// captured at edge 1 and its outputs appear on y after edge 2, i.e. in the
// third clock cycle counting the cycle in which the inputs are applied,
// which is the output timing the FFA filter was demonstrated with.
// clk_enable low freezes every register (input, output and the internal
// delays), so the filter stalls without losing state. reset (synchronous,
// active high) clears all registers, so the filter restarts with an
// all-zero history. The coefficients h are used unregistered and are meant
// to be held steady while the filter runs.
// The register placement, enable and reset are this design's choices.
module par_ffa_filter #(
  parameter int unsigned L  = 4,
  parameter int unsigned N  = 4,
  parameter int unsigned XW = ffa_pkg::SAMPLE_W,
  parameter int unsigned HW = ffa_pkg::COEF_W,
  parameter int unsigned YW = ffa_pkg::out_width(XW, HW, N)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 clk_enable,
  input  logic signed [XW-1:0] x [L],
  input  logic signed [HW-1:0] h [N],
  output logic signed [YW-1:0] y [L]
);

  logic signed [XW-1:0] x_q [L];
  logic signed [YW-1:0] y_d [L];

  always_ff @(posedge clk) begin
    if (reset) begin
      for (int l = 0; l < L; l++) begin
        x_q[l] <= '0;
        y[l]   <= '0;
      end
    end else if (clk_enable) begin
      x_q <= x;
      y   <= y_d;
    end
  end

  if (L == 2) begin : g_l2
    ffa2_fir #(.N(N), .XW(XW), .HW(HW), .YW(YW)) u_core (
      .clk, .reset, .clk_enable, .x(x_q), .h(h), .y(y_d)
    );
  end else if (L == 4) begin : g_l4
    ffa4_fir #(.N(N), .XW(XW), .HW(HW), .YW(YW)) u_core (
      .clk, .reset, .clk_enable, .x(x_q), .h(h), .y(y_d)
    );
  end else if (L == 8) begin : g_l8
    ffa8_fir #(.N(N), .XW(XW), .HW(HW), .YW(YW)) u_core (
      .clk, .reset, .clk_enable, .x(x_q), .h(h), .y(y_d)
    );
  end else if (L == 16) begin : g_l16
    ffa16_fir #(.N(N), .XW(XW), .HW(HW), .YW(YW)) u_core (
      .clk, .reset, .clk_enable, .x(x_q), .h(h), .y(y_d)
    );
  end else begin : g_bad_l
    $error("par_ffa_filter: L must be 2, 4, 8 or 16");
  end

endmodule
