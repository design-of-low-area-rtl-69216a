// ffa2_post -- post-processing of one 2-parallel FFA stage.
//
// With A = H0*X0, B = (H0+H1)*(X0+X1) and C = H1*X1, the 2-parallel FFA
// rebuilds the even and odd output phases as
//     Y0 = A + z^-1 C        Y1 = B - A - C
// The three inputs are M-parallel streams (lane i holds sample M*k+i of the
// sub-sequence). Delaying C by one sub-sequence sample moves lane i-1 into
// lane i and takes lane 0 from lane M-1 of the previous block, which needs
// one YW-bit register (the "D" of the FFA structure). The outputs are
// interleaved into a 2*M-lane block: lane 2i = Y0 lane i, lane 2i+1 = Y1
// lane i. The register resets synchronously to zero and loads only when
// clk_enable is high. Outputs are combinational; arithmetic wraps modulo
// 2**YW. The equations follow the FFA; the lane rotation is how a one-sample
// delay is done on a parallel stream.
module ffa2_post #(
  parameter int unsigned M  = 1,
  parameter int unsigned YW = ffa_pkg::out_width(ffa_pkg::SAMPLE_W, ffa_pkg::COEF_W, 2)
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 clk_enable,
  input  logic signed [YW-1:0] a [M],
  input  logic signed [YW-1:0] b [M],
  input  logic signed [YW-1:0] c [M],
  output logic signed [YW-1:0] y [2*M]
);

  logic signed [YW-1:0] c_last;  // lane M-1 of C from the previous block

  always_ff @(posedge clk) begin
    if (reset)           c_last <= '0;
    else if (clk_enable) c_last <= c[M-1];
  end

  always_comb begin
    for (int i = 0; i < M; i++) begin
      y[2*i]   = a[i] + ((i == 0) ? c_last : c[(i == 0) ? 0 : i-1]);
      y[2*i+1] = b[i] - a[i] - c[i];
    end
  end

endmodule
