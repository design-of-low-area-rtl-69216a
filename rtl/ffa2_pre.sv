// ffa2_pre -- pre-processing adders of one 2-parallel FFA stage.
//
// The 2-parallel fast FIR algorithm splits a sequence into its even and odd
// samples, X = X0 + z^-1 X1, and filters X0, X1 and X0+X1. Given a block of
// 2*M consecutive values of a sequence (lane 0 first), this module returns
// the M even lanes, the M odd lanes and their lane-wise sums. The sum is one
// bit wider than its operands. The same module pre-adds coefficient vectors
// (H0, H1 -> H0+H1), which is how the shared sub-filters H0+H1 get their
// taps. Purely combinational.
// The pre-adds follow the FFA equations; the extra sum bit and the use for
// coefficients are this design's choices.
module ffa2_pre #(
  parameter int unsigned M = 1,
  parameter int unsigned W = ffa_pkg::SAMPLE_W
) (
  input  logic signed [W-1:0] in_lane [2*M],
  output logic signed [W-1:0] even    [M],
  output logic signed [W-1:0] odd     [M],
  output logic signed [W:0]   sum     [M]
);

  always_comb begin
    for (int i = 0; i < M; i++) begin
      even[i] = in_lane[2*i];
      odd[i]  = in_lane[2*i+1];
      sum[i]  = (W+1)'(in_lane[2*i]) + (W+1)'(in_lane[2*i+1]);
    end
  end

endmodule
