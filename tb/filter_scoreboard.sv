// filter_scoreboard -- reference model and checker for one registered
// L-parallel, N-tap filter (par_ffa_filter timing).
//
// At every rising clock edge it mirrors the filter: on reset it clears the
// sample history and both output stages; with clk_enable high it appends the
// L input samples to the full-rate history, computes the direct convolution
// y(n) = sum_k h(k) x(n-k) for that block, and moves the block computed one
// accepted edge earlier to the expected output. Shortly after the edge it
// compares the filter's registered outputs with the expected ones. So an
// output block must appear exactly two accepted clock edges after its input
// block, and hold while clk_enable is low.
module filter_scoreboard #(
  parameter int unsigned L  = 4,
  parameter int unsigned N  = 4,
  parameter int unsigned XW = 8,
  parameter int unsigned HW = 8,
  parameter int unsigned YW = 18
) (
  input  logic                 clk,
  input  logic                 reset,
  input  logic                 clk_enable,
  input  logic signed [XW-1:0] x [L],
  input  logic signed [HW-1:0] h [N],
  input  logic signed [YW-1:0] y [L],
  output int                   checks,
  output int                   failures
);
  longint hist[$];
  longint ystage [L];
  longint yexp   [L];

  initial begin
    checks = 0;
    failures = 0;
    foreach (ystage[l]) begin ystage[l] = 0; yexp[l] = 0; end
  end

  always @(posedge clk) begin
    if (reset) begin
      hist.delete();
      foreach (ystage[l]) begin ystage[l] = 0; yexp[l] = 0; end
    end else if (clk_enable) begin
      int base;
      yexp = ystage;
      base = hist.size();
      foreach (x[l]) hist.push_back(longint'(x[l]));
      for (int l = 0; l < L; l++) begin
        longint acc;
        acc = 0;
        for (int j = 0; j < N; j++)
          if (base + l - j >= 0) acc += hist[base + l - j] * longint'(h[j]);
        ystage[l] = acc;
      end
    end
    #2;
    for (int l = 0; l < L; l++) begin
      checks++;
      if (longint'(y[l]) != yexp[l]) begin
        failures++;
        $display("%m: lane %0d got %0d expected %0d at %0t", l, y[l], yexp[l], $time);
      end
    end
  end
endmodule
