// tb_ffa_fir_top -- end-to-end testbench of the four parallel fast FIR
// filters (2-, 4-, 8- and 16-tap) at their default sizes.
//
// All four filters receive random coefficients and a fresh random block of
// samples on every clock. filter_scoreboard instances check every output
// lane of every filter on every cycle against a direct convolution, with
// the two-edge latency. The run makes each mechanism of the design happen
// and counts it; a mechanism that never happened counts as a failure:
//   stall     - clk_enable low while data is flowing (all state must hold)
//   reset     - synchronous reset in the middle of a stream
//   fullscale - a block of -128 samples against -128 coefficients, whose
//               output is the largest the output width must hold exactly
//   coef_swap - new coefficients loaded after a reset (a new filter)
module tb_ffa_fir_top;
  localparam int unsigned CYCLES = 2000;

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic clk_enable = 1'b0;

  logic signed [7:0]  x2  [2];
  logic signed [7:0]  h2  [2];
  logic signed [16:0] y2  [2];
  logic signed [7:0]  x4  [4];
  logic signed [7:0]  h4  [4];
  logic signed [17:0] y4  [4];
  logic signed [7:0]  x8  [8];
  logic signed [7:0]  h8  [8];
  logic signed [18:0] y8  [8];
  logic signed [7:0]  x16 [16];
  logic signed [7:0]  h16 [16];
  logic signed [19:0] y16 [16];

  int checks = 0;
  int failures = 0;
  int c2, f2, c4, f4, c8, f8, c16, f16;
  int n_stall = 0, n_reset = 0, n_fullscale = 0, n_coef = 0;

  ffa_fir_top dut (
    .clk, .reset, .clk_enable,
    .x2, .h2, .y2, .x4, .h4, .y4, .x8, .h8, .y8, .x16, .h16, .y16
  );

  filter_scoreboard #(.L(2),  .N(2),  .YW(17)) sb2  (.clk, .reset, .clk_enable, .x(x2),  .h(h2),  .y(y2),  .checks(c2),  .failures(f2));
  filter_scoreboard #(.L(4),  .N(4),  .YW(18)) sb4  (.clk, .reset, .clk_enable, .x(x4),  .h(h4),  .y(y4),  .checks(c4),  .failures(f4));
  filter_scoreboard #(.L(8),  .N(8),  .YW(19)) sb8  (.clk, .reset, .clk_enable, .x(x8),  .h(h8),  .y(y8),  .checks(c8),  .failures(f8));
  filter_scoreboard #(.L(16), .N(16), .YW(20)) sb16 (.clk, .reset, .clk_enable, .x(x16), .h(h16), .y(y16), .checks(c16), .failures(f16));

  always #5 clk = ~clk;

  task automatic new_coefs(input bit fullscale);
    foreach (h2[j])  h2[j]  = fullscale ? -8'sd128 : 8'($urandom);
    foreach (h4[j])  h4[j]  = fullscale ? -8'sd128 : 8'($urandom);
    foreach (h8[j])  h8[j]  = fullscale ? -8'sd128 : 8'($urandom);
    foreach (h16[j]) h16[j] = fullscale ? -8'sd128 : 8'($urandom);
  endtask

  task automatic new_samples(input bit fullscale);
    foreach (x2[l])  x2[l]  = fullscale ? -8'sd128 : 8'($urandom);
    foreach (x4[l])  x4[l]  = fullscale ? -8'sd128 : 8'($urandom);
    foreach (x8[l])  x8[l]  = fullscale ? -8'sd128 : 8'($urandom);
    foreach (x16[l]) x16[l] = fullscale ? -8'sd128 : 8'($urandom);
  endtask

  initial begin : watchdog
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    new_coefs(1'b0);
    new_samples(1'b0);
    repeat (3) @(posedge clk);
    @(negedge clk);
    reset = 1'b0;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      int phase;
      phase = cyc % 500;
      reset = 1'b0;
      if (phase == 499) begin
        reset = 1'b1;
        n_reset++;
      end else if (phase == 0 && cyc != 0) begin
        // After the reset: a new filter, or the full-scale filter.
        new_coefs(cyc == 1000);
        n_coef++;
      end
      clk_enable = (phase < 50) ? 1'b1 : ($urandom_range(0, 4) != 0);
      if (!clk_enable && !reset) n_stall++;
      if (cyc >= 1000 && cyc < 1500 && phase >= 10 && phase < 20) begin
        new_samples(1'b1);
        if (clk_enable) n_fullscale++;
      end else begin
        new_samples(1'b0);
      end
      @(negedge clk);
    end
    checks = c2 + c4 + c8 + c16;
    failures += f2 + f4 + f8 + f16;
    $display("mechanisms: stall=%0d reset=%0d fullscale=%0d coef_swap=%0d",
             n_stall, n_reset, n_fullscale, n_coef);
    if (n_stall == 0 || n_reset == 0 || n_fullscale == 0 || n_coef == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
