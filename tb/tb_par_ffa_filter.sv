// tb_par_ffa_filter -- self-checking testbench for the registered parallel
// fast FIR filter at its defaults (4-parallel, 4 taps).
//
// 1. Demonstration vector: after reset, coefficients h = (1,1,1,1) and one
//    input block x = (2,2,1,1) followed by zeros. The outputs must be
//    y = (2,4,5,6) in the third clock cycle (two edges after the block was
//    applied) and not earlier.
// 2. Random coefficients and samples with random clock-enable stalls and a
//    mid-run reset, checked every cycle by filter_scoreboard (latency two
//    accepted edges, outputs held during stalls).
// An 8-parallel, 16-tap instance runs on the same random stimulus style to
// cover filters whose sub-filters have delay lines.
module tb_par_ffa_filter;
  localparam int unsigned L  = 4;
  localparam int unsigned N  = 4;
  localparam int unsigned YW = 18;
  localparam int unsigned L8 = 8;
  localparam int unsigned N16 = 16;
  localparam int unsigned YW16 = 20;
  localparam int unsigned CYCLES = 400;

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic clk_enable = 1'b0;
  logic signed [7:0]    x  [L];
  logic signed [7:0]    h  [N];
  logic signed [YW-1:0] y  [L];
  logic signed [7:0]    xb [L8];
  logic signed [7:0]    hb [N16];
  logic signed [YW16-1:0] yb [L8];

  int checks = 0;
  int failures = 0;
  int sb_checks, sb_failures, sbb_checks, sbb_failures;
  logic sb_on = 1'b0;

  par_ffa_filter dut (.clk, .reset, .clk_enable, .x(x), .h(h), .y(y));
  par_ffa_filter #(.L(L8), .N(N16)) dut_b (.clk, .reset, .clk_enable, .x(xb), .h(hb), .y(yb));

  filter_scoreboard #(.L(L), .N(N), .YW(YW)) sb (
    .clk, .reset, .clk_enable, .x(x), .h(h), .y(y),
    .checks(sb_checks), .failures(sb_failures)
  );
  filter_scoreboard #(.L(L8), .N(N16), .YW(YW16)) sbb (
    .clk, .reset, .clk_enable, .x(xb), .h(hb), .y(yb),
    .checks(sbb_checks), .failures(sbb_failures)
  );

  always #5 clk = ~clk;

  task automatic expect_block(input int e0, e1, e2, e3, input string what);
    int e [4];
    e = '{e0, e1, e2, e3};
    for (int l = 0; l < L; l++) begin
      checks++;
      if (int'(y[l]) != e[l]) begin
        failures++;
        $display("%s: lane %0d got %0d expected %0d", what, l, y[l], e[l]);
      end
    end
  endtask

  initial begin : watchdog
    repeat (CYCLES + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    foreach (x[l]) x[l] = '0;
    foreach (xb[l]) xb[l] = '0;
    foreach (h[j]) h[j] = 8'sd1;
    foreach (hb[j]) hb[j] = 8'($urandom);
    repeat (2) @(posedge clk);
    // Demonstration vector: cycle 1 applies the block.
    @(negedge clk);
    reset = 1'b0;
    clk_enable = 1'b1;
    x = '{8'sd2, 8'sd2, 8'sd1, 8'sd1};
    @(posedge clk); #1;                      // edge 1: captured, not out yet
    expect_block(0, 0, 0, 0, "cycle 2");
    @(negedge clk);
    foreach (x[l]) x[l] = '0;
    @(posedge clk); #1;                      // edge 2: output in cycle 3
    expect_block(2, 4, 5, 6, "cycle 3");
    @(posedge clk); #1;                      // tail: y(n) for n = 4..7
    expect_block(4, 2, 1, 0, "cycle 4");
    @(posedge clk); #1;
    expect_block(0, 0, 0, 0, "cycle 5");

    // Random run, checked by the scoreboards.
    @(negedge clk);
    reset = 1'b1;
    foreach (h[j]) h[j] = 8'($urandom);
    @(negedge clk);
    reset = 1'b0;
    sb_on = 1'b1;
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      reset = (cyc == CYCLES/2);
      clk_enable = ($urandom_range(0, 3) != 0);
      foreach (x[l]) x[l] = 8'($urandom);
      foreach (xb[l]) xb[l] = 8'($urandom);
      @(negedge clk);
    end
    checks += sb_checks + sbb_checks;
    failures += sb_failures + sbb_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
