// tb_ffa2_post -- self-checking testbench for the FFA post-processing.
//
// Drives random 2-lane streams A, B, C into a stage with M = 2 and checks
// the 4-lane output: lane 2i = A[i] + (C delayed by one sub-sequence
// sample), lane 2i+1 = B[i] - A[i] - C[i], modulo 2**YW. The delayed value
// for lane 0 is lane 1 of the last block accepted with clk_enable high,
// and zero after reset.
module tb_ffa2_post;
  localparam int unsigned M  = 2;
  localparam int unsigned YW = 12;
  localparam int unsigned CYCLES = 300;

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic clk_enable = 1'b0;
  logic signed [YW-1:0] a [M];
  logic signed [YW-1:0] b [M];
  logic signed [YW-1:0] c [M];
  logic signed [YW-1:0] y [2*M];

  int checks = 0;
  int failures = 0;
  logic signed [YW-1:0] c_prev = '0;
  logic signed [YW-1:0] e;

  ffa2_post #(.M(M), .YW(YW)) dut (.clk, .reset, .clk_enable, .a, .b, .c, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (CYCLES + 50) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    foreach (a[i]) begin a[i] = '0; b[i] = '0; c[i] = '0; end
    repeat (2) @(posedge clk);
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      reset = (cyc == CYCLES/2);
      clk_enable = ($urandom_range(0, 3) != 0);
      foreach (a[i]) begin
        a[i] = YW'($urandom); b[i] = YW'($urandom); c[i] = YW'($urandom);
      end
      #1;
      if (!reset) begin
        for (int i = 0; i < M; i++) begin
          checks += 2;
          e = a[i] + ((i == 0) ? c_prev : c[i-1]);
          if (y[2*i] != e) begin
            failures++;
            $display("cycle %0d lane %0d: got %0d expected %0d", cyc, 2*i, y[2*i], e);
          end
          e = b[i] - a[i] - c[i];
          if (y[2*i+1] != e) begin
            failures++;
            $display("cycle %0d lane %0d: got %0d expected %0d", cyc, 2*i+1, y[2*i+1], e);
          end
        end
      end
      @(posedge clk);
      if (reset) c_prev = '0;
      else if (clk_enable) c_prev = c[M-1];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
