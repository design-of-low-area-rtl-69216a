// tb_block_fir -- self-checking testbench for the block-rate sub-filter.
//
// Tests a 1-tap sub-filter (a single multiplier) and a 4-tap sub-filter
// with a delay line. Random samples and a random clock enable are applied;
// the combinational output is compared with sum_j h[j]*x[k-j] over the
// accepted samples (zero before the last reset). A reset is applied
// mid-run, and full-scale samples show that the output is exact.
module tb_block_fir;
  localparam int unsigned XW = 8;
  localparam int unsigned HW = 8;
  localparam int unsigned T1 = 1;
  localparam int unsigned T4 = 4;
  localparam int unsigned Y1 = XW + HW;
  localparam int unsigned Y4 = XW + HW + 2;
  localparam int unsigned CYCLES = 300;

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic clk_enable = 1'b0;
  logic signed [XW-1:0] x = '0;
  logic signed [HW-1:0] h1 [T1];
  logic signed [HW-1:0] h4 [T4];
  logic signed [Y1-1:0] y1;
  logic signed [Y4-1:0] y4;

  int checks = 0;
  int failures = 0;
  int hist[$];

  block_fir #(.TAPS(T1), .XW(XW), .HW(HW), .YW(Y1)) dut1 (
    .clk, .reset, .clk_enable, .x(x), .h(h1), .y(y1)
  );
  block_fir #(.TAPS(T4), .XW(XW), .HW(HW), .YW(Y4)) dut4 (
    .clk, .reset, .clk_enable, .x(x), .h(h4), .y(y4)
  );

  always #5 clk = ~clk;

  function automatic logic signed [7:0] rnd8();
    case ($urandom_range(0, 5))
      0:       return -8'sd128;
      1:       return 8'sd127;
      default: return 8'($urandom);
    endcase
  endfunction

  function automatic longint ref4();
    longint acc = longint'(x) * longint'(h4[0]);
    for (int j = 1; j < T4; j++)
      if (hist.size() >= j) acc += longint'(hist[hist.size()-j]) * longint'(h4[j]);
    return acc;
  endfunction

  initial begin : watchdog
    repeat (CYCLES + 50) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    h1[0] = rnd8();
    foreach (h4[j]) h4[j] = rnd8();
    repeat (2) @(posedge clk);
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      reset = (cyc == CYCLES/2);
      clk_enable = ($urandom_range(0, 3) != 0);
      x = rnd8();
      #1;
      if (!reset) begin
        checks += 2;
        if (longint'(y1) != longint'(x) * longint'(h1[0])) begin
          failures++;
          $display("1-tap cycle %0d: got %0d", cyc, y1);
        end
        if (longint'(y4) != ref4()) begin
          failures++;
          $display("4-tap cycle %0d: got %0d expected %0d", cyc, y4, ref4());
        end
      end
      @(posedge clk);
      if (reset) hist.delete();
      else if (clk_enable) hist.push_back(int'(x));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
