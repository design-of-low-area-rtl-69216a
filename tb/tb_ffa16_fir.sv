// tb_ffa16_fir -- self-checking testbench for the 16-parallel fast FIR core.
//
// Two instances are tested: N = 16 taps (one multiplier per sub-filter)
// and N = 32 taps (two-tap sub-filters with delay lines). Every cycle a
// random block of 16 samples is applied with a random clock enable; the
// combinational outputs are compared with a direct convolution
// y(n) = sum_k h(k) x(n-k) computed from the full-rate sample history, with
// x(n) = 0 before the last reset. A reset is applied mid-run. Samples
// include full-scale values (-128, 127) to show the outputs are exact.
module tb_ffa16_fir;
  localparam int unsigned L   = 16;
  localparam int unsigned NA  = 16;
  localparam int unsigned NB  = 32;
  localparam int unsigned XW  = 8;
  localparam int unsigned HW  = 8;
  localparam int unsigned YWA = XW + HW + $clog2(NA);
  localparam int unsigned YWB = XW + HW + $clog2(NB);
  localparam int unsigned CYCLES = 400;

  logic clk = 1'b0;
  logic reset = 1'b1;
  logic clk_enable = 1'b0;
  logic signed [XW-1:0]  x  [L];
  logic signed [HW-1:0]  ha [NA];
  logic signed [HW-1:0]  hb [NB];
  logic signed [YWA-1:0] ya [L];
  logic signed [YWB-1:0] yb [L];

  int checks = 0;
  int failures = 0;
  int hist[$];   // accepted samples since the last reset, oldest first

  ffa16_fir #(.N(NA), .XW(XW), .HW(HW), .YW(YWA)) dut_a (
    .clk, .reset, .clk_enable, .x(x), .h(ha), .y(ya)
  );
  ffa16_fir #(.N(NB), .XW(XW), .HW(HW), .YW(YWB)) dut_b (
    .clk, .reset, .clk_enable, .x(x), .h(hb), .y(yb)
  );

  always #5 clk = ~clk;

  function automatic logic signed [XW-1:0] rnd_sample();
    case ($urandom_range(0, 7))
      0:       return -8'sd128;
      1:       return 8'sd127;
      default: return XW'($urandom);
    endcase
  endfunction

  // Expected output for sample n = base+l, with the current block appended.
  function automatic longint expect_y(int l, int taps, bit use_b);
    longint acc = 0;
    int n = hist.size() + l;
    for (int j = 0; j < taps; j++) begin
      int m = n - j;
      longint xv;
      if (m < 0) xv = 0;
      else if (m >= hist.size()) xv = longint'(x[m - hist.size()]);
      else xv = longint'(hist[m]);
      acc += xv * longint'(use_b ? hb[j] : ha[j]);
    end
    return acc;
  endfunction

  initial begin : watchdog
    repeat (CYCLES + 50) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    foreach (ha[j]) ha[j] = rnd_sample();
    foreach (hb[j]) hb[j] = rnd_sample();
    foreach (x[l]) x[l] = '0;
    repeat (2) @(posedge clk);
    for (int cyc = 0; cyc < CYCLES; cyc++) begin
      @(negedge clk);
      reset = (cyc == CYCLES/2);
      clk_enable = ($urandom_range(0, 3) != 0);
      foreach (x[l]) x[l] = rnd_sample();
      #1;
      if (!reset) begin
        for (int l = 0; l < L; l++) begin
          checks += 2;
          if (longint'(ya[l]) != expect_y(l, NA, 1'b0)) begin
            failures++;
            $display("N=%0d cycle %0d lane %0d: got %0d expected %0d", NA, cyc, l, ya[l], expect_y(l, NA, 1'b0));
          end
          if (longint'(yb[l]) != expect_y(l, NB, 1'b1)) begin
            failures++;
            $display("N=%0d cycle %0d lane %0d: got %0d expected %0d", NB, cyc, l, yb[l], expect_y(l, NB, 1'b1));
          end
        end
      end
      @(posedge clk);
      if (reset) hist.delete();
      else if (clk_enable) foreach (x[l]) hist.push_back(int'(x[l]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
