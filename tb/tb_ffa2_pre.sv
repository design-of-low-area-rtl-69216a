// tb_ffa2_pre -- self-checking testbench for the FFA pre-processing adders.
//
// Applies random 8-lane blocks (including full-scale values) to a 4-pair
// pre-adder and checks the even lanes, the odd lanes and the 9-bit sums.
module tb_ffa2_pre;
  localparam int unsigned M = 4;
  localparam int unsigned W = 8;

  logic signed [W-1:0] in_lane [2*M];
  logic signed [W-1:0] even [M];
  logic signed [W-1:0] odd  [M];
  logic signed [W:0]   sum  [M];

  int checks = 0;
  int failures = 0;
  logic done = 1'b0;

  ffa2_pre #(.M(M), .W(W)) dut (.in_lane, .even, .odd, .sum);

  initial begin : watchdog
    #100000;
    if (!done) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin : stimulus
    for (int t = 0; t < 500; t++) begin
      foreach (in_lane[l])
        case ($urandom_range(0, 3))
          0:       in_lane[l] = -8'sd128;
          1:       in_lane[l] = 8'sd127;
          default: in_lane[l] = W'($urandom);
        endcase
      #1;
      for (int i = 0; i < M; i++) begin
        checks += 3;
        if (even[i] != in_lane[2*i])   failures++;
        if (odd[i]  != in_lane[2*i+1]) failures++;
        if (int'(sum[i]) != int'(in_lane[2*i]) + int'(in_lane[2*i+1])) begin
          failures++;
          $display("sum lane %0d: got %0d", i, sum[i]);
        end
      end
    end
    done = 1'b1;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
