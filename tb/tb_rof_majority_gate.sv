// Testbench for rof_majority_gate at 31 inputs: random bit planes, enable
// masks (windows of 1..31 words and random masks) and thresholds, compared
// with a count of the enabled ones; includes the counts right at the
// threshold.
module tb_rof_majority_gate;
  localparam int N  = 31;
  localparam int CW = $clog2(N + 1);
  logic [N-1:0]  bits, enable;
  logic [CW-1:0] threshold;
  logic          y;
  int checks = 0, failures = 0;

  rof_majority_gate #(.NIN(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 5000; t++) begin
      int m, ones;
      m = 1 + ($urandom % N);
      enable = (t % 3 == 0) ? N'($urandom) : N'((64'd1 << m) - 1);
      // bias the density so that counts near the threshold are common
      bits = N'($urandom);
      if (t % 2 == 0) bits = bits & N'($urandom);
      if (t % 5 == 0) bits = bits | N'($urandom);
      ones = $countones(bits & enable);
      case (t % 4)
        0: threshold = CW'(ones);
        1: threshold = CW'(ones + 1);
        default: threshold = CW'(1 + ($urandom % N));
      endcase
      #1;
      checks++;
      if (y !== (ones >= int'(threshold))) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d ones=%0d thr=%0d y=%b", t, ones, threshold, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
