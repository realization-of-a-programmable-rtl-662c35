// Testbench for rof_window_shift_reg at the default 31 x 8-bit size: random
// samples with random gaps in in_valid; the window is compared every cycle
// with a reference queue of the newest samples (newest at index 0), and
// win_valid with in_valid of the previous cycle.
module tb_rof_window_shift_reg;
  localparam int N = 31, W = 8;
  logic                 clk = 0, rst_n = 0, in_valid = 0, win_valid;
  logic [W-1:0]         in_word = '0;
  logic [N-1:0][W-1:0]  words;
  logic [W-1:0]         ref_q [N];
  logic                 ref_v = 0;
  int checks = 0, failures = 0;

  rof_window_shift_reg #(.NWORDS(N), .WORD_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (ref_q[j]) ref_q[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      // compare state produced by the previous edge
      checks++;
      if (win_valid != ref_v) begin
        failures++;
        $display("FAIL t=%0d win_valid=%b exp=%b", t, win_valid, ref_v);
      end
      for (int j = 0; j < N; j++) begin
        checks++;
        if (words[j] != ref_q[j]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d word %0d = %0d exp %0d", t, j, words[j], ref_q[j]);
        end
      end
      in_valid = ($urandom % 4) != 0;
      in_word  = W'($urandom);
      // reference update for the coming edge
      ref_v = in_valid;
      if (in_valid) begin
        for (int j = N - 1; j > 0; j--) ref_q[j] = ref_q[j-1];
        ref_q[0] = in_word;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
