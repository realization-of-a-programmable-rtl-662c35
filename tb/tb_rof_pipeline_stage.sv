// Testbench for rof_pipeline_stage: a middle stage (bit plane 5) and the
// last stage (plane 0) of an 8-bit, 31-word filter, driven with random
// window words, modified bits, selects, enable masks and thresholds. After
// each clock edge the registered outputs are compared with a reference:
// y = (enabled ones >= threshold), result bit = y, and for the middle stage
// the per-word select/modified-bit update from the raw bits of plane 4.
// Also checks that the stage holds one cycle of latency for valid.
module tb_rof_pipeline_stage;
  localparam int N = 31, W = 8, CW = 5, B = 5;
  logic                clk = 0, rst_n = 0;
  logic [N-1:0]        enable;
  logic [CW-1:0]       threshold;
  logic                in_valid;
  logic [N-1:0][W-1:0] in_words;
  logic [N-1:0]        in_astar, in_sel;
  logic [W-1:0]        in_result;
  logic                ov_m, ov_l;
  logic [N-1:0][W-1:0] ow_m, ow_l;
  logic [N-1:0]        oa_m, os_m, oa_l, os_l;
  logic [W-1:0]        or_m, or_l;
  int checks = 0, failures = 0;

  rof_pipeline_stage #(.NWORDS(N), .WORD_W(W), .BIT(B)) dut_mid (
    .clk, .rst_n, .enable, .threshold, .in_valid, .in_words, .in_astar, .in_sel, .in_result,
    .out_valid(ov_m), .out_words(ow_m), .out_astar(oa_m), .out_sel(os_m), .out_result(or_m));
  rof_pipeline_stage #(.NWORDS(N), .WORD_W(W), .BIT(0)) dut_last (
    .clk, .rst_n, .enable, .threshold, .in_valid, .in_words, .in_astar, .in_sel, .in_result,
    .out_valid(ov_l), .out_words(ow_l), .out_astar(oa_l), .out_sel(os_l), .out_result(or_l));

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what, int t);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0d %s", t, what);
    end
  endtask

  initial begin
    in_valid = 0; enable = '0; threshold = '0; in_words = '0;
    in_astar = '0; in_sel = '0; in_result = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int m, ones;
      logic y;
      logic [N-1:0] es, ea;
      logic [W-1:0] er_m, er_l;
      @(negedge clk);
      m         = 1 + ($urandom % N);
      enable    = N'((64'd1 << m) - 1);
      in_valid  = 1'($urandom);
      for (int j = 0; j < N; j++) in_words[j] = W'($urandom);
      in_astar  = N'($urandom);
      in_sel    = (t % 3 == 0) ? '1 : N'($urandom);
      in_result = W'($urandom);
      ones      = $countones(in_astar & enable);
      threshold = (t % 2 == 0) ? CW'(ones) + CW'($urandom % 2) : CW'(1 + ($urandom % m));
      // reference
      y = (ones >= int'(threshold));
      for (int j = 0; j < N; j++) begin
        es[j] = in_sel[j] && (in_astar[j] == y);
        ea[j] = es[j] ? in_words[j][B-1] : in_astar[j];
      end
      er_m = in_result; er_m[B] = y;
      er_l = in_result; er_l[0] = y;
      @(posedge clk);
      #1;
      chk(ov_m == in_valid && ov_l == in_valid, "valid", t);
      chk(ow_m == in_words && ow_l == in_words, "words", t);
      chk(or_m == er_m, $sformatf("mid result %h exp %h", or_m, er_m), t);
      chk(or_l == er_l, $sformatf("last result %h exp %h", or_l, er_l), t);
      chk(os_m == es, "mid sel", t);
      chk(oa_m == ea, "mid astar", t);
      chk(oa_l == in_astar && os_l == in_sel, "last pass", t);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
