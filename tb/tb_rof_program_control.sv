// Testbench for rof_program_control at the default size (31-word window,
// 5-bit control words). Checks the reset settings, then applies directed
// and random control word pairs and compares the stored settings, the
// enable mask, the threshold and the error flag with a reference model
// that keeps the old settings on a rejected pair.
module tb_rof_program_control;
  localparam int MAXW = 31;
  localparam int CW   = 5;
  logic            clk = 0, rst_n = 0, prog_valid = 0;
  logic [CW-1:0]   prog_win_size = '0, prog_rank = '0;
  logic [CW-1:0]   win_size, rank, threshold;
  logic [MAXW-1:0] enable;
  logic            err_flag;
  int checks = 0, failures = 0;
  int m_ref = 31, r_ref = 16;
  bit err_ref = 0;
  int n_accept = 0, n_reject = 0;

  rof_program_control #(.MAX_WIN(MAXW), .CTRL_W(CW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_state(string tag);
    logic [MAXW-1:0] exp_en;
    exp_en = MAXW'((64'd1 << m_ref) - 1);
    checks++;
    if (int'(win_size) != m_ref || int'(rank) != r_ref || err_flag != err_ref ||
        int'(threshold) != m_ref - r_ref + 1 || enable != exp_en) begin
      failures++;
      $display("FAIL %s: m=%0d/%0d r=%0d/%0d thr=%0d err=%b/%b en=%h/%h", tag,
               win_size, m_ref, rank, r_ref, threshold, err_flag, err_ref, enable, exp_en);
    end
  endtask

  task automatic do_prog(int m, int r);
    @(negedge clk);
    prog_valid = 1; prog_win_size = CW'(m); prog_rank = CW'(r);
    @(negedge clk);
    prog_valid = 0;
    if (m >= 1 && m <= MAXW && r >= 1 && r <= m) begin
      m_ref = m; r_ref = r; err_ref = 0; n_accept++;
    end else begin
      err_ref = 1; n_reject++;
    end
    check_state($sformatf("prog m=%0d r=%0d", m, r));
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_state("reset");
    do_prog(5, 3);      // Table-1-like setting
    do_prog(0, 1);      // null window
    do_prog(7, 0);      // rank 0
    do_prog(4, 5);      // rank beyond window
    do_prog(1, 1);      // single word window: all-pass
    do_prog(31, 31);    // maximum
    do_prog(31, 1);     // minimum
    // prog_valid low: control words ignored
    @(negedge clk);
    prog_win_size = 5'd0; prog_rank = 5'd0;
    repeat (3) @(negedge clk);
    check_state("idle");
    for (int t = 0; t < 300; t++) begin
      do_prog($urandom % 32, $urandom % 32);
    end
    checks++;
    if (n_accept < 10 || n_reject < 10) begin
      failures++;
      $display("FAIL coverage accept=%0d reject=%0d", n_accept, n_reject);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
