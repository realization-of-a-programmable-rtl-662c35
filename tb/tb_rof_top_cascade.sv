// Second end-to-end testbench for rof_top, at a different size: 12-bit words
// (twelve cascaded bit-plane stages), a window of at most 5 words and 3-bit
// control words. It checks that the filter scales with the word length, that
// the latency becomes 1 + WORD_W clocks, and that window words above the
// maximum window (6 and 7 fit in 3 bits) are rejected. Outputs are compared
// with a sort-based reference of the newest m samples.
module tb_rof_top_cascade;
  localparam int W = 12, MAXW = 5, CW = 3, LAT = W + 1;
  logic          clk = 0, rst_n = 0;
  logic          in_valid = 0, prog_valid = 0;
  logic [W-1:0]  in_word = '0;
  logic [CW-1:0] prog_win_size = '0, prog_rank = '0;
  logic          out_valid, err_flag;
  logic [W-1:0]  out_word;
  logic [CW-1:0] win_size, rank;

  rof_top #(.WORD_W(W), .MAX_WIN(MAXW), .CTRL_W(CW)) dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  int m_ref = MAXW, r_ref = (MAXW + 1) / 2;
  logic [W-1:0] hist [MAXW];
  logic [W-1:0] exp_q [$];
  longint       exp_t [$];
  int n_out = 0, n_too_big = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d %s (m=%0d r=%0d)", cycle, what, m_ref, r_ref);
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      if (exp_q.size() == 0) chk(0, "unexpected output");
      else begin
        logic [W-1:0] e;
        longint t0;
        e  = exp_q.pop_front();
        t0 = exp_t.pop_front();
        chk(out_word == e, $sformatf("out %0d exp %0d", out_word, e));
        chk(cycle - t0 == longint'(LAT), $sformatf("latency %0d", cycle - t0));
      end
    end
  end

  task automatic send(logic [W-1:0] w);
    logic [W-1:0] v [$];
    @(negedge clk);
    in_valid = 1; in_word = w;
    for (int j = MAXW - 1; j > 0; j--) hist[j] = hist[j-1];
    hist[0] = w;
    for (int j = 0; j < m_ref; j++) v.push_back(hist[j]);
    v.sort();
    exp_q.push_back(v[r_ref-1]);
    exp_t.push_back(cycle);
  endtask

  task automatic do_prog(int m, int r);
    bit ok;
    ok = (m >= 1 && m <= MAXW && r >= 1 && r <= m);
    repeat (LAT + 2) begin
      @(negedge clk);
      in_valid = 0;
    end
    chk(exp_q.size() == 0, "drained");
    prog_valid = 1; prog_win_size = CW'(m); prog_rank = CW'(r);
    @(negedge clk);
    prog_valid = 0;
    if (ok) begin
      m_ref = m; r_ref = r;
    end else if (m > MAXW) n_too_big++;
    chk(err_flag == !ok, $sformatf("err_flag after m=%0d r=%0d", m, r));
    chk(int'(win_size) == m_ref && int'(rank) == r_ref, "settings");
  endtask

  initial begin
    for (int j = 0; j < MAXW; j++) hist[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    chk(int'(win_size) == MAXW && int'(rank) == (MAXW + 1) / 2, "reset settings");
    for (int k = 0; k < 60; k++) begin
      do_prog($urandom % 8, $urandom % 8);
      repeat (30) begin
        if ($urandom % 5 == 0) begin
          @(negedge clk);
          in_valid = 0;
        end
        send(W'($urandom % ((k % 2 == 0) ? 16 : 4096)));
      end
    end
    do_prog(7, 2);
    do_prog(0, 0);
    chk(n_too_big > 0, "window above the maximum rejected");
    chk(n_out > 1000, "outputs produced");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
