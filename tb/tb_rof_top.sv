// End-to-end testbench for rof_top at its default size (8-bit words, window
// of up to 31 words, 5-bit control words).
//
// A reference model keeps the newest 31 samples (zeros after reset) and, for
// every accepted sample, sorts the newest m of them and takes the r-th
// smallest. Each output is compared with the reference and must come exactly
// 9 clocks after its sample. The test runs:
//   - the worked example of the algorithm: samples 184, 105, 194, 117, 75
//     with m = 5, r = 3 give 117;
//   - streams with back-to-back samples and with gaps, at medians, minimum,
//     maximum, the all-pass window m = 1 and the full 31-word window;
//   - rejected control words (null window, rank 0, rank above the window),
//     sent while samples stream: err_flag must rise and filtering must go on
//     with the old settings.
// Each mechanism is counted; one that never happened counts as a failure.
module tb_rof_top;
  localparam int W = 8, MAXW = 31, CW = 5, LAT = 9;
  logic          clk = 0, rst_n = 0;
  logic          in_valid = 0, prog_valid = 0;
  logic [W-1:0]  in_word = '0;
  logic [CW-1:0] prog_win_size = '0, prog_rank = '0;
  logic          out_valid, err_flag;
  logic [W-1:0]  out_word;
  logic [CW-1:0] win_size, rank;

  rof_top dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  int m_ref = 31, r_ref = 16;
  logic [W-1:0] hist [MAXW];
  // expected outputs and the cycle their sample was presented
  logic [W-1:0] exp_q [$];
  longint       exp_t [$];
  // mechanism counters
  int n_out = 0, n_b2b = 0, n_gap = 0, n_prog_ok = 0, n_err_null = 0, n_err_rank0 = 0,
      n_err_big = 0, n_allpass = 0, n_full = 0, n_min = 0, n_max = 0, n_prop = 0, n_tie = 0;
  bit last_out = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #5000000;
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

  // r-th smallest of the newest m words, and whether the algorithm has to
  // propagate a deviating bit of some word (any word differing from the
  // result above its LSB).
  function automatic logic [W-1:0] ref_rank(int m, int r, output bit prop, output bit tie);
    logic [W-1:0] v [$];
    logic [W-1:0] res;
    for (int j = 0; j < m; j++) v.push_back(hist[j]);
    v.sort();
    res  = v[r-1];
    prop = 0;
    tie  = 0;
    for (int j = 0; j < m; j++) begin
      if ((v[j] >> 1) != (res >> 1)) prop = 1;
      if (j != r - 1 && v[j] == res) tie = 1;
    end
    return res;
  endfunction

  // output monitor
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      if (last_out) n_b2b++;
      if (exp_q.size() == 0) begin
        chk(0, "unexpected output");
      end else begin
        logic [W-1:0] e;
        longint t0;
        e  = exp_q.pop_front();
        t0 = exp_t.pop_front();
        chk(out_word == e, $sformatf("out %0d exp %0d", out_word, e));
        chk(cycle - t0 == longint'(LAT), $sformatf("latency %0d exp %0d", cycle - t0, LAT));
      end
    end
    last_out <= rst_n && out_valid;
  end

  task automatic send(logic [W-1:0] w);
    bit p, t;
    @(negedge clk);
    in_valid = 1; in_word = w;
    for (int j = MAXW - 1; j > 0; j--) hist[j] = hist[j-1];
    hist[0] = w;
    exp_q.push_back(ref_rank(m_ref, r_ref, p, t));
    exp_t.push_back(cycle);
    if (p) n_prop++;
    if (t) n_tie++;
    if (m_ref == 1) n_allpass++;
    if (m_ref == MAXW) n_full++;
    if (r_ref == 1 && m_ref > 1) n_min++;
    if (r_ref == m_ref && m_ref > 1) n_max++;
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 0; in_word = W'($urandom);
    end
  endtask

  task automatic drain();
    idle(LAT + 2);
    chk(exp_q.size() == 0, "pipeline drained");
  endtask

  // control words; valid ones are only sent with the pipeline drained
  task automatic do_prog(int m, int r, bit streaming);
    bit ok;
    ok = (m >= 1 && m <= MAXW && r >= 1 && r <= m);
    if (streaming) begin
      send(W'($urandom));
      prog_valid = 1; prog_win_size = CW'(m); prog_rank = CW'(r);
    end else begin
      @(negedge clk);
      in_valid = 0;
      prog_valid = 1; prog_win_size = CW'(m); prog_rank = CW'(r);
    end
    @(negedge clk);
    prog_valid = 0;
    in_valid = 0;
    if (ok) begin
      m_ref = m; r_ref = r; n_prog_ok++;
    end else if (m == 0) n_err_null++;
    else if (r == 0) n_err_rank0++;
    else n_err_big++;
    chk(err_flag == !ok, $sformatf("err_flag after m=%0d r=%0d", m, r));
    chk(int'(win_size) == m_ref && int'(rank) == r_ref, "settings retained/updated");
  endtask

  task automatic stream(int n, int gap_pct, int maxval);
    for (int k = 0; k < n; k++) begin
      if (($urandom % 100) < gap_pct) begin
        idle(1 + $urandom % 3);
        n_gap++;
      end
      send(W'($urandom % maxval));
    end
  endtask

  initial begin
    for (int j = 0; j < MAXW; j++) hist[j] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    chk(win_size == 5'd31 && rank == 5'd16 && !err_flag, "reset settings");

    // worked example: 5 words, rank 3
    do_prog(5, 3, 0);
    send(8'd184); send(8'd105); send(8'd194); send(8'd117); send(8'd75);
    chk(exp_q[$] == 8'd117, "reference gives 117 for the worked example");
    drain();

    // reset-default median of 31 after this design's reset? exercise the
    // full window: median, minimum and maximum
    do_prog(31, 16, 0); stream(200, 0, 256);  drain();
    do_prog(31, 1, 0);  stream(100, 20, 256); drain();
    do_prog(31, 31, 0); stream(100, 20, 256); drain();
    // all-pass
    do_prog(1, 1, 0);   stream(60, 30, 256);  drain();
    // small values and ties
    do_prog(9, 5, 0);   stream(150, 10, 4);   drain();
    // rejected control words while streaming; settings must hold
    do_prog(0, 3, 1);  stream(20, 0, 256);
    do_prog(12, 0, 1); stream(20, 0, 256);
    do_prog(6, 7, 1);  stream(20, 0, 256);
    drain();
    // random settings
    for (int k = 0; k < 40; k++) begin
      int m, r;
      m = 1 + $urandom % MAXW;
      r = 1 + $urandom % m;
      do_prog(m, r, 0);
      stream(40, 15, (k % 3 == 0) ? 8 : 256);
      if (k % 4 == 0) begin
        // an invalid pair while streaming: null window, rank 0 or rank > m
        case (k % 3)
          0: do_prog(0, 1 + $urandom % 31, 1);
          1: do_prog(1 + $urandom % 31, 0, 1);
          default: do_prog(1 + $urandom % 30, 31, 1);
        endcase
        stream(10, 0, 256);
      end
      drain();
    end

    $display("mechanisms: outputs=%0d back_to_back=%0d gaps=%0d prog_ok=%0d err_null=%0d err_rank0=%0d err_big=%0d allpass=%0d full_window=%0d min=%0d max=%0d propagation=%0d ties=%0d",
             n_out, n_b2b, n_gap, n_prog_ok, n_err_null, n_err_rank0, n_err_big,
             n_allpass, n_full, n_min, n_max, n_prop, n_tie);
    chk(n_b2b > 0, "back-to-back outputs seen");
    chk(n_gap > 0, "input gaps seen");
    chk(n_prog_ok > 0, "accepted programming seen");
    chk(n_err_null > 0, "null window rejected");
    chk(n_err_rank0 > 0, "rank 0 rejected");
    chk(n_err_big > 0, "rank above window rejected");
    chk(n_allpass > 0, "all-pass window used");
    chk(n_full > 0, "full window used");
    chk(n_min > 0 && n_max > 0, "minimum and maximum ranks used");
    chk(n_prop > 0, "bit propagation exercised");
    chk(n_tie > 0, "equal words exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
