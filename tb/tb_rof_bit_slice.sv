// Testbench for rof_bit_slice at the full 31-word size: random vectors,
// each word's outputs compared with a per-word reference of the cell.
module tb_rof_bit_slice;
  localparam int N = 31;
  logic [N-1:0] a_next, a_star, s_in, a_star_next, s_out;
  logic y;
  int checks = 0, failures = 0;

  rof_bit_slice #(.NWORDS(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      a_next = N'($urandom);
      a_star = N'($urandom);
      s_in   = (t % 4 == 0) ? '1 : N'($urandom);
      y      = 1'($urandom);
      #1;
      for (int j = 0; j < N; j++) begin
        logic es, ea;
        es = s_in[j] && (a_star[j] == y);
        ea = es ? a_next[j] : a_star[j];
        checks++;
        if (s_out[j] !== es || a_star_next[j] !== ea) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d j=%0d", t, j);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
