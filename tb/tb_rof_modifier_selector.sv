// Testbench for rof_modifier_selector: all 16 input combinations against the
// cell's truth table (select = s_in AND (a_star == y); next bit = raw bit
// when selecting, else the propagated bit).
module tb_rof_modifier_selector;
  logic a_next, a_star, y, s_in, a_star_next, s_out;
  int checks = 0, failures = 0;

  rof_modifier_selector dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic exp_s, exp_a;
      {a_next, a_star, y, s_in} = 4'(v);
      #1;
      exp_s = (s_in == 1'b1) && (a_star == y);
      exp_a = exp_s ? a_next : a_star;
      checks += 2;
      if (s_out !== exp_s) begin
        failures++;
        $display("FAIL v=%0d s_out=%b exp=%b", v, s_out, exp_s);
      end
      if (a_star_next !== exp_a) begin
        failures++;
        $display("FAIL v=%0d a_star_next=%b exp=%b", v, a_star_next, exp_a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
