// tb_pe1b: drives the off-diagonal LDL processing element with random operands and checks
// l = (c - s) * d^-1 after an enabled clock, the column-bus multiplexer (own l or l_in), and
// the running sum s_out = s_in + l * l_out * d (or s_in when add_en is low), all against
// floating-point values within 1e-5.
module tb_pe1b;
  import omp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, own_sel = 0, add_en = 0;
  fx_t c_in, s_in, d_in, dinv_in, l_in, l_val, l_out, s_out;
  int checks = 0, failures = 0;
  pe1b dut (.clk, .en, .own_sel, .add_en, .c_in, .s_in, .d_in, .dinv_in, .l_in, .l_val, .l_out, .s_out);
  function automatic fx_t rnd(input real scale);
    return fx_t'($rtoi((real'($urandom) / 4294967296.0 - 0.5) * 2.0 * scale * 16777216.0));
  endfunction
  function automatic real rl(input fx_t v);
    return real'(v) / 16777216.0;
  endfunction
  task automatic chk(input string w, input real g, input real e);
    checks++;
    if (g - e > 1e-5 || e - g > 1e-5) begin failures++; $display("%s %f vs %f", w, g, e); end
  endtask
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 100; t++) begin
      real le;
      @(negedge clk);
      c_in = rnd(1.0); s_in = rnd(0.5); d_in = rnd(1.0) + FX_ONE * 2; dinv_in = rnd(0.5) + FX_ONE;
      l_in = rnd(1.0); en = 1; own_sel = 0; add_en = 0;
      @(negedge clk);
      en = 0;
      le = rl(c_in - s_in) * rl(dinv_in);
      chk("l", rl(l_val), le);
      own_sel = 1; add_en = 1; #1;
      chk("l_out own", rl(l_out), rl(l_val));
      chk("s_out own", rl(s_out), rl(s_in) + rl(l_val) * rl(l_val) * rl(d_in));
      own_sel = 0; #1;
      chk("l_out pass", rl(l_out), rl(l_in));
      chk("s_out pass", rl(s_out), rl(s_in) + rl(l_val) * rl(l_in) * rl(d_in));
      add_en = 0; #1;
      chk("s_out off", rl(s_out), rl(s_in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
