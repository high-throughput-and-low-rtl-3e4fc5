// tb_pe2: runs the inversion processing element through short sequences: a first step that
// takes l_p, optional accumulation steps with (l, a) pairs arriving on the row path and the
// column bus, and a finishing step. The registered a_ij must equal -(l_p + sum l*a) within
// 1e-5, the column bus must carry the PE's own value on the finishing step and forward a_in
// otherwise, and the row path must forward l_first on the first step and the shifted value
// after it.
module tb_pe2;
  import omp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic step = 0, first = 0, fin = 0, upd = 0;
  fx_t l_p, l_first, l_in, a_in, l_out, a_out, a_val;
  int checks = 0, failures = 0;
  pe2 dut (.clk, .step, .first, .fin, .upd, .l_p, .l_first, .l_in, .a_in, .l_out, .a_out, .a_val);
  function automatic fx_t rnd();
    return fx_t'($rtoi((real'($urandom) / 4294967296.0 - 0.5) * 16777216.0));
  endfunction
  function automatic real rl(input fx_t v);
    return real'(v) / 16777216.0;
  endfunction
  task automatic chk(input string w, input real g, input real e);
    checks++;
    if (g - e > 1e-5 || e - g > 1e-5) begin failures++; $display("%s %f vs %f", w, g, e); end
  endtask
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 60; t++) begin
      int nacc;
      real acc;
      fx_t next_l;
      nacc = t % 5;
      @(negedge clk);
      l_p = rnd(); l_first = rnd(); l_in = rnd(); a_in = rnd();
      acc = rl(l_p);
      next_l = l_first;
      step = 1; first = 1;
      for (int k = 0; k <= nacc; k++) begin
        fin = (k == nacc); upd = (k < nacc);
        #1;
        chk("l_out", rl(l_out), rl(next_l));
        if (fin) chk("a_out own", rl(a_out), -acc);
        else     chk("a_out pass", rl(a_out), rl(a_in));
        if (upd) acc += rl(next_l) * rl(a_in);
        next_l = l_in;
        @(negedge clk);
        first = 0;
        l_in = rnd(); a_in = rnd();
      end
      step = 0; fin = 0; upd = 0;
      chk("a_val", rl(a_val), -acc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
