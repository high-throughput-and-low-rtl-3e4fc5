// tb_pe3: accumulates 16 random products d^-1 * a_i * a_j in the composition processing
// element, starting with a clearing step, and checks the sum against floating point within
// 1e-5; repeated so that a missing clear would show.
module tb_pe3;
  import omp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0, clear = 0;
  fx_t dinv_in, a_in_i, a_in_j, c_out;
  int checks = 0, failures = 0;
  pe3 dut (.clk, .en, .clear, .dinv_in, .a_in_i, .a_in_j, .c_out);
  function automatic fx_t rnd(input real s);
    return fx_t'($rtoi((real'($urandom) / 4294967296.0 - 0.5) * 2.0 * s * 16777216.0));
  endfunction
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int t = 0; t < 20; t++) begin
      real e, g;
      e = 0;
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        en = 1; clear = (k == 0);
        dinv_in = rnd(2.0); a_in_i = rnd(1.0); a_in_j = rnd(1.0);
        e += real'(dinv_in) / 16777216.0 * real'(a_in_i) / 16777216.0 * real'(a_in_j) / 16777216.0;
      end
      @(negedge clk);
      en = 0; clear = 0;
      g = real'(c_out) / 16777216.0;
      checks++;
      if (g - e > 1e-5 || e - g > 1e-5) begin failures++; $display("sum %f vs %f", g, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
