// tb_pe1a: drives the diagonal LDL processing element with random c and s values and checks
// that d = c - s and 1/d (within 1e-5 relative) are registered when enabled and held when not.
module tb_pe1a;
  import omp_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic en = 0;
  fx_t c_in, s_in, d_out, dinv_out;
  int checks = 0, failures = 0;
  pe1a dut (.clk, .en, .c_in, .s_in, .d_out, .dinv_out);
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    fx_t hold_d;
    for (int t = 0; t < 100; t++) begin
      real dr, got;
      @(negedge clk);
      c_in = fx_t'($rtoi((0.25 + 4.0 * real'($urandom) / 4294967296.0) * 16777216.0));
      s_in = fx_t'($rtoi((real'($urandom) / 4294967296.0 - 0.5) * 0.4 * 16777216.0));
      en = 1;
      @(negedge clk);
      en = 0;
      checks++;
      if (d_out != c_in - s_in) begin failures++; $display("d %0d vs %0d", d_out, c_in - s_in); end
      dr = real'(c_in - s_in) / 16777216.0;
      got = real'(dinv_out) / 16777216.0;
      checks++;
      if ((got - 1.0 / dr) * dr > 1e-5 || (1.0 / dr - got) * dr > 1e-5) begin
        failures++; $display("dinv %f vs %f", got, 1.0 / dr);
      end
      hold_d = d_out;
      c_in = c_in + 12345;
      @(negedge clk);
      checks++;
      if (d_out != hold_d) begin failures++; $display("d changed while disabled"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
