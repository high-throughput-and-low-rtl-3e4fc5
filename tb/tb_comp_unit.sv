// tb_comp_unit: feeds the PE3 composition array random unit lower triangular A and
// reciprocals 1/d in [0.5, 2], and checks in the last cycle of the slot (the array runs in
// cycles 15..30) every element of the symmetric result against sum_k a_ki a_kj / d_kk
// computed here in floating point, to within 1e-4.
module tb_comp_unit;
  import omp_pkg::*;
  localparam int MS = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [CYCW-1:0] cyc = '0;
  fx_t a [MS][MS];
  fx_t dinv [MS];
  fx_t ci [MS][MS];
  real ar [MS][MS];
  real dr [MS];
  int checks = 0, failures = 0;

  comp_unit #(.MS(MS)) dut (.clk, .cyc, .a_i(a), .dinv_i(dinv), .cinv_o(ci));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 6; s++) begin
      for (int i = 0; i < MS; i++) begin
        dinv[i] = fx_t'($rtoi((0.5 + 1.5 * real'($urandom) / 4294967296.0) * 16777216.0));
        dr[i] = real'(dinv[i]) / 16777216.0;
        for (int j = 0; j < MS; j++) begin
          a[i][j] = (j < i) ? fx_t'($rtoi((real'($urandom) / 4294967296.0 - 0.5) * 16777216.0)) : fx_t'(0);
          ar[i][j] = (i == j) ? 1.0 : real'(a[i][j]) / 16777216.0;
        end
      end
      for (int cc = 0; cc < SLOT; cc++) begin
        cyc = CYCW'(cc);
        if (cc == SLOT - 1) begin
          #1;
          for (int i = 0; i < MS; i++)
            for (int j = 0; j < MS; j++) begin
              real e, got;
              e = 0;
              for (int k = 0; k < MS; k++) e += ar[k][i] * ar[k][j] * dr[k];
              got = real'(ci[i][j]) / 16777216.0;
              checks++;
              if (got - e > 1e-4 || e - got > 1e-4) begin
                failures++;
                if (failures < 10) $display("cinv[%0d][%0d]: %f vs %f", i, j, got, e);
              end
            end
        end
        @(posedge clk);
        #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
