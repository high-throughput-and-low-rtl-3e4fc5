// tb_inv_unit: inverts random unit lower triangular matrices (off-diagonal entries in
// [-0.4, 0.4], Q8.24) with the PE2 array and checks, at slot cycle 15 (so within the stated
// 15 clocks), every element of L^-1 against a floating-point forward substitution of the same
// quantised matrix, to within 1e-4 relative to the element's size.
module tb_inv_unit;
  import omp_pkg::*;
  localparam int MS = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [CYCW-1:0] cyc = '0;
  fx_t l [MS][MS];
  fx_t a [MS][MS];
  real lr [MS][MS];
  real ar [MS][MS];
  int checks = 0, failures = 0;

  inv_unit #(.MS(MS)) dut (.clk, .cyc, .l_i(l), .a_o(a));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 6; s++) begin
      for (int i = 0; i < MS; i++)
        for (int j = 0; j < MS; j++) begin
          l[i][j] = (j < i) ? fx_t'($rtoi((real'($urandom) / 4294967296.0 - 0.5) * 0.8 * 16777216.0)) : fx_t'(0);
          lr[i][j] = (i == j) ? 1.0 : real'(l[i][j]) / 16777216.0;
        end
      for (int j = 0; j < MS; j++) begin
        ar[j][j] = 1.0;
        for (int i = j + 1; i < MS; i++) begin
          real v;
          v = 0;
          for (int k = j; k < i; k++) v -= lr[i][k] * ar[k][j];
          ar[i][j] = v;
        end
      end
      for (int cc = 0; cc < SLOT; cc++) begin
        cyc = CYCW'(cc);
        if (cc == MS - 1) begin
          #1;
          for (int i = 0; i < MS; i++)
            for (int j = 0; j < i; j++) begin
              real got, tol;
              got = real'(a[i][j]) / 16777216.0;
              tol = 1e-4 * (1.0 + (ar[i][j] < 0 ? -ar[i][j] : ar[i][j]));
              checks++;
              if (got - ar[i][j] > tol || ar[i][j] - got > tol) begin
                failures++;
                if (failures < 10) $display("a[%0d][%0d]: %f vs %f", i, j, got, ar[i][j]);
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
