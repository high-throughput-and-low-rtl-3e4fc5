// tb_ldl_unit: builds Gram matrices C = G^T G of random column-normalised 64 x 16 matrices
// (the kind of matrix the OMP pipeline factors), quantises them to the internal Q8.24 format
// and runs the LDL array for one slot. In the last cycle of the slot (so within the stated 31
// clocks) L, D and 1/D must match a floating-point LDL^T factorisation of the same quantised
// matrix, computed here, to within 1e-4. One case uses the identity-padded matrix the pipeline
// sees in early iterations.
module tb_ldl_unit;
  import omp_pkg::*;
  localparam int MS = 16, MR = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [CYCW-1:0] cyc = '0;
  fx_t c [MS][MS];
  fx_t l [MS][MS];
  fx_t d [MS];
  fx_t dinv [MS];
  real cr [MS][MS];
  real lr [MS][MS];
  real dr [MS];
  int checks = 0, failures = 0;

  ldl_unit #(.MS(MS)) dut (.clk, .cyc, .c_i(c), .l_o(l), .d_o(d), .dinv_o(dinv));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real u();
    return real'($urandom) / 4294967296.0 - 0.5;
  endfunction

  task automatic chk(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      if (failures < 10) $display("%s: %f vs %f", what, got, exp);
    end
  endtask

  initial begin
    for (int s = 0; s < 6; s++) begin
      real g [MS][MR];
      int used;
      used = (s == 5) ? 5 : MS;
      for (int q = 0; q < MS; q++) begin
        real nrm;
        nrm = 0;
        for (int k = 0; k < MR; k++) begin g[q][k] = u(); nrm += g[q][k] * g[q][k]; end
        nrm = $sqrt(nrm);
        for (int k = 0; k < MR; k++) g[q][k] /= nrm;
      end
      for (int i = 0; i < MS; i++)
        for (int j = 0; j < MS; j++) begin
          real v;
          v = 0;
          for (int k = 0; k < MR; k++) v += g[i][k] * g[j][k];
          if (i >= used || j >= used) v = (i == j) ? 1.0 : 0.0;
          c[i][j]  = fx_t'($rtoi(v * 16777216.0));
          cr[i][j] = real'(c[i][j]) / 16777216.0;
        end
      // floating-point reference
      for (int j = 0; j < MS; j++) begin
        real sd;
        sd = cr[j][j];
        for (int k = 0; k < j; k++) sd -= lr[j][k] * lr[j][k] * dr[k];
        dr[j] = sd;
        for (int i = j + 1; i < MS; i++) begin
          real sl;
          sl = cr[i][j];
          for (int k = 0; k < j; k++) sl -= lr[i][k] * lr[j][k] * dr[k];
          lr[i][j] = sl / dr[j];
        end
      end
      for (int cc = 0; cc < SLOT; cc++) begin
        cyc = CYCW'(cc);
        if (cc == SLOT - 1) begin
          #1;
          for (int j = 0; j < MS; j++) begin
            chk($sformatf("d[%0d]", j), real'(d[j]) / 16777216.0, dr[j], 1e-4);
            chk($sformatf("dinv[%0d]", j), real'(dinv[j]) / 16777216.0, 1.0 / dr[j], 1e-4);
            for (int i = j + 1; i < MS; i++)
              chk($sformatf("l[%0d][%0d]", i, j), real'(l[i][j]) / 16777216.0, lr[i][j], 1e-4);
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
