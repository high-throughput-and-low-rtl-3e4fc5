// tb_resid_unit: gives the residual calculator random data for iterations it = 0..15: chosen
// atoms (Q1.15), measurements y (Q4.12), earlier elements of Theta^T y and a symmetric C^-1
// with identity padding beyond 'it'. In the last cycle of the slot it checks the new element
// <theta_it, y>, the coefficients x = C^-1 b and the residual r = y - Theta_i x against
// floating-point values computed here (tolerances 1e-5 for b and x, 2 LSB for r), and that x
// is zero beyond 'it'.
module tb_resid_unit;
  import omp_pkg::*;
  localparam int M = 64, MS = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [CYCW-1:0] cyc = '0;
  logic [$clog2(MS+1)-1:0] it;
  word_t y [M];
  word_t ts [MS][M];
  fx_t b [MS];
  fx_t ci [MS][MS];
  fx_t bnew;
  fx_t x [MS];
  word_t r [M];
  int checks = 0, failures = 0;

  resid_unit #(.M(M), .MS(MS)) dut (.clk, .cyc, .it, .y_i(y), .tsel_i(ts), .b_i(b),
    .cinv_i(ci), .b_new_o(bnew), .x_o(x), .r_o(r));

  initial begin
    repeat (3000) @(posedge clk);
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
    for (int s = 0; s < MS; s++) begin
      real br [MS];
      real xr [MS];
      it = ($clog2(MS+1))'(s);
      for (int m = 0; m < M; m++) y[m] = word_t'($rtoi(u() * 4.0 * 4096.0));
      for (int k = 0; k < MS; k++) begin
        for (int m = 0; m < M; m++) ts[k][m] = (k <= s) ? word_t'($rtoi(u() * 0.5 * 32768.0)) : word_t'(0);
        b[k] = (k < s) ? fx_t'($rtoi(u() * 2.0 * 16777216.0)) : fx_t'($urandom);
      end
      for (int i = 0; i < MS; i++)
        for (int j = 0; j <= i; j++) begin
          fx_t v;
          v = (i <= s && j <= s) ? fx_t'($rtoi(u() * 16777216.0)) : ((i == j) ? FX_ONE : fx_t'(0));
          ci[i][j] = v; ci[j][i] = v;
        end
      // reference
      for (int k = 0; k < MS; k++) begin
        if (k < s) br[k] = real'(b[k]) / 16777216.0;
        else if (k > s) br[k] = 0.0;
        else begin
          br[k] = 0;
          for (int m = 0; m < M; m++) br[k] += (real'(ts[k][m]) / 32768.0) * (real'(y[m]) / 4096.0);
        end
      end
      for (int j = 0; j < MS; j++) begin
        xr[j] = 0;
        for (int k = 0; k < MS; k++) xr[j] += (real'(ci[j][k]) / 16777216.0) * br[k];
      end
      for (int cc = 0; cc < SLOT; cc++) begin
        cyc = CYCW'(cc);
        if (cc == SLOT - 1) begin
          #1;
          chk("b_new", real'(bnew) / 16777216.0, br[s], 1e-5);
          for (int j = 0; j < MS; j++)
            chk($sformatf("x[%0d]", j), real'(x[j]) / 16777216.0, xr[j], 1e-5);
          for (int m = 0; m < M; m++) begin
            real e;
            e = real'(y[m]) / 4096.0;
            for (int k = 0; k <= s; k++) e -= (real'(ts[k][m]) / 32768.0) * (real'(x[k]) / 16777216.0);
            if (e > 7.999) e = 7.999;
            if (e < -8.0) e = -8.0;
            chk($sformatf("r[%0d]", m), real'(r[m]) / 4096.0, e, 2.0 / 4096.0);
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
