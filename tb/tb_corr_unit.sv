// tb_corr_unit: drives one correlation computer (rows 32..63 of M = 64, N = 256 atoms) with a
// random Theta, residual and incoming partial sums for three slots, and checks at the last
// cycle of each slot that every output equals the partial sum plus the dot product over the
// unit's rows, computed here. Checking in the last cycle checks that the unit finishes
// within one 32-cycle slot.
module tb_corr_unit;
  import omp_pkg::*;
  localparam int N = 256, M = 64, ROW0 = 32, ROWS = 32;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [CYCW-1:0] cyc = '0;
  word_t theta [N][M];
  word_t r [M];
  corr_t psum [N];
  corr_t corr [N];
  int checks = 0, failures = 0;

  corr_unit #(.N(N), .M(M), .ROW0(ROW0), .ROWS(ROWS)) dut (
    .clk, .cyc, .theta, .r, .psum_i(psum), .corr_o(corr));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3; s++) begin
      for (int n = 0; n < N; n++) begin
        psum[n] = corr_t'($signed($urandom_range(2000000))) - 1000000;
        for (int m = 0; m < M; m++) theta[n][m] = word_t'($urandom);
      end
      for (int m = 0; m < M; m++) r[m] = word_t'($urandom);
      for (int c = 0; c < SLOT; c++) begin
        cyc = CYCW'(c);
        if (c == SLOT - 1) begin
          #1;
          for (int n = 0; n < N; n++) begin
            longint e;
            e = longint'(psum[n]);
            for (int k = 0; k < ROWS; k++) e += longint'(theta[n][ROW0+k]) * longint'(r[ROW0+k]);
            checks++;
            if (longint'(corr[n]) != e) begin
              failures++;
              if (failures < 10) $display("slot %0d atom %0d: %0d vs %0d", s, n, corr[n], e);
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
