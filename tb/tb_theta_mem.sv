// tb_theta_mem: writes every atom of the Theta store with random words, then reads the whole
// array back and compares it with a copy kept here; also checks that a write to one atom
// leaves the others unchanged.
module tb_theta_mem;
  import omp_pkg::*;
  localparam int N = 256, M = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  logic wr_en = 0;
  logic [$clog2(N)-1:0] wr_col = '0;
  word_t wr_data [M];
  word_t theta [N][M];
  word_t shadow [N][M];
  int checks = 0, failures = 0;

  theta_mem #(.N(N), .M(M)) dut (.clk, .wr_en, .wr_col, .wr_data, .theta);

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare_all();
    for (int n = 0; n < N; n++)
      for (int m = 0; m < M; m++) begin
        checks++;
        if (theta[n][m] !== shadow[n][m]) begin
          failures++;
          if (failures < 10) $display("atom %0d sample %0d: %h vs %h", n, m, theta[n][m], shadow[n][m]);
        end
      end
  endtask

  initial begin
    for (int m = 0; m < M; m++) wr_data[m] = '0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        wr_en = (pass == 0) || ($urandom_range(3) == 0);
        wr_col = $clog2(N)'(n);
        for (int m = 0; m < M; m++) wr_data[m] = word_t'($urandom);
        if (wr_en) for (int m = 0; m < M; m++) shadow[n][m] = wr_data[m];
      end
      @(negedge clk);
      wr_en = 0;
      @(negedge clk);
      compare_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
