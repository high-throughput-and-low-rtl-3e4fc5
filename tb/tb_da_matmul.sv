// tb_da_matmul: gives the DA matrix multiplication unit (M = 64, 16 lanes) a random new atom
// and 16 random atoms, runs one 32-cycle slot and checks at its last cycle that every lane
// holds the exact integer dot product of the two atoms, computed here.
module tb_da_matmul;
  import omp_pkg::*;
  localparam int M = 64, LANES = 16;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [CYCW-1:0] cyc = '0;
  word_t tp [M];
  word_t tq [LANES][M];
  logic signed [2*DW+1+$clog2(M/4):0] c [LANES];
  int checks = 0, failures = 0;

  da_matmul #(.M(M), .LANES(LANES)) dut (.clk, .cyc, .theta_p(tp), .theta_q(tq), .c_o(c));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 6; s++) begin
      for (int m = 0; m < M; m++) begin
        tp[m] = word_t'($urandom);
        for (int q = 0; q < LANES; q++) tq[q][m] = word_t'($urandom);
      end
      if (s == 0) for (int m = 0; m < M; m++) begin
        tp[m] = word_t'(16'sh8000);
        for (int q = 0; q < LANES; q++) tq[q][m] = word_t'(16'sh8000);
      end
      for (int cc = 0; cc < SLOT; cc++) begin
        cyc = CYCW'(cc);
        if (cc == SLOT - 1) begin
          #1;
          for (int q = 0; q < LANES; q++) begin
            longint e;
            e = 0;
            for (int m = 0; m < M; m++) e += longint'(tp[m]) * longint'(tq[q][m]);
            checks++;
            if (longint'(c[q]) != e) begin
              failures++;
              $display("slot %0d lane %0d: %0d vs %0d", s, q, c[q], e);
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
