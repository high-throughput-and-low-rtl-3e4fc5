// tb_da_lut: loads a DA look-up table with four random words, then streams the bit planes of
// random 4-word vectors on three lanes, least significant plane first with the sign plane
// subtracted, and checks each lane's accumulator against the integer dot product computed
// here. Extreme values (-1 and the largest positive word) are included.
module tb_da_lut;
  import omp_pkg::*;
  localparam int LANES = 3;
  logic clk = 0;
  always #5 clk = ~clk;
  logic load = 0, en = 0, first = 0, msb = 0;
  word_t tp [4];
  logic [3:0] addr [LANES];
  logic signed [2*DW+1:0] acc [LANES];
  word_t tq [LANES][4];
  int checks = 0, failures = 0;

  da_lut #(.LANES(LANES)) dut (.clk, .load, .tp, .en, .first, .msb_i(msb), .addr_i(addr), .acc_o(acc));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < LANES; g++) addr[g] = '0;
    for (int t = 0; t < 60; t++) begin
      @(negedge clk);
      for (int j = 0; j < 4; j++) begin
        tp[j] = word_t'($urandom);
        if (t == 0) tp[j] = word_t'(16'sh8000);
        if (t == 1) tp[j] = word_t'(16'sh7fff);
        for (int g = 0; g < LANES; g++) begin
          tq[g][j] = word_t'($urandom);
          if (t < 2) tq[g][j] = (g == 0) ? word_t'(16'sh8000) : word_t'(16'sh7fff);
        end
      end
      load = 1;
      @(negedge clk);
      load = 0;
      for (int b = 0; b < DW; b++) begin
        en = 1; first = (b == 0); msb = (b == DW - 1);
        for (int g = 0; g < LANES; g++)
          for (int j = 0; j < 4; j++) addr[g][j] = tq[g][j][b];
        @(negedge clk);
      end
      en = 0; first = 0; msb = 0;
      for (int g = 0; g < LANES; g++) begin
        longint e;
        e = 0;
        for (int j = 0; j < 4; j++) e += longint'(tp[j]) * longint'(tq[g][j]);
        checks++;
        if (longint'(acc[g]) != e) begin
          failures++;
          $display("test %0d lane %0d: %0d vs %0d", t, g, acc[g], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
