// tb_tree_cmp: gives the tree comparator random correlations (with deliberate ties and
// already-chosen atoms masked) and checks that after log2(N) + 1 clocks of the slot the
// chosen atom is the lowest-indexed unmasked atom of largest magnitude, found by a linear
// search here. Also checks the all-masked case reports no candidate.
module tb_tree_cmp;
  import omp_pkg::*;
  localparam int N = 256, LG = $clog2(N);
  logic clk = 0;
  always #5 clk = ~clk;
  logic [CYCW-1:0] cyc = '0;
  corr_t corr [N];
  logic [N-1:0] mask;
  logic [LG-1:0] idx;
  logic found;
  int checks = 0, failures = 0;

  tree_cmp #(.N(N)) dut (.clk, .cyc, .corr_i(corr), .mask_i(mask), .idx_o(idx), .found_o(found));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 40; s++) begin
      int best, bi;
      for (int n = 0; n < N; n++) begin
        corr[n] = corr_t'($signed($urandom_range(2000))) - 1000;
        if (s % 4 == 1) corr[n] = corr_t'($signed($urandom_range(10))) - 5;   // many ties
        mask[n] = ($urandom_range(7) == 0);
        if (s == 39) mask[n] = 1'b1;
      end
      best = -1; bi = 0;
      for (int n = 0; n < N; n++) begin
        int a;
        a = int'(corr[n]) < 0 ? -int'(corr[n]) : int'(corr[n]);
        if (!mask[n] && a > best) begin best = a; bi = n; end
      end
      for (int c = 0; c < SLOT; c++) begin
        cyc = CYCW'(c);
        if (c == LG + 1) begin
          #1;
          checks++;
          if (s == 39) begin
            if (found) begin failures++; $display("all masked but found"); end
          end else if (!found || int'(idx) != bi) begin
            failures++;
            $display("slot %0d: got %0d (found %0d), expected %0d", s, idx, found, bi);
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
