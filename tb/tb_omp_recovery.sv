// tb_omp_recovery: recovery-rate runs at two points of the published recovery curves for
// N = 256 that this engine can hold (m <= 16, M a multiple of 4): M = 100 with m = 10, where
// the published rate is about 100 %, and M = 100 with m = 15, where it is about 97 %. Each
// run sends NF random frames through its own omp_top instance; every frame must match a
// floating-point OMP, and the fraction of frames whose support is recovered exactly must be
// at least 90 % (m = 10) and 80 % (m = 15). Has a watchdog.
module tb_omp_recovery;
  import omp_pkg::*;
  localparam int NF = 24;

  logic clk = 0;
  always #5 clk = ~clk;

  logic done_a, done_b;
  int   ca, fa, ra, cb, fb, rb;
  int   checks = 0, failures = 0;

  omp_recovery_run #(.N(256), .M(100), .MS(10), .NF(NF)) u_a (
    .clk, .done(done_a), .checks(ca), .failures(fa), .recovered(ra));
  omp_recovery_run #(.N(256), .M(100), .MS(15), .NF(NF)) u_b (
    .clk, .done(done_b), .checks(cb), .failures(fb), .recovered(rb));

  initial begin
    repeat (300 + (NF + 8) * 7 * 16 * SLOT) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk);
    wait (done_a && done_b);
    checks = ca + cb + 2;
    failures = fa + fb;
    $display("M=100 m=10: %0d of %0d frames recovered", ra, NF);
    $display("M=100 m=15: %0d of %0d frames recovered", rb, NF);
    if (ra * 10 < NF * 9) failures++;
    if (rb * 10 < NF * 8) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
