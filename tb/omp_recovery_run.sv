// omp_recovery_run: testbench helper that runs NF random m-sparse frames through one omp_top
// of size (N, M, MS) and counts how many frames have their support recovered exactly (the set
// of chosen atoms equals the set of non-zero positions of x). Each frame whose support the
// floating-point OMP on the same quantised data recovers is also compared with it: the same
// atoms (in any order, since near-equal correlations may swap two picks) with coefficients
// within 1e-3. Where the reference itself fails, its later picks are near-ties between wrong
// atoms that rounding may settle either way, so those frames are only counted. Theta is
// random, column-normalised, Q1.15; the non-zero values of x are +-[0.5, 1.5]. 'done' rises
// when all NF frames have come out.
module omp_recovery_run
  import omp_pkg::*;
#(
  parameter int N  = 256,
  parameter int M  = 100,
  parameter int MS = 10,
  parameter int NF = 20
) (
  input  logic clk,
  output logic done,
  output int   checks,
  output int   failures,
  output int   recovered
);
  localparam int TW = 8;

  logic rst_n = 0;
  logic                 theta_wr_en;
  logic [$clog2(N)-1:0] theta_wr_col;
  word_t                theta_wr_data [M];
  logic                 in_valid, in_ready;
  word_t                in_y [M];
  logic [TW-1:0]        in_tag;
  logic                 out_valid;
  logic [TW-1:0]        out_tag;
  logic [$clog2(N)-1:0] out_idx [MS];
  fx_t                  out_x [MS];
  logic                 slot_start;
  logic [2:0]           frames_in_flight;

  omp_top #(.N(N), .M(M), .MS(MS), .TW(TW)) dut (
    .clk, .rst_n, .theta_wr_en, .theta_wr_col, .theta_wr_data,
    .in_valid, .in_ready, .in_y, .in_tag,
    .out_valid, .out_tag, .out_idx, .out_x, .slot_start, .frames_in_flight
  );

  word_t th_q [N][M];
  real   th   [N][M];
  word_t yq   [NF][M];
  bit    supp [NF][N];
  int    ref_idx [NF][MS];
  real   ref_x   [NF][MS];
  bit    ref_ok  [NF];

  function automatic real urand();
    return real'($urandom) / 4294967296.0;
  endfunction

  task automatic ref_omp(input int f);
    real r [M];
    real yv [M];
    int  idx [MS];
    bit  used [N];
    real g [MS][MS+1];
    real xs [MS];
    for (int m = 0; m < M; m++) begin yv[m] = real'(yq[f][m]) / 4096.0; r[m] = yv[m]; end
    for (int n = 0; n < N; n++) used[n] = 0;
    for (int it = 0; it < MS; it++) begin
      real best; int bi;
      best = -1.0; bi = 0;
      for (int n = 0; n < N; n++) begin
        real c;
        c = 0.0;
        for (int m = 0; m < M; m++) c += th[n][m] * r[m];
        if (c < 0) c = -c;
        if (!used[n] && c > best) begin best = c; bi = n; end
      end
      used[bi] = 1; idx[it] = bi;
      for (int p = 0; p <= it; p++) begin
        for (int q = 0; q <= it; q++) begin
          g[p][q] = 0.0;
          for (int m = 0; m < M; m++) g[p][q] += th[idx[p]][m] * th[idx[q]][m];
        end
        g[p][it+1] = 0.0;
        for (int m = 0; m < M; m++) g[p][it+1] += th[idx[p]][m] * yv[m];
      end
      for (int p = 0; p <= it; p++)
        for (int q = p + 1; q <= it; q++) begin
          real fct;
          fct = g[q][p] / g[p][p];
          for (int k = p; k <= it + 1; k++) g[q][k] -= fct * g[p][k];
        end
      for (int p = it; p >= 0; p--) begin
        real s;
        s = g[p][it+1];
        for (int k = p + 1; k <= it; k++) s -= g[p][k] * xs[k];
        xs[p] = s / g[p][p];
      end
      for (int m = 0; m < M; m++) begin
        real s;
        s = yv[m];
        for (int p = 0; p <= it; p++) s -= th[idx[p]][m] * xs[p];
        r[m] = s;
      end
    end
    for (int p = 0; p < MS; p++) begin ref_idx[f][p] = idx[p]; ref_x[f][p] = xs[p]; end
    ref_ok[f] = 1;
    for (int p = 0; p < MS; p++) if (!supp[f][idx[p]]) ref_ok[f] = 0;
  endtask

  int nsent = 0, n_out = 0;

  initial begin
    done = 0; checks = 0; failures = 0; recovered = 0;
    for (int n = 0; n < N; n++) begin
      real v [M];
      real nrm;
      nrm = 0.0;
      for (int m = 0; m < M; m++) begin v[m] = urand() + urand() + urand() - 1.5; nrm += v[m] * v[m]; end
      nrm = $sqrt(nrm);
      for (int m = 0; m < M; m++) begin
        th_q[n][m] = word_t'($rtoi(v[m] / nrm * 32768.0));
        th[n][m]   = real'(th_q[n][m]) / 32768.0;
      end
    end
    for (int f = 0; f < NF; f++) begin
      real xv [N];
      real ys;
      for (int n = 0; n < N; n++) begin xv[n] = 0.0; supp[f][n] = 0; end
      for (int k = 0; k < MS; k++) begin
        int p;
        do p = $urandom_range(N - 1); while (xv[p] != 0.0);
        xv[p] = (real'($urandom_range(128, 384)) / 256.0) * (($urandom_range(1) == 1) ? 1.0 : -1.0);
        supp[f][p] = 1;
      end
      for (int m = 0; m < M; m++) begin
        ys = 0.0;
        for (int n = 0; n < N; n++) ys += th[n][m] * xv[n];
        yq[f][m] = word_t'($rtoi(ys * 4096.0 + (ys >= 0 ? 0.5 : -0.5)));
      end
      ref_omp(f);
    end
    theta_wr_en = 0; theta_wr_col = '0; in_valid = 0; in_tag = '0;
    for (int m = 0; m < M; m++) begin theta_wr_data[m] = '0; in_y[m] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      theta_wr_en = 1; theta_wr_col = $clog2(N)'(n);
      for (int m = 0; m < M; m++) theta_wr_data[m] = th_q[n][m];
    end
    @(negedge clk);
    theta_wr_en = 0;
    while (nsent < NF) begin
      in_valid = 1; in_tag = TW'(nsent);
      for (int m = 0; m < M; m++) in_y[m] = yq[nsent][m];
      @(posedge clk);
      if (in_ready) nsent++;
      @(negedge clk);
    end
    in_valid = 0;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int f, hit;
      f = int'(out_tag);
      hit = 0;
      for (int k = 0; k < MS; k++) begin
        real xh, d;
        int  j;
        xh = real'(out_x[k]) / 16777216.0;
        j = -1;
        for (int p = 0; p < MS; p++) if (ref_idx[f][p] == int'(out_idx[k])) j = p;
        d = (j >= 0) ? xh - ref_x[f][j] : 1.0;
        if (ref_ok[f]) begin
          checks++;
          if (j < 0 || d > 1e-3 || d < -1e-3) begin
            failures++;
            $display("N=%0d M=%0d m=%0d frame %0d atom %0d: idx %0d x %f not in the reference",
                     N, M, MS, f, k, out_idx[k], xh);
          end
        end
        if (supp[f][out_idx[k]]) hit++;
      end
      if (hit == MS) recovered++;
      n_out++;
      if (n_out == NF) done = 1;
    end
  end
endmodule
