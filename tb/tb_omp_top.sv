// tb_omp_top: end-to-end test of the pipelined OMP engine at reduced size (N=32, M=16, m=4), with the sum-of-products multiplier.
//
// Loads a random column-normalised Theta (Q1.15), then offers NF frames back to back. Each
// frame is y = Theta x for a random m-sparse x, rounded to Q4.12. A floating-point OMP
// (normal equations solved by Gaussian elimination) computed here from the same quantised
// Theta and y is the reference: the engine must choose the same atoms in the same order and
// return coefficients within 1e-3 of the reference. The test also checks the frame latency
// (7*m slots) and the admission rate (one new frame per slot until seven are in flight,
// then one per finished frame). It also counts the pipeline mechanisms (several frames in
// flight together, recirculation of a frame for its next iteration, a new frame held back
// because its slot is taken), fails if any never happened, and has a watchdog.
module tb_omp_top;
  import omp_pkg::*;

  localparam int N  = 32;
  localparam int M  = 16;
  localparam int MS = 4;
  localparam int NF = 9;
  localparam int TW = 8;
  localparam int LAT = 7 * MS * SLOT + 1;   // plus the output register

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

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

  omp_top #(.N(N), .M(M), .MS(MS), .TW(TW), .SOP(1'b1)) dut (
    .clk, .rst_n, .theta_wr_en, .theta_wr_col, .theta_wr_data,
    .in_valid, .in_ready, .in_y, .in_tag,
    .out_valid, .out_tag, .out_idx, .out_x, .slot_start, .frames_in_flight
  );

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // watchdog
  initial begin
    repeat (N + (NF + 8) * LAT + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ stimulus data
  word_t th_q [N][M];
  real   th   [N][M];
  word_t yq   [NF][M];
  int    ref_idx [NF][MS];
  real   ref_x   [NF][MS];

  function automatic real urand();
    return real'($urandom) / 4294967296.0;
  endfunction

  // floating-point OMP on quantised data
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
      // normal equations for the it+1 chosen atoms
      for (int p = 0; p <= it; p++) begin
        for (int q = 0; q <= it; q++) begin
          g[p][q] = 0.0;
          for (int m = 0; m < M; m++) g[p][q] += th[idx[p]][m] * th[idx[q]][m];
        end
        g[p][it+1] = 0.0;
        for (int m = 0; m < M; m++) g[p][it+1] += th[idx[p]][m] * yv[m];
      end
      for (int p = 0; p <= it; p++) begin
        for (int q = p + 1; q <= it; q++) begin
          real fct;
          fct = g[q][p] / g[p][p];
          for (int k = p; k <= it + 1; k++) g[q][k] -= fct * g[p][k];
        end
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
  endtask

  initial begin
    // Theta: sum of uniforms, columns normalised to unit length, Q1.15
    for (int n = 0; n < N; n++) begin
      real v [M];
      real nrm;
      nrm = 0.0;
      for (int m = 0; m < M; m++) begin
        v[m] = urand() + urand() + urand() - 1.5;
        nrm += v[m] * v[m];
      end
      nrm = $sqrt(nrm);
      for (int m = 0; m < M; m++) begin
        th_q[n][m] = word_t'($rtoi(v[m] / nrm * 32768.0));
        th[n][m]   = real'(th_q[n][m]) / 32768.0;
      end
    end
    // frames
    for (int f = 0; f < NF; f++) begin
      real xv [N];
      real ys;
      for (int n = 0; n < N; n++) xv[n] = 0.0;
      for (int k = 0; k < MS; k++) begin
        int p;
        do p = $urandom_range(N - 1); while (xv[p] != 0.0);
        xv[p] = (real'($urandom_range(128, 384)) / 256.0) * (($urandom_range(1) == 1) ? 1.0 : -1.0);
      end
      for (int m = 0; m < M; m++) begin
        ys = 0.0;
        for (int n = 0; n < N; n++) ys += th[n][m] * xv[n];
        yq[f][m] = word_t'($rtoi(ys * 4096.0 + (ys >= 0 ? 0.5 : -0.5)));
      end
      ref_omp(f);
    end
  end

  // ------------------------------------------------------------ drive
  int     nsent = 0;
  longint t_acc [NF];
  int     n_stall = 0, n_recirc_seen = 0, max_flight = 0, n_out = 0;

  initial begin
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
      if (in_ready) begin
        t_acc[nsent] = cycle;
        nsent++;
      end else if (slot_start == 1'b0 && dut.adv) begin
        n_stall++;    // a slot boundary passed with the frame held back
      end
      @(negedge clk);
    end
    in_valid = 0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (int'(frames_in_flight) > max_flight) max_flight = int'(frames_in_flight);
      if (dut.adv && dut.recirc) n_recirc_seen++;
    end
  end

  // ------------------------------------------------------------ check
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int f;
      f = int'(out_tag);
      n_out++;
      checks++;
      if (cycle - t_acc[f] != longint'(LAT)) begin
        failures++;
        $display("frame %0d latency %0d, expected %0d", f, cycle - t_acc[f], LAT);
      end
      for (int k = 0; k < MS; k++) begin
        real xh, d;
        checks++;
        xh = real'(out_x[k]) / 16777216.0;
        d  = xh - ref_x[f][k];
        if (int'(out_idx[k]) != ref_idx[f][k] || d > 1e-3 || d < -1e-3) begin
          failures++;
          $display("frame %0d atom %0d: got idx %0d x %f, expected idx %0d x %f",
                   f, k, out_idx[k], xh, ref_idx[f][k], ref_x[f][k]);
        end
      end
      if (n_out == NF) begin
        // admission rate: a new frame every slot until the ring is full, then one per frame out
        for (int g = 1; g < 7 && g < NF; g++) begin
          checks++;
          if (t_acc[g] - t_acc[g-1] != longint'(SLOT)) begin
            failures++; $display("frame %0d accepted %0d clocks after frame %0d", g, t_acc[g] - t_acc[g-1], g - 1);
          end
        end
        if (NF > 7) begin
          checks++;
          if (t_acc[7] - t_acc[0] != 7 * MS * SLOT) begin
            failures++; $display("frame 7 accepted %0d clocks after frame 0", t_acc[7] - t_acc[0]);
          end
        end
        checks++;
        if (max_flight < 2)     begin failures++; $display("never more than one frame in flight"); end
        checks++;
        if (n_recirc_seen == 0) begin failures++; $display("no recirculation"); end
        checks++;
        if (NF > 7 && n_stall == 0) begin failures++; $display("no input stall"); end
        $display("frames=%0d max_in_flight=%0d recirculations=%0d input_stalls=%0d",
                 n_out, max_flight, n_recirc_seen, n_stall);
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

endmodule
