// omp_top: seven-stage pipelined orthogonal matching pursuit (OMP) reconstruction engine.
//
// Recovers an m-sparse vector x (N entries) from M measurements y = Theta x. Each OMP
// iteration is cut into seven stages of one time slot (SLOT = 32 clocks) each:
//   1  corr_unit   first half of <theta_n, r> for all N atoms
//   2  corr_unit   second half, giving the full correlations
//   3  tree_cmp    argmax |<theta_n, r>| over the atoms not yet chosen; the atom joins Theta_i
//   4  da_matmul   new row of C = Theta_i^T Theta_i, by distributed arithmetic
//                  (sop_matmul, by sums of products, when SOP = 1)
//   5  ldl_unit    C = L D L^T
//   6  inv_unit    A = L^-1, then comp_unit C^-1 = A^T D^-1 A
//   7  resid_unit  x = C^-1 Theta_i^T y, r = y - Theta_i x
// A frame (one measurement vector) occupies one stage at a time and moves on at every slot
// boundary; after stage 7 it returns to stage 1 for its next iteration until m iterations are
// done. The seven stages therefore work on up to seven different frames at once. Everything a
// frame carries between stages (y, r, chosen atoms, C, <theta_k, y>) travels with it in
// per-stage registers; the results of stages 1, 2, 5 and 6 are captured into registers at the
// slot boundary so the producing unit can start its next frame.
//
// Interface. Load Theta first, one atom per clock (theta_wr_en/_col/_data); it must not change
// while frames are in flight. A new frame is offered on in_valid/in_y/in_tag and is taken in
// the cycle where in_valid and in_ready are both high; in_ready is high for one clock at a slot
// boundary when stage 1 will be free (no frame returning from stage 7 for another iteration).
// A finished frame appears for one clock on out_valid with its tag, the m chosen atom indices
// (in order of choice) and their coefficients in the Q8.24 internal format. There is no output
// back-pressure. Latency: the frame is accepted at a slot boundary and is output at the
// boundary that ends its 7*m-th slot (7*16*32 = 3584 clocks at the defaults); at most seven
// frames are in flight, one frame per 16 slots (512 clocks) on average at full load.
// SOP selects the stage-4 multiplier: 0 (default) for distributed arithmetic, 1 for the
// sum-of-products unit. Both give the same exact result and the same slot timing.
// The stage order and the 32-cycle slot follow the document (its Figure 1); the frame
// bookkeeping, interface and number formats are this design's own choices.
module omp_top
  import omp_pkg::*;
#(
  parameter int N  = 256,
  parameter int M  = 64,
  parameter int MS = 16,
  parameter int TW = 8,
  parameter bit SOP = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // Theta load port
  input  logic                 theta_wr_en,
  input  logic [$clog2(N)-1:0] theta_wr_col,
  input  word_t                theta_wr_data [M],
  // frame input
  input  logic                 in_valid,
  output logic                 in_ready,
  input  word_t                in_y [M],
  input  logic [TW-1:0]        in_tag,
  // reconstruction output
  output logic                 out_valid,
  output logic [TW-1:0]        out_tag,
  output logic [$clog2(N)-1:0] out_idx [MS],
  output fx_t                  out_x   [MS],
  // status
  output logic                 slot_start,
  output logic [2:0]           frames_in_flight
);

  localparam int NS  = 7;
  localparam int LGN = $clog2(N);
  localparam int ITW = $clog2(MS + 1);
  localparam int LGM = $clog2(MS);

  // ---------------------------------------------------------------- slot timing
  logic [CYCW-1:0] cyc;
  logic            adv;
  assign adv        = (cyc == CYCW'(SLOT - 1));
  assign slot_start = (cyc == '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cyc <= '0;
    else        cyc <= adv ? '0 : cyc + 1'b1;
  end

  // ---------------------------------------------------------------- Theta store
  word_t theta [N][M];
  theta_mem #(.N(N), .M(M)) u_theta (
    .clk     (clk),
    .wr_en   (theta_wr_en),
    .wr_col  (theta_wr_col),
    .wr_data (theta_wr_data),
    .theta   (theta)
  );

  // ---------------------------------------------------------------- per-stage frame state
  logic           f_v   [NS];
  logic [TW-1:0]  f_tag [NS];
  logic [ITW-1:0] f_it  [NS];
  word_t          f_y   [NS][M];
  word_t          f_r   [NS][M];
  logic [N-1:0]   f_sel [NS];
  logic [LGN-1:0] f_idx [NS][MS];
  fx_t            f_c   [NS][MS][MS];
  fx_t            f_b   [NS][MS];

  // boundary registers for unit results
  corr_t p12 [N];
  corr_t p23 [N];
  fx_t   l56    [MS][MS];
  fx_t   dinv56 [MS];
  fx_t   cinv67 [MS][MS];

  // ---------------------------------------------------------------- stage 1 and 2
  corr_t zero_ps [N];
  corr_t corr1 [N];
  corr_t corr2 [N];
  always_comb for (int n = 0; n < N; n++) zero_ps[n] = '0;

  corr_unit #(.N(N), .M(M), .ROW0(0), .ROWS(M/2)) u_corr1 (
    .clk(clk), .cyc(cyc), .theta(theta), .r(f_r[0]), .psum_i(zero_ps), .corr_o(corr1)
  );
  corr_unit #(.N(N), .M(M), .ROW0(M/2), .ROWS(M - M/2)) u_corr2 (
    .clk(clk), .cyc(cyc), .theta(theta), .r(f_r[1]), .psum_i(p12), .corr_o(corr2)
  );

  // ---------------------------------------------------------------- stage 3
  logic [LGN-1:0] lambda;
  logic           lambda_found;
  tree_cmp #(.N(N)) u_tree (
    .clk(clk), .cyc(cyc), .corr_i(p23), .mask_i(f_sel[2]), .idx_o(lambda), .found_o(lambda_found)
  );

  // ---------------------------------------------------------------- stage 4
  word_t tp4 [M];
  word_t tq4 [MS][M];
  always_comb begin
    for (int m = 0; m < M; m++) tp4[m] = theta[f_idx[3][f_it[3][LGM-1:0]]][m];
    for (int q = 0; q < MS; q++)
      for (int m = 0; m < M; m++)
        tq4[q][m] = (q <= int'(f_it[3])) ? theta[f_idx[3][q]][m] : word_t'(0);
  end

  logic signed [2*DW+1+$clog2(M/4):0] crow [MS];
  if (SOP) begin : g_sop
    sop_matmul #(.M(M), .LANES(MS)) u_sop (
      .clk(clk), .cyc(cyc), .theta_p(tp4), .theta_q(tq4), .c_o(crow)
    );
  end else begin : g_da
    da_matmul #(.M(M), .LANES(MS)) u_da (
      .clk(clk), .cyc(cyc), .theta_p(tp4), .theta_q(tq4), .c_o(crow)
    );
  end

  // ---------------------------------------------------------------- stage 5
  fx_t l5 [MS][MS];
  fx_t d5 [MS];
  fx_t dinv5 [MS];
  ldl_unit #(.MS(MS)) u_ldl (
    .clk(clk), .cyc(cyc), .c_i(f_c[4]), .l_o(l5), .d_o(d5), .dinv_o(dinv5)
  );

  // ---------------------------------------------------------------- stage 6
  fx_t a6 [MS][MS];
  fx_t cinv6 [MS][MS];
  inv_unit #(.MS(MS)) u_inv (
    .clk(clk), .cyc(cyc), .l_i(l56), .a_o(a6)
  );
  comp_unit #(.MS(MS)) u_comp (
    .clk(clk), .cyc(cyc), .a_i(a6), .dinv_i(dinv56), .cinv_o(cinv6)
  );

  // ---------------------------------------------------------------- stage 7
  word_t tsel7 [MS][M];
  always_comb begin
    for (int q = 0; q < MS; q++)
      for (int m = 0; m < M; m++)
        tsel7[q][m] = (q <= int'(f_it[6])) ? theta[f_idx[6][q]][m] : word_t'(0);
  end

  fx_t   b_new7;
  fx_t   x7 [MS];
  word_t r7 [M];
  resid_unit #(.M(M), .MS(MS)) u_res (
    .clk(clk), .cyc(cyc), .it(f_it[6]), .y_i(f_y[6]), .tsel_i(tsel7), .b_i(f_b[6]),
    .cinv_i(cinv67), .b_new_o(b_new7), .x_o(x7), .r_o(r7)
  );

  // ---------------------------------------------------------------- ring control
  logic last7, recirc;
  assign last7  = f_v[6] && (int'(f_it[6]) == MS - 1);
  assign recirc = f_v[6] && !last7;
  assign in_ready = adv && !recirc;

  logic take;
  assign take = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < NS; s++) f_v[s] <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= adv && last7;
      if (adv) begin
        f_v[0] <= recirc || take;
        for (int s = 1; s < NS; s++) f_v[s] <= f_v[s-1];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (adv) begin
      // stage 7 -> stage 1: next iteration of the same frame, or a new frame
      if (recirc) begin
        f_tag[0] <= f_tag[6];
        f_it[0]  <= f_it[6] + 1'b1;
        f_y[0]   <= f_y[6];
        f_r[0]   <= r7;
        f_sel[0] <= f_sel[6];
        f_idx[0] <= f_idx[6];
        f_c[0]   <= f_c[6];
        f_b[0]   <= f_b[6];
        f_b[0][f_it[6][LGM-1:0]] <= b_new7;
      end else begin
        f_tag[0] <= in_tag;
        f_it[0]  <= '0;
        f_y[0]   <= in_y;
        f_r[0]   <= in_y;
        f_sel[0] <= '0;
        for (int q = 0; q < MS; q++) begin
          f_idx[0][q] <= '0;
          f_b[0][q]   <= '0;
          for (int p = 0; p < MS; p++) f_c[0][q][p] <= (p == q) ? FX_ONE : fx_t'(0);
        end
      end
      // stages 1..6 -> 2..7
      for (int s = 1; s < NS; s++) begin
        f_tag[s] <= f_tag[s-1];
        f_it[s]  <= f_it[s-1];
        f_y[s]   <= f_y[s-1];
        f_r[s]   <= f_r[s-1];
        f_sel[s] <= f_sel[s-1];
        f_idx[s] <= f_idx[s-1];
        f_c[s]   <= f_c[s-1];
        f_b[s]   <= f_b[s-1];
      end
      // stage 3 result: the chosen atom joins the frame's set
      f_idx[3][f_it[2][LGM-1:0]] <= lambda;
      f_sel[3][lambda]  <= lambda_found;
      // stage 4 result: new row (and column) of C, converted from Q2.30 to the internal format
      for (int q = 0; q < MS; q++) begin
        if (q <= int'(f_it[3])) begin
          f_c[4][f_it[3][LGM-1:0]][q] <= fx_t'(crow[q] >>> (2*TFRAC - FXF));
          f_c[4][q][f_it[3][LGM-1:0]] <= fx_t'(crow[q] >>> (2*TFRAC - FXF));
        end
      end
      // unit results captured for the next stage
      p12    <= corr1;
      p23    <= corr2;
      l56    <= l5;
      dinv56 <= dinv5;
      cinv67 <= cinv6;
      // output
      out_tag <= f_tag[6];
      out_idx <= f_idx[6];
      out_x   <= x7;
    end
  end

  always_comb begin
    frames_in_flight = '0;
    for (int s = 0; s < NS; s++) frames_in_flight += 3'(f_v[s]);
  end

  // Theta must be stable while frames are in flight.
  assert property (@(posedge clk) disable iff (!rst_n) theta_wr_en |-> (frames_in_flight == '0))
    else $error("theta written while frames are in flight");
  // a frame is only taken at a slot boundary
  assert property (@(posedge clk) disable iff (!rst_n) in_ready |-> adv);

endmodule
