// corr_unit: correlation computer of the atom selector (pipeline stages 1 and 2).
//
// Computes, for every atom n, corr[n] = psum_i[n] + sum_{k in rows} theta[n][ROW0+k] * r[ROW0+k].
// Two instances split the M rows of the dot products: stage 1 takes the first half with a
// zero partial sum, stage 2 the second half and adds stage 1's result, so together they form
// <theta_n, r> for all N atoms in two time slots. Each clock handles COLS atoms with COLS*ROWS
// parallel multipliers and an adder tree per atom; atom block c is written at the clock edge
// that ends slot cycle c, so the whole vector is complete by cycle NBLK (<= SLOT-1) and holds
// until the next slot rewrites it. psum_i, theta and r must be stable during the slot.
// The split into two correlation stages follows the document; the number of atoms handled per
// clock (ceil(N/(SLOT-1))) is chosen so that the work fits one slot with a cycle to spare.
module corr_unit
  import omp_pkg::*;
#(
  parameter int N    = 256,
  parameter int M    = 64,
  parameter int ROW0 = 0,
  parameter int ROWS = 32
) (
  input  logic             clk,
  input  logic [CYCW-1:0]  cyc,
  input  word_t            theta  [N][M],
  input  word_t            r      [M],
  input  corr_t            psum_i [N],
  output corr_t            corr_o [N]
);

  localparam int COLS = (N + SLOT - 2) / (SLOT - 1);
  localparam int NBLK = (N + COLS - 1) / COLS;

  function automatic corr_t dot(input int n);
    corr_t acc;
    acc = '0;
    for (int k = 0; k < ROWS; k++)
      acc += corr_t'(theta[n][ROW0+k]) * corr_t'(r[ROW0+k]);
    return acc;
  endfunction

  always_ff @(posedge clk) begin
    if (int'(cyc) < NBLK) begin
      for (int j = 0; j < COLS; j++) begin
        if (int'(cyc) * COLS + j < N)
          corr_o[int'(cyc) * COLS + j] <= psum_i[int'(cyc) * COLS + j] + dot(int'(cyc) * COLS + j);
      end
    end
  end

endmodule
