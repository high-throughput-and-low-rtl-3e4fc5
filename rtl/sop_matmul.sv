// sop_matmul: sum-of-products matrix multiplication unit, an alternative for pipeline stage 4.
//
// Computes the same thing as da_matmul, the new row of the Gram matrix C = Theta_i^T Theta_i:
// c_o[q] = <theta_p, theta_q[q]> for every lane q, as exact integers (scale 2^-30). It works one
// element per clock instead of one bit plane per clock. M partial product generators (PPGs)
// each multiply one sample pair. A log2(M)-level adder tree sums the M products. The sums are
// shifted into a serial-in parallel-out (SIPO) register, one element per clock, and the full
// row is handed on in parallel.
// Timing within a slot: at cycle q (0..LANES-1) the operand registers in front of the PPGs
// take theta_p and theta_q[q]; at cycle q+1 the PPGs and the tree work on them and the sum is
// shifted into the SIPO register; at cycle LANES+1 the SIPO contents are copied to c_o, which
// is valid from cycle LANES+2 to the end of the slot (cycle 18 for 16 lanes).
// The PPG array, the adder tree and the SIPO register follow the document's Figure 4. Its
// text does not say how a PPG is built; here each one is a plain multiplier. As in
// da_matmul, only the new row of C is computed each iteration (m elements, not m(m+1)/2), a
// choice of this design that lets the serial register fill within one 32-cycle slot.
module sop_matmul
  import omp_pkg::*;
#(
  parameter int M     = 64,
  parameter int LANES = 16
) (
  input  logic             clk,
  input  logic [CYCW-1:0]  cyc,
  input  word_t            theta_p [M],
  input  word_t            theta_q [LANES][M],
  output logic signed [2*DW+1+$clog2(M/4):0] c_o [LANES]
);

  localparam int OW = 2*DW + 2 + $clog2(M/4);
  localparam int LG = $clog2(M);
  localparam int P  = 1 << LG;

  initial assert (LANES + 2 <= SLOT - 1)
    else $error("sop_matmul: %0d lanes do not fit in one slot", LANES);

  // operand registers in front of the PPGs
  word_t rp [M];
  word_t rq [M];

  always_ff @(posedge clk) begin
    if (int'(cyc) < LANES) begin
      for (int j = 0; j < M; j++) begin
        rp[j] <= theta_p[j];
        rq[j] <= theta_q[int'(cyc)][j];
      end
    end
  end

  // PPGs and adder tree
  logic signed [OW-1:0] lvl [LG+1][P];
  always_comb begin
    for (int j = 0; j < P; j++)
      lvl[0][j] = (j < M) ? OW'(rp[j % M]) * OW'(rq[j % M]) : '0;
    for (int l = 1; l <= LG; l++) begin
      for (int j = 0; j < P; j++) lvl[l][j] = '0;
      for (int j = 0; j < (P >> l); j++) lvl[l][j] = lvl[l-1][2*j] + lvl[l-1][2*j+1];
    end
  end

  // SIPO register: element q ends in position q after LANES shifts
  logic signed [OW-1:0] sipo [LANES];
  always_ff @(posedge clk) begin
    if (int'(cyc) >= 1 && int'(cyc) <= LANES) begin
      for (int k = 0; k < LANES - 1; k++) sipo[k] <= sipo[k+1];
      sipo[LANES-1] <= lvl[LG][0];
    end
    if (int'(cyc) == LANES + 1) c_o <= sipo;
  end

endmodule
