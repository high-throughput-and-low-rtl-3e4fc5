// pe2: processing element of the triangular matrix inversion array (row i, column j, i > j).
//
// Computes a_ij of A = L^-1 from a_ij = -sum_{k=j}^{i-1} l_ik a_kj (a_jj = 1). On the first
// step the inner register is taken from l_p = l_ij, delivered by the decomposition; after that
// the PE works as a multiply-accumulator: on each step in which an element a_kj of its column
// is finished (delivered on a_in), it adds l_ik * a_kj, where l_ik arrives through the row
// shift path (l from the right-hand neighbour, l_first on the first step). When 'fin' is high
// its own element is complete and it registers a_ij = -acc and drives it onto the column bus
// a_out for the PEs below; otherwise a_out forwards a_in. Initialisation from l_p, the
// multiply-accumulate, the row path for l and the a_in/a_out multiplexer follow the document's
// Figure 3C; the exact register placement on the l path is this design's.
module pe2
  import omp_pkg::*;
(
  input  logic clk,
  input  logic step,      // a step of the inversion happens this cycle
  input  logic first,     // first step: take l_p and l_first instead of the registers
  input  logic fin,       // this PE's element is completed this step
  input  logic upd,       // this PE accumulates this step
  input  fx_t  l_p,       // l_ij
  input  fx_t  l_first,   // l_i,j+1 (for the first step)
  input  fx_t  l_in,      // l path from the right-hand neighbour
  input  fx_t  a_in,      // column bus from above
  output fx_t  l_out,     // l path to the left-hand neighbour
  output fx_t  a_out,     // column bus to the PE below
  output fx_t  a_val      // registered a_ij
);

  fx_t acc_q, lsh_q;
  fx_t acc_eff;

  assign acc_eff = first ? l_p : acc_q;
  assign l_out   = first ? l_first : lsh_q;
  assign a_out   = fin ? -acc_eff : a_in;

  always_ff @(posedge clk) begin
    if (step) begin
      if (fin) a_val <= -acc_eff;
      if (upd) acc_q <= acc_eff + fx_mul(l_out, a_in);
      lsh_q <= l_in;
    end
  end

endmodule
