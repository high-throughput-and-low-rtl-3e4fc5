// theta_mem: storage for the reconstruction matrix Theta (N atoms of M samples each).
//
// The matrix is shared by every frame in the pipeline, so it is held once, as an array of
// registers, and every stage reads the atoms it needs in parallel: the two correlation stages
// read a block of columns per cycle, the matrix multiplication and residual stages read the
// selected atoms. Loading is one whole atom (column) per clock through wr_en/wr_col/wr_data;
// the array output 'theta' is the registered contents, indexed [atom][sample].
// The document names the Theta store in its block diagram but gives no organisation; the
// column-wide write port and fully parallel read-out are this design's choice.
module theta_mem
  import omp_pkg::*;
#(
  parameter int N = 256,
  parameter int M = 64
) (
  input  logic                 clk,
  input  logic                 wr_en,
  input  logic [$clog2(N)-1:0] wr_col,
  input  word_t                wr_data [M],
  output word_t                theta   [N][M]
);

  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int m = 0; m < M; m++) theta[wr_col][m] <= wr_data[m];
    end
  end

endmodule
