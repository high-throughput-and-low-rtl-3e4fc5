// pe3: processing element of the matrix composition array (element (i,j) of C^-1).
//
// A multiply-accumulator: on each enabled step it adds d_k^-1 * a_ki * a_kj to its register
// (clear restarts the sum), so after m steps c_out = sum_k a_ki a_kj / d_kk. The three-input
// product, adder and feedback register follow the document's Figure 3D.
module pe3
  import omp_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  logic clear,
  input  fx_t  dinv_in,
  input  fx_t  a_in_i,
  input  fx_t  a_in_j,
  output fx_t  c_out
);

  fx_t prod;
  assign prod = fx_mul(fx_mul(a_in_i, a_in_j), dinv_in);

  always_ff @(posedge clk) begin
    if (en) c_out <= (clear ? fx_t'(0) : c_out) + prod;
  end

endmodule
