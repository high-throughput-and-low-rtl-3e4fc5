// pe1a: diagonal processing element of the LDL decomposition array.
//
// Forms d_jj = c_jj - s_in (equation d_ii = c_ii - sum_k l_ik^2 d_kk, with the sum delivered
// on s_in by the row to its left) and, when 'en' is high, registers both d and its reciprocal.
// Both outputs are broadcast down the PE's column. Subtractor, reciprocal and the two output
// registers follow the document's Figure 3A; the reciprocal is a plain fixed-point divider.
module pe1a
  import omp_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  fx_t  c_in,
  input  fx_t  s_in,
  output fx_t  d_out,
  output fx_t  dinv_out
);

  fx_t d;
  assign d = c_in - s_in;

  always_ff @(posedge clk) begin
    if (en) begin
      d_out    <= d;
      dinv_out <= fx_recip(d);
    end
  end

endmodule
