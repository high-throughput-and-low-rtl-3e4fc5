// comp_unit: systolic matrix composition array (second half of pipeline stage 6).
//
// Forms C^-1 = (L^-1)^T D^-1 L^-1, i.e. c^-1_ij = sum_k a_ki a_kj / d_kk, with one PE3 per
// element of the lower triangle including the diagonal (m(m+1)/2 = 136 for m = 16). Row k of
// A and 1/d_kk are broadcast to the whole array in step k, so the product takes m = 16 clocks,
// at slot cycles START .. START+m-1 (START = m-1, right after the inversion). The result is
// valid from cycle START+m to the end of the slot; cinv_o is the full symmetric matrix.
// a_i holds the strictly lower part of A (unit diagonal implied). The array and the 16-cycle
// latency follow the document; it prints the sum with l and a leading minus sign, which does
// not match its own formula for the inverse, and the formula C^-1 = (L^-1)^T D^-1 L^-1 is used.
module comp_unit
  import omp_pkg::*;
#(
  parameter int MS    = 16,
  parameter int START = MS - 1
) (
  input  logic            clk,
  input  logic [CYCW-1:0] cyc,
  input  fx_t             a_i    [MS][MS],
  input  fx_t             dinv_i [MS],
  output fx_t             cinv_o [MS][MS]
);

  int   k;
  logic en;
  assign k  = int'(cyc) - START;
  assign en = (k >= 0) && (k < MS);

  // Row k of A with the unit diagonal.
  fx_t arow [MS];
  fx_t dk;
  always_comb begin
    dk = '0;
    for (int i = 0; i < MS; i++) arow[i] = '0;
    for (int kk = 0; kk < MS; kk++) begin
      if (kk == k) begin
        dk = dinv_i[kk];
        for (int i = 0; i < MS; i++)
          arow[i] = (i == kk) ? FX_ONE : (i < kk ? a_i[kk][i] : fx_t'(0));
      end
    end
  end

  for (genvar i = 0; i < MS; i++) begin : g_row
    for (genvar j = 0; j < MS; j++) begin : g_col
      if (j <= i) begin : g_pe
        fx_t c_low;
        pe3 u_pe (
          .clk     (clk),
          .en      (en),
          .clear   (k == 0),
          .dinv_in (dk),
          .a_in_i  (arow[i]),
          .a_in_j  (arow[j]),
          .c_out   (c_low)
        );
        assign cinv_o[i][j] = c_low;
      end else begin : g_sym
        assign cinv_o[i][j] = g_row[j].g_col[i].g_pe.c_low;
      end
    end
  end

endmodule
