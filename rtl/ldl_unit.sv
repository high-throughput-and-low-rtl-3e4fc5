// ldl_unit: systolic LDL decomposition array (pipeline stage 5).
//
// Factors the symmetric m x m matrix C into L D L^T (L unit lower triangular, D diagonal):
//   d_jj = c_jj - sum_{k<j} l_jk^2 d_kk,   l_ij = (c_ij - sum_{k<j} l_ik l_jk d_kk) / d_jj.
// The triangular array has m PE1a on the diagonal and m(m-1)/2 PE1b below it (16 and 120 for
// m = 16). Column j is solved in two clocks: at slot cycle 2j the diagonal PE1a(j) registers
// d_jj and 1/d_jj, at cycle 2j+1 every PE1b(i,j) registers l_ij. During both cycles row j's
// PEs drive their l values onto the column buses and each row accumulates its partial sum
// from left to right. The last diagonal is registered at cycle 2m-2, so the factors are
// complete after 2m-1 = 31 clocks and stay valid for the rest of the slot.
// Only the lower triangle of c_i is read. Outputs: l_o[i][k] for i > k (other entries 0),
// d_o, dinv_o. The array shape, the PE types and the 31-cycle latency follow the document.
module ldl_unit
  import omp_pkg::*;
#(
  parameter int MS = 16
) (
  input  logic            clk,
  input  logic [CYCW-1:0] cyc,
  input  fx_t             c_i    [MS][MS],
  output fx_t             l_o    [MS][MS],
  output fx_t             d_o    [MS],
  output fx_t             dinv_o [MS]
);

  int jt;                       // column being solved in this cycle
  assign jt = int'(cyc) >> 1;

  // Each PE1b(i,k) drives s_o (running sum to its right) and b_o (column-k bus below row i).
  for (genvar i = 0; i < MS; i++) begin : g_row
    for (genvar k = 0; k < MS; k++) begin : g_col
      if (k < i) begin : g_b
        fx_t s_in, l_in, s_o, b_o, lv;
        if (k == 0) begin : g_s0
          assign s_in = '0;
        end else begin : g_sk
          assign s_in = g_row[i].g_col[k-1].g_b.s_o;
        end
        if (k + 1 == i) begin : g_top
          assign l_in = '0;
        end else begin : g_mid
          assign l_in = g_row[i-1].g_col[k].g_b.b_o;
        end
        pe1b u_pe (
          .clk     (clk),
          .en      ((int'(cyc) == 2*k + 1) && (int'(cyc) < 2*MS)),
          .own_sel (jt == i),
          .add_en  (k < jt),
          .c_in    (c_i[i][k]),
          .s_in    (s_in),
          .d_in    (d_o[k]),
          .dinv_in (dinv_o[k]),
          .l_in    (l_in),
          .l_val   (lv),
          .l_out   (b_o),
          .s_out   (s_o)
        );
        assign l_o[i][k] = lv;
      end else if (k == i) begin : g_a
        fx_t s_in;
        if (i == 0) begin : g_s0
          assign s_in = '0;
        end else begin : g_sk
          assign s_in = g_row[i].g_col[i-1].g_b.s_o;
        end
        pe1a u_pe (
          .clk      (clk),
          .en       (int'(cyc) == 2*k),
          .c_in     (c_i[i][i]),
          .s_in     (s_in),
          .d_out    (d_o[k]),
          .dinv_out (dinv_o[k])
        );
        assign l_o[i][k] = '0;
      end else begin : g_z
        assign l_o[i][k] = '0;
      end
    end
  end

endmodule
