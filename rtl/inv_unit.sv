// inv_unit: systolic triangular matrix inversion array (first half of pipeline stage 6).
//
// Inverts the unit lower triangular factor L: A = L^-1, with a_ii = 1 and
// a_ij = -sum_{k=j}^{i-1} l_ik a_kj for i > j. The array has one PE2 per element below the
// diagonal (m(m-1)/2 = 120 for m = 16). All columns advance together: in step t (t = 1..m-1,
// at slot cycle t-1) the PE on sub-diagonal t of every column finishes its element and
// broadcasts it down its column, and every PE further down adds l_ik * a_kj to its
// accumulator. The l values move one PE to the left per step, so the PE in column j sees
// l_i,j+t in step t. The inverse is complete after m-1 = 15 clocks (end of cycle m-2) and is
// held for the rest of the slot. a_o[i][j] holds a_ij for i > j (0 elsewhere; the unit
// diagonal is implied). The PE count and the 15-cycle latency follow the document.
module inv_unit
  import omp_pkg::*;
#(
  parameter int MS = 16
) (
  input  logic            clk,
  input  logic [CYCW-1:0] cyc,
  input  fx_t             l_i [MS][MS],
  output fx_t             a_o [MS][MS]
);

  int  t;
  logic step, first;
  assign t     = int'(cyc) + 1;
  assign step  = (int'(cyc) < MS - 1);
  assign first = (cyc == '0);

  for (genvar i = 0; i < MS; i++) begin : g_row
    for (genvar j = 0; j < MS; j++) begin : g_col
      if (j < i) begin : g_pe
        fx_t l_in, a_in, l_first, l_out, a_out;
        if (j + 1 < i) begin : g_inner
          assign l_in    = g_row[i].g_col[j+1].g_pe.l_out;
          assign l_first = l_i[i][j+1];
          assign a_in    = g_row[i-1].g_col[j].g_pe.a_out;
        end else begin : g_edge
          assign l_in    = '0;
          assign l_first = '0;
          assign a_in    = '0;
        end
        pe2 u_pe (
          .clk     (clk),
          .step    (step),
          .first   (first),
          .fin     ((i - j) == t),
          .upd     ((i - j) > t),
          .l_p     (l_i[i][j]),
          .l_first (l_first),
          .l_in    (l_in),
          .a_in    (a_in),
          .l_out   (l_out),
          .a_out   (a_out),
          .a_val   (a_o[i][j])
        );
      end else begin : g_z
        assign a_o[i][j] = '0;
      end
    end
  end

endmodule
