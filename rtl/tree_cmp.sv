// tree_cmp: tree comparator of the atom selector (pipeline stage 3).
//
// Finds the atom whose correlation with the residual has the largest magnitude,
// lambda = argmax_n |corr[n]|, skipping atoms already chosen for this frame (mask bit set).
// Slot cycle 0 loads the N magnitudes into the leaves; each following cycle reduces one level
// of a binary tree of comparators in place, so after log2(N) levels (edge of cycle log2 N) the
// winner sits in entry 0 and idx_o/found_o are valid until the next slot. Ties keep the lower
// atom index. The log2(N)-cycle tree follows the document; masking the already selected atoms
// and the tie rule are this design's choices.
module tree_cmp
  import omp_pkg::*;
#(
  parameter int N = 256
) (
  input  logic                 clk,
  input  logic [CYCW-1:0]      cyc,
  input  corr_t                corr_i [N],
  input  logic [N-1:0]         mask_i,
  output logic [$clog2(N)-1:0] idx_o,
  output logic                 found_o
);

  localparam int LG = $clog2(N);

  typedef struct packed {
    logic           vld;
    logic [CW-1:0]  mag;
    logic [LG-1:0]  idx;
  } cand_t;

  cand_t node [N];

  function automatic cand_t better(input cand_t a, input cand_t b);
    if (!b.vld) return a;
    if (!a.vld) return b;
    return (b.mag > a.mag) ? b : a;
  endfunction

  always_ff @(posedge clk) begin
    if (cyc == '0) begin
      for (int n = 0; n < N; n++) begin
        node[n].vld <= !mask_i[n];
        node[n].mag <= corr_i[n][CW-1] ? CW'(-corr_i[n]) : corr_i[n];
        node[n].idx <= LG'(n);
      end
    end else if (int'(cyc) <= LG) begin
      for (int j = 0; j < N/2; j++) begin
        if (j < (N >> int'(cyc))) node[j] <= better(node[2*j], node[2*j+1]);
      end
    end
  end

  assign idx_o   = node[0].idx;
  assign found_o = node[0].vld;

endmodule
