// resid_unit: residual calculator (pipeline stage 7).
//
// Finishes one OMP iteration for a frame whose i = it+1 atoms are chosen:
//   b_it = <theta_new, y>                     (cycle 0, M multipliers and an adder tree)
//   x    = C^-1 b                             (cycles 1..ceil(m/2), two columns of C^-1 per clock)
//   r    = y - Theta_i x                      (cycles XEND..XEND+m-1, one atom per clock, M MACs)
// b_i holds <theta_k, y> of the atoms chosen in earlier iterations (entries at and above 'it'
// are ignored); b_o, x_o and r_o are valid from cycle XEND+m (25 for m = 16) to the end of the
// slot. Entries of x beyond 'it' are zero because the unused part of C^-1 is the identity and
// the matching entries of b are zero. r_o is truncated and saturated to the Q4.12 data word.
// The subtraction of Theta_i x from y follows the document; forming Theta_i^T y here, and the
// split of the slot into the three phases, are this design's choices.
module resid_unit
  import omp_pkg::*;
#(
  parameter int M  = 64,
  parameter int MS = 16
) (
  input  logic                   clk,
  input  logic [CYCW-1:0]        cyc,
  input  logic [$clog2(MS+1)-1:0] it,
  input  word_t                  y_i     [M],
  input  word_t                  tsel_i  [MS][M],   // chosen atoms, column k = atom k
  input  fx_t                    b_i     [MS],
  input  fx_t                    cinv_i  [MS][MS],
  output fx_t                    b_new_o,
  output fx_t                    x_o     [MS],
  output word_t                  r_o     [M]
);

  localparam int XSTEPS = (MS + 1) / 2;
  localparam int XEND   = 1 + XSTEPS;
  localparam int SH     = TFRAC + FXF - YFRAC;   // theta*x scale -> y scale

  fx_t b_eff [MS];
  always_comb begin
    for (int k = 0; k < MS; k++)
      b_eff[k] = (k < int'(it)) ? b_i[k] : ((k == int'(it)) ? b_new_o : fx_t'(0));
  end

  logic signed [63:0] racc [M];

  always_ff @(posedge clk) begin
    int c;
    c = int'(cyc);
    if (c == 0) begin
      logic signed [63:0] s;
      s = '0;
      for (int m = 0; m < M; m++) s += 64'(tsel_i[it[$clog2(MS)-1:0]][m]) * 64'(y_i[m]);
      b_new_o <= fx_sat(s >>> (TFRAC + YFRAC - FXF));
      for (int j = 0; j < MS; j++) x_o[j] <= '0;
      for (int m = 0; m < M; m++) racc[m] <= '0;
    end else if (c < XEND) begin
      for (int j = 0; j < MS; j++) begin
        fx_t s2;
        s2 = x_o[j];
        for (int h = 0; h < 2; h++)
          if (2*(c-1) + h < MS) s2 = s2 + fx_mul(cinv_i[j][2*(c-1)+h], b_eff[2*(c-1)+h]);
        x_o[j] <= s2;
      end
    end else if (c < XEND + MS) begin
      for (int m = 0; m < M; m++)
        if (c - XEND <= int'(it))
          racc[m] <= racc[m] + 64'(tsel_i[c-XEND][m]) * 64'(x_o[c-XEND]);
    end
  end

  always_comb begin
    for (int m = 0; m < M; m++)
      r_o[m] = word_sat(64'(y_i[m]) - (racc[m] >>> SH));
  end

endmodule
