// da_matmul: DA-based matrix multiplication unit (pipeline stage 4).
//
// Produces the new row of the Gram matrix C = Theta_i^T Theta_i for the atom chosen in this
// iteration: c_o[q] = <theta_p, theta_q[q]> for every lane q (LANES = m lanes, one per entry of
// the row). The M samples are split into M/4 groups; group k has its own da_lut whose table is
// filled from four samples of theta_p (T^k), while the address bits A^k come from the same four
// samples of each theta_q, one bit plane per clock. An adder tree per lane sums the M/4
// accumulators and the sums are captured in a parallel output register.
// Timing within a slot: cycle 0 loads the tables, cycles 1..DW stream the bit planes (LSB
// first, sign plane last), cycle DW+1 captures c_o, valid from cycle DW+2 to the end of the
// slot. c_o is the exact integer sum of products of the Q1.15 words (scale 2^-30).
// The DA-LUT array, the adder tree and the parallel hand-off follow the document's Figure 7;
// computing only the new row (the older rows of C do not change between iterations) with m
// parallel lanes, instead of shifting all m(m+1)/2 entries through a serial register, is this
// design's choice, made so that the unit fits one 32-cycle slot.
module da_matmul
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

  localparam int G  = M / 4;
  localparam int OW = 2*DW + 2 + $clog2(G);

  logic load, en, first, msb;
  int   plane;

  assign load  = (cyc == '0);
  assign plane = int'(cyc) - 1;
  assign en    = (int'(cyc) >= 1) && (int'(cyc) <= DW);
  assign first = (int'(cyc) == 1);
  assign msb   = (int'(cyc) == DW);

  logic signed [2*DW+1:0] acc [G][LANES];

  for (genvar k = 0; k < G; k++) begin : g_grp
    word_t      tp   [4];
    logic [3:0] addr [LANES];
    always_comb begin
      for (int j = 0; j < 4; j++) tp[j] = theta_p[4*k+j];
      for (int q = 0; q < LANES; q++)
        for (int j = 0; j < 4; j++)
          addr[q][j] = (plane >= 0 && plane < DW) ? theta_q[q][4*k+j][plane[$clog2(DW)-1:0]] : 1'b0;
    end
    da_lut #(.LANES(LANES)) u_lut (
      .clk    (clk),
      .load   (load),
      .tp     (tp),
      .en     (en),
      .first  (first),
      .msb_i  (msb),
      .addr_i (addr),
      .acc_o  (acc[k])
    );
  end

  always_ff @(posedge clk) begin
    if (int'(cyc) == DW + 1) begin
      for (int q = 0; q < LANES; q++) begin
        logic signed [OW-1:0] s;
        s = '0;
        for (int k = 0; k < G; k++) s += OW'(acc[k][q]);
        c_o[q] <= s;
      end
    end
  end

endmodule
