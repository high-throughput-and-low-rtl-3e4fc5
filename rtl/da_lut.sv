// da_lut: register-based distributed-arithmetic look-up table with shift accumulators.
//
// Computes dot products of four fixed words tp[0..3] (theta_p) with LANES other 4-word
// vectors that arrive one bit plane per clock, least significant bit first. On 'load' the
// table generator stores the 15 non-zero partial sums v_i = sum_j tp[j]*i_j in registers
// (address 0 is the constant 0), so every lane reads its partial sum in parallel through a
// 16:1 multiplexer addressed by the four bits [q4 q3 q2 q1] of its current plane. Each lane's
// accumulator adds the selected entry to its own value shifted right by one, and subtracts it
// on the sign plane (msb_i). The accumulator is kept DW bits wider than a table entry so the
// right shifts lose nothing: after the DW planes acc_o equals sum_j tp[j]*tq[j] exactly, as
// plain integers. 'first' marks the first plane (the accumulator starts from zero).
// The table, multiplexer, shift accumulator and sign control follow the document's Figures
// 5-6; sharing one table between several lanes and filling the table through one adder per
// composite entry (11 adders) are this design's choices.
module da_lut
  import omp_pkg::*;
#(
  parameter int LANES = 1
) (
  input  logic                       clk,
  input  logic                       load,
  input  word_t                      tp     [4],
  input  logic                       en,
  input  logic                       first,
  input  logic                       msb_i,
  input  logic [3:0]                 addr_i [LANES],
  output logic signed [2*DW+1:0]     acc_o  [LANES]
);

  localparam int VW = DW + 2;          // table entry width
  localparam int AW = 2*DW + 2;        // accumulator width

  typedef logic signed [VW-1:0] v_t;
  typedef logic signed [AW-1:0] a_t;

  v_t tbl [1:15];

  always_ff @(posedge clk) begin
    if (load) begin
      tbl[1]  <= v_t'(tp[0]);
      tbl[2]  <= v_t'(tp[1]);
      tbl[4]  <= v_t'(tp[2]);
      tbl[8]  <= v_t'(tp[3]);
      tbl[3]  <= v_t'(tp[1]) + v_t'(tp[0]);
      tbl[5]  <= v_t'(tp[2]) + v_t'(tp[0]);
      tbl[6]  <= v_t'(tp[2]) + v_t'(tp[1]);
      tbl[9]  <= v_t'(tp[3]) + v_t'(tp[0]);
      tbl[10] <= v_t'(tp[3]) + v_t'(tp[1]);
      tbl[12] <= v_t'(tp[3]) + v_t'(tp[2]);
      tbl[7]  <= v_t'(tp[2]) + v_t'(tp[1]) + v_t'(tp[0]);
      tbl[11] <= v_t'(tp[3]) + v_t'(tp[1]) + v_t'(tp[0]);
      tbl[13] <= v_t'(tp[3]) + v_t'(tp[2]) + v_t'(tp[0]);
      tbl[14] <= v_t'(tp[3]) + v_t'(tp[2]) + v_t'(tp[1]);
      tbl[15] <= v_t'(tp[3]) + v_t'(tp[2]) + v_t'(tp[1]) + v_t'(tp[0]);
    end
  end

  for (genvar g = 0; g < LANES; g++) begin : g_lane
    v_t sel;
    a_t base, term;
    always_comb begin
      sel  = (addr_i[g] == 4'd0) ? v_t'(0) : tbl[addr_i[g]];
      base = first ? a_t'(0) : (acc_o[g] >>> 1);
      term = a_t'(sel) <<< (DW - 1);
    end
    always_ff @(posedge clk) begin
      if (en) acc_o[g] <= msb_i ? base - term : base + term;
    end
  end

endmodule
