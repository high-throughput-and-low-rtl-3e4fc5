// omp_pkg: number formats and arithmetic helpers shared by the OMP reconstruction pipeline.
//
// Word formats (the 16-bit word length follows the document; the split into integer and
// fraction bits and the width of the internal format are this design's own choices):
//   theta  : DW-bit two's complement fraction, TFRAC fraction bits (Q1.15), -1 <= theta < 1.
//   y, r   : DW-bit two's complement, YFRAC fraction bits (Q4.12).
//   fx_t   : FXW-bit internal format with FXF fraction bits (Q8.24), used for the Gram
//            matrix C, the LDL factors, the inverse and the reconstructed coefficients x.
//   corr_t : CW-bit correlation <theta_n, r> kept at full product precision.
// All rounding is truncation (arithmetic shift right).
package omp_pkg;

  parameter int DW    = 16;   // data word length L
  parameter int TFRAC = 15;   // fraction bits of theta
  parameter int YFRAC = 12;   // fraction bits of y and r
  parameter int FXW   = 32;   // internal word
  parameter int FXF   = 24;   // internal fraction bits
  parameter int CW    = 40;   // correlation width
  parameter int SLOT  = 32;   // clock cycles per pipeline time slot
  parameter int CYCW  = $clog2(SLOT);

  typedef logic signed [DW-1:0]  word_t;
  typedef logic signed [FXW-1:0] fx_t;
  typedef logic signed [CW-1:0]  corr_t;

  localparam fx_t FX_ONE = fx_t'(1) <<< FXF;
  localparam fx_t FX_MAX = {1'b0, {(FXW-1){1'b1}}};
  localparam fx_t FX_MIN = {1'b1, {(FXW-1){1'b0}}};

  // Saturate a 64-bit value to the internal word.
  function automatic fx_t fx_sat(input logic signed [63:0] v);
    if (v > 64'(FX_MAX)) return FX_MAX;
    if (v < 64'(FX_MIN)) return FX_MIN;
    return fx_t'(v);
  endfunction

  // Fixed-point product a*b in the internal format.
  function automatic fx_t fx_mul(input fx_t a, input fx_t b);
    logic signed [63:0] p;
    p = 64'(a) * 64'(b);
    return fx_sat(p >>> FXF);
  endfunction

  // Fixed-point reciprocal 1/d in the internal format (divider of the diagonal PE).
  function automatic fx_t fx_recip(input fx_t d);
    logic signed [63:0] num;
    logic signed [63:0] q;
    num = 64'sd1 <<< (2*FXF);
    if (d == '0) return FX_MAX;
    q = num / 64'(d);
    return fx_sat(q);
  endfunction

  // Saturate a 64-bit value to a data word.
  function automatic word_t word_sat(input logic signed [63:0] v);
    if (v > 64'sd32767)  return word_t'(16'sh7fff);
    if (v < -64'sd32768) return word_t'(16'sh8000);
    return word_t'(v);
  endfunction

endpackage
