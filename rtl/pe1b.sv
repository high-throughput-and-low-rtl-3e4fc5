// pe1b: off-diagonal processing element of the LDL decomposition array (row i, column k).
//
// When 'en' is high it registers l_ik = (c_ik - s_in) * d_kk^-1. The 2:1 multiplexer puts
// either the PE's own l_ik (own_sel) or the value from the PE above (l_in) on the column bus
// l_out, so the column carries l_jk of the row j currently being solved. The PE adds its
// contribution l_ik * l_out * d_kk to the running sum passed to the right (s_out), which is
// what the PEs further right need to form sum_k l_ik l_jk d_kk; add_en gates that contribution
// to the columns already solved. Subtractor, multiplier by d^-1, l register, multiplexer,
// triple product and adder follow the document's Figure 3B. The figure also registers l_out
// and s_out; here the row sum and column bus are combinational within a clock, which lets one
// column finish every two clocks.
module pe1b
  import omp_pkg::*;
(
  input  logic clk,
  input  logic en,
  input  logic own_sel,
  input  logic add_en,
  input  fx_t  c_in,
  input  fx_t  s_in,
  input  fx_t  d_in,
  input  fx_t  dinv_in,
  input  fx_t  l_in,
  output fx_t  l_val,
  output fx_t  l_out,
  output fx_t  s_out
);

  always_ff @(posedge clk) begin
    if (en) l_val <= fx_mul(c_in - s_in, dinv_in);
  end

  assign l_out = own_sel ? l_val : l_in;
  assign s_out = add_en ? s_in + fx_mul(fx_mul(l_val, l_out), d_in) : s_in;

endmodule
