// Threshold look-up table (Stage 1 of the pipelined edge filter).
//
// Converts the edge parameters into the values the filter compares and clips
// with: alpha from IndexA, beta from IndexB, and the clipping value c1 (tC0)
// from IndexA and the boundary strength BS. The tables are those of the
// H.264/AVC standard. Purely combinational; the pipeline registers the result
// at the end of Stage 1. For BS 0 and BS 4 the clipping value is 0 (it is not
// used there).
//
// The stage placement follows the published architecture; the table values
// come from the standard, which the architecture refers to but does not list.
module df_lut
  import df_pkg::*;
(
  input  idx_t       idx_a,
  input  idx_t       idx_b,
  input  bs_t        bs,
  output logic [7:0] alpha,
  output logic [7:0] beta,
  output logic [4:0] c1
);
  always_comb begin
    alpha = alpha_tab(idx_a);
    beta  = beta_tab(idx_b);
    c1    = tc0_tab(idx_a, bs);
  end
endmodule
