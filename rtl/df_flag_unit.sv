// Flag operation unit ("selection signals generation", Stage 2 of the edge
// filter).
//
// From the three pixels nearest the edge on each side and the thresholds it
// forms the decision flags
//   FLAG1 = |p0-q0| < alpha        FLAG2 = |p1-p0| < beta
//   FLAG3 = |q1-q0| < beta         FLAG4 = |p2-p0| < beta
//   FLAG5 = |q2-q0| < beta         FLAG6 = |p0-q0| < (alpha>>2)+2
// and turns them, with BS and the chroma flag, into the output selections of
// the two selection tables (BS 1..3 and BS 4): whether the edge is filtered at
// all, which of p1/q1 are replaced for BS 1..3, whether the strong (three
// pixel) filter or the p0f/q0f filter is used on each side for BS 4, and the
// increment of the clipping value (c0 = c1 + FLAG4 + FLAG5 for luma, c1 + 1 for
// chroma). Purely combinational.
//
// The flags and the selection rules follow the published architecture's
// flag equations and selection tables; folding the three p0 modes of BS 1..3
// into one clipping increment is this design's own.
module df_flag_unit
  import df_pkg::*;
(
  input  pix_t       p0, p1, p2,
  input  pix_t       q0, q1, q2,
  input  logic [7:0] alpha,
  input  logic [7:0] beta,
  input  bs_t        bs,
  input  logic       chroma,
  output logic [6:1] flag,       // FLAG1..FLAG6
  output logic       en,         // edge filtered (BS>0, FLAG1..3)
  output logic       bs4,        // BS = 4 filter selected
  output logic       p1_mod,     // BS 1..3: replace p1 (bs1p1)
  output logic       q1_mod,     // BS 1..3: replace q1
  output logic       strong_p,   // BS 4: replace p0..p2 (bs4p0..bs4p2)
  output logic       strong_q,   // BS 4: replace q0..q2
  output logic [1:0] c0_add      // c0 = c1 + c0_add
);
  function automatic logic [7:0] absdiff(input pix_t a, input pix_t b);
    return (a > b) ? a - b : b - a;
  endfunction

  logic [7:0] d_p0q0;
  logic [8:0] alpha_q;  // (alpha>>2)+2

  always_comb begin
    d_p0q0  = absdiff(p0, q0);
    alpha_q = 9'(alpha >> 2) + 9'd2;
    flag[1] = d_p0q0 < alpha;
    flag[2] = absdiff(p1, p0) < beta;
    flag[3] = absdiff(q1, q0) < beta;
    flag[4] = absdiff(p2, p0) < beta;
    flag[5] = absdiff(q2, q0) < beta;
    flag[6] = 9'(d_p0q0) < alpha_q;

    en       = (bs != 3'd0) && flag[1] && flag[2] && flag[3];
    bs4      = (bs == 3'd4);
    p1_mod   = en && !bs4 && !chroma && flag[4];
    q1_mod   = en && !bs4 && !chroma && flag[5];
    strong_p = en && bs4 && !chroma && flag[4] && flag[6];
    strong_q = en && bs4 && !chroma && flag[5] && flag[6];
    c0_add   = chroma ? 2'd1 : 2'(flag[4]) + 2'(flag[5]);
  end
endmodule
