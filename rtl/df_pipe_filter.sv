// Four-stage pipelined edge filter (the deblocking filter core).
//
// Takes one line of eight pixels across an edge per cycle (p3..p0 | q0..q3)
// with the edge's BS, IndexA, IndexB and a chroma flag, and returns the
// filtered line four cycles later. The stages follow the common-term
// decomposition of the standard's filter equations:
//   Stage 1   threshold look-up (alpha, beta, c1) and the first partial sums
//             and differences (p0+q0+1, p1+p2+1, q0-p0, p2-2p1, ...);
//   Stage 2   flag unit (selection signals), table buffer (c1, c0) and the
//             second-level sums (p0+q0+p1+p2+2, ...), the BS 4 values p1, q1,
//             p0f, q0f, and the unclipped BS 1..3 deltas;
//   Stage 3   the remaining BS 4 sums (p2, p0, q0, q2) and the clipping of the
//             BS 1..3 results (Filter Clip);
//   Filter out  selection of each output pixel from the flags.
// Pixels that are not selected for filtering leave unchanged, so BS = 0 makes
// the filter a four-cycle delay line.
//
// Recursive input: when in_recursive is set, the p side is taken from the q
// side of the line leaving the filter in the same cycle (p0..p3 = q3'..q0').
// Because an edge occupies four consecutive lines and the latency is four,
// line i of an edge meets line i of the previous edge in the same block, so a
// row of blocks is filtered edge after edge without storing the blocks in
// between.
//
// Interface: word index 0 is the pixel next to the edge on both sides.
// Timing: in_* sampled in cycle T, out_* valid in cycle T+4. One line per
// cycle, no stalls. Reset clears only the valid bits.
//
// The stage split and the shared-term equations follow the published
// architecture; the exact register boundaries, the recursive-input wiring and
// the Clip1 on p0/q0 (from the standard) are this design's own reading.
module df_pipe_filter
  import df_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  logic  in_recursive,
  input  pix4_t in_p,          // p0..p3
  input  pix4_t in_q,          // q0..q3
  input  bs_t   in_bs,
  input  idx_t  in_idx_a,
  input  idx_t  in_idx_b,
  input  logic  in_chroma,
  output logic  out_valid,
  output pix4_t out_p,
  output pix4_t out_q
);
  // ---------------- Pixels read: input selection ----------------
  pix4_t p_in;
  assign p_in = in_recursive ? {out_q[0], out_q[1], out_q[2], out_q[3]} : in_p;

  // ---------------- Stage 1 ----------------
  logic [7:0] lut_alpha, lut_beta;
  logic [4:0] lut_c1;
  df_lut u_lut (.idx_a(in_idx_a), .idx_b(in_idx_b), .bs(in_bs),
                .alpha(lut_alpha), .beta(lut_beta), .c1(lut_c1));

  typedef struct packed {
    pix4_t             p, q;
    bs_t               bs;
    logic              chroma;
    logic [7:0]        alpha, beta;
    logic [4:0]        c1;
    logic [8:0]        sp0q0, sp0p1, sp1p2, sp2p3, sq0q1, sq1q2, sq2q3, sp1q1;
    logic signed [8:0] sq0dp0, sp1dq1;
    logic signed [9:0] sd2p1p2, sd2q1q2;
  } s1_t;

  s1_t s1_d, s1;
  logic v1, v2, v3;

  always_comb begin
    s1_d.p       = p_in;
    s1_d.q       = in_q;
    s1_d.bs      = in_bs;
    s1_d.chroma  = in_chroma;
    s1_d.alpha   = lut_alpha;
    s1_d.beta    = lut_beta;
    s1_d.c1      = lut_c1;
    s1_d.sp0q0   = 9'(p_in[0]) + 9'(in_q[0]) + 9'd1;
    s1_d.sp0p1   = 9'(p_in[0]) + 9'(p_in[1]) + 9'd1;
    s1_d.sp1p2   = 9'(p_in[1]) + 9'(p_in[2]) + 9'd1;
    s1_d.sp2p3   = 9'(p_in[2]) + 9'(p_in[3]) + 9'd1;
    s1_d.sq0q1   = 9'(in_q[0]) + 9'(in_q[1]) + 9'd1;
    s1_d.sq1q2   = 9'(in_q[1]) + 9'(in_q[2]) + 9'd1;
    s1_d.sq2q3   = 9'(in_q[2]) + 9'(in_q[3]) + 9'd1;
    s1_d.sp1q1   = 9'(p_in[1]) + 9'(in_q[1]) + 9'd1;
    s1_d.sq0dp0  = $signed({1'b0, in_q[0]}) - $signed({1'b0, p_in[0]});
    s1_d.sp1dq1  = $signed({1'b0, p_in[1]}) - $signed({1'b0, in_q[1]});
    s1_d.sd2p1p2 = $signed({2'b0, p_in[2]}) - $signed({1'b0, p_in[1], 1'b0});
    s1_d.sd2q1q2 = $signed({2'b0, in_q[2]}) - $signed({1'b0, in_q[1], 1'b0});
  end

  // ---------------- Stage 2 ----------------
  logic [6:1] flag;
  logic       f_en, f_bs4, f_p1, f_q1, f_sp, f_sq;
  logic [1:0] f_c0add;
  df_flag_unit u_flag (
    .p0(s1.p[0]), .p1(s1.p[1]), .p2(s1.p[2]),
    .q0(s1.q[0]), .q1(s1.q[1]), .q2(s1.q[2]),
    .alpha(s1.alpha), .beta(s1.beta), .bs(s1.bs), .chroma(s1.chroma),
    .flag(flag), .en(f_en), .bs4(f_bs4), .p1_mod(f_p1), .q1_mod(f_q1),
    .strong_p(f_sp), .strong_q(f_sq), .c0_add(f_c0add));

  typedef struct packed {
    pix4_t             p, q;
    logic              en, bs4, p1_mod, q1_mod, strong_p, strong_q;
    logic [4:0]        c1;         // table buffer
    logic [5:0]        c0;
    logic [9:0]        sp0q0p1p2, sp0q0q1q2, sp0q0p1q1;
    logic [8:0]        sp2p3, sq2q3;
    pix_t              bs4p1, bs4q1, bs4p0f, bs4q0f;
    logic signed [8:0] d0;          // (4(q0-p0) + (p1-q1) + 4) >> 3
    logic signed [8:0] dp1, dq1;    // unclipped p1 / q1 corrections
  } s2_t;

  s2_t s2_d, s2;
  logic signed [11:0] t0, tp1, tq1;

  always_comb begin
    s2_d.p         = s1.p;
    s2_d.q         = s1.q;
    s2_d.en        = f_en;
    s2_d.bs4       = f_bs4;
    s2_d.p1_mod    = f_p1;
    s2_d.q1_mod    = f_q1;
    s2_d.strong_p  = f_sp;
    s2_d.strong_q  = f_sq;
    s2_d.c1        = s1.c1;
    s2_d.c0        = 6'(s1.c1) + 6'(f_c0add);
    s2_d.sp0q0p1p2 = 10'(s1.sp0q0) + 10'(s1.sp1p2);
    s2_d.sp0q0q1q2 = 10'(s1.sp0q0) + 10'(s1.sq1q2);
    s2_d.sp0q0p1q1 = 10'(s1.sp0q0) + 10'(s1.sp1q1);
    s2_d.sp2p3     = s1.sp2p3;
    s2_d.sq2q3     = s1.sq2q3;
    s2_d.bs4p1     = 8'(s2_d.sp0q0p1p2 >> 2);
    s2_d.bs4q1     = 8'(s2_d.sp0q0q1q2 >> 2);
    s2_d.bs4p0f    = 8'((10'(s1.sp0p1) + 10'(s1.sp1q1)) >> 2);
    s2_d.bs4q0f    = 8'((10'(s1.sq0q1) + 10'(s1.sp1q1)) >> 2);
    t0             = (12'(s1.sq0dp0) <<< 2) + 12'(s1.sp1dq1) + 12'sd4;
    tp1            = $signed({3'b0, s1.sp0q0}) + (12'(s1.sd2p1p2) <<< 1);
    tq1            = $signed({3'b0, s1.sp0q0}) + (12'(s1.sd2q1q2) <<< 1);
    s2_d.d0        = 9'(t0 >>> 3);
    s2_d.dp1       = 9'(tp1 >>> 2);
    s2_d.dq1       = 9'(tq1 >>> 2);
  end

  // ---------------- Stage 3 ----------------
  typedef struct packed {
    pix4_t p, q;
    logic  en, bs4, p1_mod, q1_mod, strong_p, strong_q;
    pix_t  bs4p2, bs4p1, bs4p0, bs4p0f, bs4q0f, bs4q0, bs4q1, bs4q2;
    pix_t  bs1p1, bs1p0, bs1q0, bs1q1;
  } s3_t;

  s3_t s3_d, s3;

  function automatic logic signed [9:0] clip3(input logic signed [9:0] lim,
                                              input logic signed [9:0] v);
    if (v > lim)  return lim;
    if (v < -lim) return -lim;
    return v;
  endfunction

  function automatic pix_t clip1(input logic signed [10:0] v);
    if (v < 0)   return 8'd0;
    if (v > 255) return 8'd255;
    return 8'(v);
  endfunction

  logic signed [9:0] delta, dp1c, dq1c;

  always_comb begin
    s3_d.p        = s2.p;
    s3_d.q        = s2.q;
    s3_d.en       = s2.en;
    s3_d.bs4      = s2.bs4;
    s3_d.p1_mod   = s2.p1_mod;
    s3_d.q1_mod   = s2.q1_mod;
    s3_d.strong_p = s2.strong_p;
    s3_d.strong_q = s2.strong_q;
    // Filter Stage 3 (BS = 4)
    s3_d.bs4p2  = 8'((11'(s2.sp0q0p1p2) + {1'b0, s2.sp2p3, 1'b0}) >> 3);
    s3_d.bs4p0  = 8'((11'(s2.sp0q0p1q1) + 11'(s2.sp0q0p1p2)) >> 3);
    s3_d.bs4q0  = 8'((11'(s2.sp0q0p1q1) + 11'(s2.sp0q0q1q2)) >> 3);
    s3_d.bs4q2  = 8'((11'(s2.sp0q0q1q2) + {1'b0, s2.sq2q3, 1'b0}) >> 3);
    s3_d.bs4p1  = s2.bs4p1;
    s3_d.bs4q1  = s2.bs4q1;
    s3_d.bs4p0f = s2.bs4p0f;
    s3_d.bs4q0f = s2.bs4q0f;
    // Filter Clip (BS = 1..3)
    delta       = clip3(10'(s2.c0), 10'(s2.d0));
    dp1c        = clip3(10'(s2.c1), 10'(s2.dp1));
    dq1c        = clip3(10'(s2.c1), 10'(s2.dq1));
    s3_d.bs1p0  = clip1($signed({3'b0, s2.p[0]}) + 11'(delta));
    s3_d.bs1q0  = clip1($signed({3'b0, s2.q[0]}) - 11'(delta));
    s3_d.bs1p1  = clip1($signed({3'b0, s2.p[1]}) + 11'(dp1c));
    s3_d.bs1q1  = clip1($signed({3'b0, s2.q[1]}) + 11'(dq1c));
  end

  // ---------------- Filter out ----------------
  pix4_t op_d, oq_d;
  always_comb begin
    op_d = s3.p;
    oq_d = s3.q;
    if (s3.en) begin
      if (s3.bs4) begin
        if (s3.strong_p) begin
          op_d[0] = s3.bs4p0; op_d[1] = s3.bs4p1; op_d[2] = s3.bs4p2;
        end else
          op_d[0] = s3.bs4p0f;
        if (s3.strong_q) begin
          oq_d[0] = s3.bs4q0; oq_d[1] = s3.bs4q1; oq_d[2] = s3.bs4q2;
        end else
          oq_d[0] = s3.bs4q0f;
      end else begin
        op_d[0] = s3.bs1p0;
        oq_d[0] = s3.bs1q0;
        if (s3.p1_mod) op_d[1] = s3.bs1p1;
        if (s3.q1_mod) oq_d[1] = s3.bs1q1;
      end
    end
  end

  always_ff @(posedge clk) begin
    s1    <= s1_d;
    s2    <= s2_d;
    s3    <= s3_d;
    out_p <= op_d;
    out_q <= oq_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; out_valid <= 1'b0;
    end else begin
      v1 <= in_valid; v2 <= v1; v3 <= v2; out_valid <= v3;
    end
  end
endmodule
