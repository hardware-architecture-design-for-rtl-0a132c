// Reference model of the H.264/AVC edge filter for one line of eight pixels,
// written directly from the standard's equations (no shared terms), used by
// the testbenches to compute expected values. Pixel index 0 is next to the
// edge on both sides.
package tb_ref_pkg;
  import df_pkg::*;

  function automatic int clip3i(int lo, int hi, int v);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int absi(int v);
    return (v < 0) ? -v : v;
  endfunction

  // Filters p[0..3], q[0..3] in place.
  function automatic void ref_line(inout pix4_t p, inout pix4_t q, input int bs,
                                   input int ia, input int ib, input bit chroma);
    int p0, p1, p2, p3, q0, q1, q2, q3, a, b, tc0, tc, d, ap, aq;
    p0 = int'(p[0]); p1 = int'(p[1]); p2 = int'(p[2]); p3 = int'(p[3]);
    q0 = int'(q[0]); q1 = int'(q[1]); q2 = int'(q[2]); q3 = int'(q[3]);
    a = int'(alpha_tab(6'(ia))); b = int'(beta_tab(6'(ib)));
    if (bs == 0) return;
    if (!(absi(p0 - q0) < a && absi(p1 - p0) < b && absi(q1 - q0) < b)) return;
    ap = (absi(p2 - p0) < b) ? 1 : 0;
    aq = (absi(q2 - q0) < b) ? 1 : 0;
    if (bs < 4) begin
      tc0 = int'(tc0_tab(6'(ia), 3'(bs)));
      tc = chroma ? tc0 + 1 : tc0 + ap + aq;
      d = clip3i(-tc, tc, (((q0 - p0) * 4) + (p1 - q1) + 4) >>> 3);
      p[0] = 8'(clip3i(0, 255, p0 + d));
      q[0] = 8'(clip3i(0, 255, q0 - d));
      if (!chroma && ap == 1)
        p[1] = 8'(p1 + clip3i(-tc0, tc0, (p2 + ((p0 + q0 + 1) >> 1) - 2 * p1) >>> 1));
      if (!chroma && aq == 1)
        q[1] = 8'(q1 + clip3i(-tc0, tc0, (q2 + ((p0 + q0 + 1) >> 1) - 2 * q1) >>> 1));
    end else begin
      if (!chroma && ap == 1 && absi(p0 - q0) < ((a >> 2) + 2)) begin
        p[0] = 8'((p2 + 2 * p1 + 2 * p0 + 2 * q0 + q1 + 4) >> 3);
        p[1] = 8'((p2 + p1 + p0 + q0 + 2) >> 2);
        p[2] = 8'((2 * p3 + 3 * p2 + p1 + p0 + q0 + 4) >> 3);
      end else
        p[0] = 8'((2 * p1 + p0 + q1 + 2) >> 2);
      if (!chroma && aq == 1 && absi(p0 - q0) < ((a >> 2) + 2)) begin
        q[0] = 8'((p1 + 2 * p0 + 2 * q0 + 2 * q1 + q2 + 4) >> 3);
        q[1] = 8'((p0 + q0 + q1 + q2 + 2) >> 2);
        q[2] = 8'((2 * q3 + 3 * q2 + q1 + q0 + p0 + 4) >> 3);
      end else
        q[0] = 8'((2 * q1 + q0 + p1 + 2) >> 2);
    end
  endfunction
endpackage
