// Self-checking testbench of the pipelined edge filter: random lines with
// small pixel steps (so that most edges are filtered), all BS values, luma and
// chroma, compared with the reference model four cycles later. A run of
// recursive edges checks the feedback path, and the latency is checked.
module tb_df_pipe_filter;
  import df_pkg::*;
  import tb_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid, in_rec, in_chroma, out_valid;
  pix4_t in_p, in_q, out_p, out_q;
  bs_t   in_bs;
  idx_t  in_ia, in_ib;

  df_pipe_filter dut (.clk, .rst_n, .in_valid, .in_recursive(in_rec), .in_p, .in_q,
                      .in_bs, .in_idx_a(in_ia), .in_idx_b(in_ib), .in_chroma,
                      .out_valid, .out_p, .out_q);

  int checks = 0, failures = 0, filtered = 0, nbs4 = 0;
  pix4_t exp_p[$], exp_q[$];
  int cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic pix4_t rnd_side(int base, int step);
    pix4_t w;
    for (int i = 0; i < 4; i++) w[i] = 8'(clip3i(0, 255, base + $urandom_range(0, step) - step / 2));
    return w;
  endfunction

  // Compare outputs against expectations in order.
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      pix4_t ep, eq;
      ep = exp_p.pop_front(); eq = exp_q.pop_front();
      checks++;
      if (ep != out_p || eq != out_q) begin
        failures++;
        if (failures < 10) $display("mismatch: got %h|%h exp %h|%h", out_p, out_q, ep, eq);
      end
    end
  end

  initial begin
    pix4_t p, q, rp, rq, prev_q[4];
    int t_in, lat;
    in_valid = 0; in_rec = 0; in_chroma = 0; in_p = '0; in_q = '0; in_bs = '0; in_ia = '0; in_ib = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // Latency: one line in, count cycles to out_valid.
    @(negedge clk);
    in_valid = 1; in_p = 32'h10101010; in_q = 32'h12121212; in_bs = 3'd2; in_ia = 6'd30; in_ib = 6'd30;
    rp = in_p; rq = in_q; ref_line(rp, rq, 2, 30, 30, 0);
    exp_p.push_back(rp); exp_q.push_back(rq);
    t_in = cycle;
    @(negedge clk); in_valid = 0;
    while (!out_valid) @(negedge clk);
    lat = cycle - t_in;
    checks++;
    if (lat != 4) begin failures++; $display("latency %0d, expected 4", lat); end
    @(negedge clk);
    // Random lines.
    for (int n = 0; n < 4000; n++) begin
      int base, step, bs, ia, ib;
      bit ch;
      base = $urandom_range(0, 255);
      step = (n % 3 == 0) ? 60 : 12;
      p = rnd_side(base, step);
      q = rnd_side(base + $urandom_range(0, 20) - 10, step);
      bs = $urandom_range(0, 4);
      ia = $urandom_range(0, 51); ib = $urandom_range(0, 51);
      ch = ($urandom_range(0, 3) == 0);
      in_valid = 1; in_rec = 0; in_p = p; in_q = q; in_bs = 3'(bs); in_ia = 6'(ia); in_ib = 6'(ib); in_chroma = ch;
      rp = p; rq = q; ref_line(rp, rq, bs, ia, ib, ch);
      if (rp != p || rq != q) filtered++;
      if (bs == 4 && rp[1] != p[1]) nbs4++;
      exp_p.push_back(rp); exp_q.push_back(rq);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (6) @(negedge clk);
    // Recursive chain: three edges of four lines; the p side of edges 2 and 3
    // comes from the filter's own q output.
    for (int e = 0; e < 3; e++) begin
      for (int l = 0; l < 4; l++) begin
        q = rnd_side(100 + 4 * e, 10);
        if (e == 0) p = rnd_side(96, 10);
        else p = {prev_q[l][0], prev_q[l][1], prev_q[l][2], prev_q[l][3]};
        in_valid = 1; in_rec = (e != 0); in_p = (e == 0) ? p : 32'hdeadbeef; in_q = q;
        in_bs = 3'(1 + e); in_ia = 6'd40; in_ib = 6'd40; in_chroma = 0;
        rp = p; rq = q; ref_line(rp, rq, 1 + e, 40, 40, 0);
        prev_q[l] = rq;
        exp_p.push_back(rp); exp_q.push_back(rq);
        @(negedge clk);
      end
    end
    in_valid = 0; in_rec = 0;
    repeat (8) @(negedge clk);
    checks++;
    if (filtered < 500 || nbs4 < 20) begin failures++; $display("too few filtered lines %0d %0d", filtered, nbs4); end
    checks++;
    if (exp_p.size() != 0) begin failures++; $display("outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
