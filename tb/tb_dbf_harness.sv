// End-to-end harness of the deblocking filter: a frame memory model that
// serves the filter's read requests and takes its write-backs, macroblock by
// macroblock in raster order, and a reference that deblocks a copy of the
// same picture in the standard's order (per macroblock: luma vertical edges
// left to right, luma horizontal edges top to bottom, then Cb and Cr). At the
// end both pictures must be identical. BS is random (0..4 on macroblock edges,
// 0..3 inside, 0 on picture borders), IndexA/IndexB random in 16..51.
// Also checks the cycle counts (298 per macroblock, 38 for the flush) and
// counts how often each mechanism of the design was used.
module tb_dbf_harness
  import df_pkg::*;
  import tb_ref_pkg::*;
#(
  parameter int MBW = 2,          // picture width in macroblocks
  parameter int MBH = 2,          // picture height in macroblocks
  parameter int CYC_MB = 298,
  parameter int CYC_FLUSH = 38
)(
  output int checks,
  output int failures,
  output bit finished
);
  localparam int YW = MBW * 16, YH = MBH * 16, CW = MBW * 8, CH = MBH * 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  start, flush, busy, done, param_req, pix_in_req, pix_out_valid;
  logic [31:0] param_data;
  tag_t  pix_in_tag, pix_out_tag;
  pix4_t pix_in_data, pix_out_data;

  h264_dbf_top dut (.clk, .rst_n, .start, .flush, .busy, .done, .param_req, .param_data,
                    .pix_in_req, .pix_in_tag, .pix_in_data,
                    .pix_out_valid, .pix_out_tag, .pix_out_data);

  // pictures: plane 0 = Y, 1 = Cb, 2 = Cr
  byte unsigned hw  [3][YH][YW];
  byte unsigned ref_[3][YH][YW];
  int  bsv [MBH][MBW][16], bsh [MBH][MBW][16];
  int  ia_in [MBH][MBW][2], ib_in [MBH][MBW][2], ia_mb [MBH][MBW][2], ib_mb [MBH][MBW][2];

  int cur_mx, cur_my, prev_mx, prev_my;
  bit have_prev;
  int n_rec, n_ram1_rd, n_col, n_strong, n_bs13, n_p1, n_chroma, n_flush_out, n_left_out, n_param;

  function automatic int pw(int pl);  return pl == 0 ? YW : CW; endfunction

  // Map a tag to plane and pixel coordinates of word index 0, with step.
  // Returns 0 if the tag lies outside the picture (or no previous MB).
  function automatic bit map_tag(input tag_t t, input bit flushing, output int pl,
                                 output int x0, output int y0, output int dx, output int dy);
    int b, bw, r, c, mx, my;
    b = int'(t.blk);
    if (b < 24)      begin pl = 0; bw = 4; end
    else if (b < 32) begin pl = 1; bw = 2; end
    else             begin pl = 2; bw = 2; end
    mx = cur_mx; my = cur_my;
    if (pl == 0) begin
      if (b < 4) begin r = -1; c = b; end
      else begin r = (b - 4) / 5; c = (b - 4) % 5 - 1; end
    end else begin
      int o;
      o = (pl == 1) ? 24 : 32;
      if (b >= o + 6) begin r = -1; c = b - o - 6; end
      else begin r = (b - o) / 3; c = (b - o) % 3 - 1; end
    end
    if (c == -1) begin   // left neighbour = right column of the previous MB
      if (!have_prev) return 0;
      mx = prev_mx; my = prev_my; c = bw - 1;
    end
    if (flushing) begin mx = cur_mx; my = cur_my; end
    y0 = my * bw * 4 + r * 4; x0 = mx * bw * 4 + c * 4;
    if (t.col) begin x0 += int'(t.line); dx = 0; dy = 1; end
    else       begin y0 += int'(t.line); dx = 1; dy = 0; end
    if (y0 < 0) return 0;
    return 1;
  endfunction

  bit flushing = 0;
  int pidx;
  logic [31:0] pwords [5];

  // Serve requests half a cycle after the controller's state changed.
  always @(negedge clk) begin
    int pl, x0, y0, dx, dy;
    param_data = pwords[pidx];
    pix_in_data = '0;
    if (rst_n && pix_in_req && map_tag(pix_in_tag, 0, pl, x0, y0, dx, dy))
      for (int j = 0; j < 4; j++) pix_in_data[j] = hw[pl][y0 + j * dy][x0 + j * dx];
    if (rst_n && pix_out_valid) begin
      if (flushing) n_flush_out++;
      if (!flushing && (pix_out_tag.blk inside {4, 9, 14, 19, 24, 27, 32, 35})) n_left_out++;
      if (map_tag(pix_out_tag, flushing, pl, x0, y0, dx, dy))
        for (int j = 0; j < 4; j++) hw[pl][y0 + j * dy][x0 + j * dx] = pix_out_data[j];
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (param_req) begin pidx <= (pidx + 1) % 5; n_param++; end
    if (dut.f_rec && dut.f_valid) n_rec++;
    if (dut.r1_r_req.en) n_ram1_rd++;
    if (dut.r0_a_req[0].en && dut.r0_a_req[0].col && !dut.r0_a_req[0].we) n_col++;
    if (dut.u_filter.s3.en && dut.u_filter.s3.strong_p) n_strong++;
    if (dut.u_filter.s3.en && !dut.u_filter.s3.bs4) n_bs13++;
    if (dut.u_filter.s3.p1_mod && dut.u_filter.s3.en) n_p1++;
    if (dut.f_valid && dut.f_chroma && dut.f_bs != 0) n_chroma++;
  end

  // Reference deblocking of one MB.
  task automatic ref_mb(int mx, int my);
    for (int pl = 0; pl < 3; pl++) begin
      int bw, n;
      bw = (pl == 0) ? 4 : 2; n = bw * 4;
      for (int dir = 0; dir < 2; dir++)          // 0: vertical edges, 1: horizontal
        for (int e = 0; e < bw; e++)
          for (int l = 0; l < n; l++) begin
            pix4_t p, q;
            int bs, ia, ib, ci, x, y, xx, yy;
            ci = (pl == 0) ? 0 : 1;
            if (pl == 0) bs = (dir == 0) ? bsv[my][mx][4 * e + l / 4] : bsh[my][mx][4 * e + l / 4];
            else         bs = (dir == 0) ? bsv[my][mx][8 * e + l / 2] : bsh[my][mx][8 * e + l / 2];
            ia = (e == 0) ? ia_mb[my][mx][ci] : ia_in[my][mx][ci];
            ib = (e == 0) ? ib_mb[my][mx][ci] : ib_in[my][mx][ci];
            x = mx * n + ((dir == 0) ? 4 * e : l);
            y = my * n + ((dir == 0) ? l : 4 * e);
            if ((dir == 0 && x == 0) || (dir == 1 && y == 0)) continue;
            for (int i = 0; i < 4; i++) begin
              if (dir == 0) begin p[i] = ref_[pl][y][x - 1 - i]; q[i] = ref_[pl][y][x + i]; end
              else          begin p[i] = ref_[pl][y - 1 - i][x]; q[i] = ref_[pl][y + i][x]; end
            end
            ref_line(p, q, bs, ia, ib, ci == 1);
            for (int i = 0; i < 4; i++) begin
              if (dir == 0) begin ref_[pl][y][x - 1 - i] = p[i]; ref_[pl][y][x + i] = q[i]; end
              else          begin ref_[pl][y - 1 - i][x] = p[i]; ref_[pl][y + i][x] = q[i]; end
            end
          end
    end
  endtask

  initial begin
    int t0, cyc;
    start = 0; flush = 0; pidx = 0;
    checks = 0; failures = 0; finished = 0;
    {n_rec, n_ram1_rd, n_col, n_strong, n_bs13, n_p1, n_chroma, n_flush_out, n_left_out, n_param} = '0;
    // Picture: 4x4 blocks of a smooth base with random offsets per block.
    for (int pl = 0; pl < 3; pl++)
      for (int by = 0; by < YH / 4; by++)
        for (int bx = 0; bx < YW / 4; bx++) begin
          int base;
          base = 40 + $urandom_range(0, 170);
          for (int y = 0; y < 4; y++)
            for (int x = 0; x < 4; x++) begin
              byte unsigned v;
              v = 8'(base + $urandom_range(0, 6));
              if (by * 4 + y < YH && bx * 4 + x < YW) begin
                hw[pl][by * 4 + y][bx * 4 + x] = v;
                ref_[pl][by * 4 + y][bx * 4 + x] = v;
              end
            end
        end
    for (int my = 0; my < MBH; my++)
      for (int mx = 0; mx < MBW; mx++) begin
        for (int i = 0; i < 16; i++) begin
          bsv[my][mx][i] = (i < 4) ? ((mx == 0) ? 0 : $urandom_range(0, 4)) : $urandom_range(0, 3);
          bsh[my][mx][i] = (i < 4) ? ((my == 0) ? 0 : $urandom_range(0, 4)) : $urandom_range(0, 3);
        end
        for (int c = 0; c < 2; c++) begin
          ia_in[my][mx][c] = $urandom_range(16, 51); ib_in[my][mx][c] = $urandom_range(16, 51);
          ia_mb[my][mx][c] = $urandom_range(16, 51); ib_mb[my][mx][c] = $urandom_range(16, 51);
        end
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    have_prev = 0;
    for (int my = 0; my < MBH; my++)
      for (int mx = 0; mx < MBW; mx++) begin
        logic [95:0] bsvec;
        for (int i = 0; i < 16; i++) begin
          bsvec[3 * i +: 3] = 3'(bsv[my][mx][i]);
          bsvec[3 * (16 + i) +: 3] = 3'(bsh[my][mx][i]);
        end
        pwords[0] = bsvec[31:0]; pwords[1] = bsvec[63:32]; pwords[2] = bsvec[95:64];
        pwords[3] = {8'd0, 6'(ia_in[my][mx][0]), 6'(ib_in[my][mx][0]), 6'(ia_in[my][mx][1]), 6'(ib_in[my][mx][1])};
        pwords[4] = {8'd0, 6'(ia_mb[my][mx][0]), 6'(ib_mb[my][mx][0]), 6'(ia_mb[my][mx][1]), 6'(ib_mb[my][mx][1])};
        cur_mx = mx; cur_my = my;
        @(negedge clk); start = 1; t0 = int'($time);
        @(negedge clk); start = 0;
        while (!done) @(negedge clk);
        cyc = (int'($time) - t0) / 10;
        checks++;
        if (cyc != CYC_MB) begin
          failures++;
          if (failures < 5) $display("MB (%0d,%0d): %0d cycles, expected %0d", mx, my, cyc, CYC_MB);
        end
        ref_mb(mx, my);
        prev_mx = mx; prev_my = my; have_prev = 1;
      end
    // End of picture: write out the right column kept in RAM-1.
    flushing = 1;
    @(negedge clk); flush = 1; t0 = int'($time);
    @(negedge clk); flush = 0;
    while (!done) @(negedge clk);
    cyc = (int'($time) - t0) / 10;
    checks++;
    if (cyc != CYC_FLUSH) begin failures++; $display("flush: %0d cycles, expected %0d", cyc, CYC_FLUSH); end
    // Compare pictures.
    for (int pl = 0; pl < 3; pl++)
      for (int y = 0; y < ((pl == 0) ? YH : CH); y++)
        for (int x = 0; x < pw(pl); x++) begin
          checks++;
          if (hw[pl][y][x] != ref_[pl][y][x]) begin
            failures++;
            if (failures < 10) $display("plane %0d (%0d,%0d): got %0d expected %0d", pl, x, y, hw[pl][y][x], ref_[pl][y][x]);
          end
        end
    // Every mechanism must have been used.
    $display("mechanisms: recursive=%0d ram1_reads=%0d column_reads=%0d strong=%0d bs1to3=%0d p1=%0d chroma=%0d left_out=%0d flush_out=%0d param=%0d",
             n_rec, n_ram1_rd, n_col, n_strong, n_bs13, n_p1, n_chroma, n_left_out, n_flush_out, n_param);
    checks += 8;
    if (n_rec == 0) failures++;
    if (n_ram1_rd == 0) failures++;
    if (n_col == 0) failures++;
    if (n_strong == 0) failures++;
    if (n_bs13 == 0) failures++;
    if (n_p1 == 0) failures++;
    if (n_chroma == 0) failures++;
    if (n_flush_out != 32) failures++;
    checks++;
    if (n_param != 5 * MBW * MBH) failures++;
    finished = 1;
  end
endmodule
