// Testbench of the controller on its own: one macroblock and one flush with
// random boundary strengths. Checks the five parameter cycles, the number of
// input words, output words and RAM-1 accesses of a macroblock, the order of
// the requested input blocks, the BS and indices given to the filter for
// every line (against a sequence built here from the pass order), that input
// and output never share a cycle, and the cycle counts (298 and 38).
module tb_df_ctrl;
  import df_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, flush, busy, done, param_req, in_req, out_valid, out_sel;
  logic [31:0] param_data;
  tag_t in_tag, out_tag;
  logic f_valid, f_rec, f_chroma, f_p_ram1, f_p_half, f_q_ext, f_q_half;
  bs_t  f_bs;
  idx_t f_idx_a, f_idx_b;
  maddr_t r0_a_req [2], r0_b_req [2], r1_w_req, r1_r_req;
  logic r0_a_wsel [2], r0_b_wsel [2], r1_w_half, r1_w_sel, r1_r_half;

  df_ctrl dut (.*);

  int checks = 0, failures = 0;
  int bsv [16], bsh [16];
  logic [31:0] pw [5];
  int pidx = 0;
  int exp_bs [$], exp_ia [$], got_bs [$], got_ia [$];
  int n_in, n_out, n_r1w, n_r1r, n_par, n_both;
  tag_t in_tags [$];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  always @(negedge clk) param_data = pw[pidx];
  always @(posedge clk) if (rst_n) begin
    if (param_req) begin pidx <= pidx + 1; n_par++; end
    if (in_req) begin n_in++; in_tags.push_back(in_tag); end
    if (out_valid) n_out++;
    if (in_req && out_valid) n_both++;
    if (r1_w_req.en) n_r1w++;
    if (r1_r_req.en) n_r1r++;
    if (f_valid) begin got_bs.push_back(int'(f_bs)); got_ia.push_back(int'(f_idx_a)); end
  end

  // Expected per-line BS and IndexA, pass by pass. Luma passes cover four
  // block columns; chroma passes cover Cb columns 0..1, then Cr columns 0..1.
  task automatic expect_mb(int ia_in_l, int ia_mb_l, int ia_in_c, int ia_mb_c);
    for (int pl = 0; pl < 2; pl++) begin
      int nr, ii, im;
      nr = (pl == 0) ? 4 : 2;
      ii = (pl == 0) ? ia_in_l : ia_in_c; im = (pl == 0) ? ia_mb_l : ia_mb_c;
      for (int i = 0; i < 16; i++) begin exp_bs.push_back(0); exp_ia.push_back(ii); end   // top load
      // row order H(0) H(1) V(0) V(1) H(2) V(2) H(3) V(3)
      for (int s = 0; s < 2 * nr; s++) begin
        int r;
        bit hp;
        hp = (s < 2) || (s >= 4 && s % 2 == 0);
        r  = (s < 4) ? s % 2 : s / 2;
        for (int c = 0; c < 4; c++) for (int k = 0; k < 4; k++) begin
          int ep;
          ep = (pl == 0) ? c : c % 2;
          if (hp) begin
            exp_bs.push_back(pl == 0 ? bsv[4 * ep + r] : bsv[8 * ep + 2 * r + k / 2]);
            exp_ia.push_back(ep == 0 ? im : ii);
          end else begin
            exp_bs.push_back(pl == 0 ? bsh[4 * r + ep] : bsh[8 * r + 2 * ep + k / 2]);
            exp_ia.push_back(r == 0 ? im : ii);
          end
        end
      end
      for (int i = 0; i < 32; i++) begin exp_bs.push_back(0); exp_ia.push_back(ii); end   // drain
    end
  endtask

  initial begin
    logic [95:0] v;
    int t0;
    start = 0; flush = 0;
    {n_in, n_out, n_r1w, n_r1r, n_par, n_both} = '0;
    for (int i = 0; i < 16; i++) begin
      bsv[i] = $urandom_range(0, 4); bsh[i] = $urandom_range(0, 4);
      v[3 * i +: 3] = 3'(bsv[i]); v[3 * (16 + i) +: 3] = 3'(bsh[i]);
    end
    pw[0] = v[31:0]; pw[1] = v[63:32]; pw[2] = v[95:64];
    pw[3] = {8'd0, 6'd30, 6'd31, 6'd32, 6'd33};
    pw[4] = {8'd0, 6'd40, 6'd41, 6'd42, 6'd43};
    expect_mb(30, 40, 32, 42);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; t0 = int'($time);
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    chk("cycles per macroblock", (int'($time) - t0) / 10, 298);
    chk("parameter cycles", n_par, 5);
    chk("input words", n_in, 128);
    chk("output words", n_out, 128);
    // The last four RAM-1 writes of the macroblock land after done.
    chk("RAM-1 writes at done", n_r1w, 28);
    repeat (4) @(negedge clk);
    chk("RAM-1 writes", n_r1w, 32);
    chk("RAM-1 reads", n_r1r, 32);
    chk("in and out in one cycle", n_both, 0);
    chk("filter lines", got_bs.size(), exp_bs.size());
    for (int i = 0; i < exp_bs.size() && i < got_bs.size(); i++) begin
      chk($sformatf("BS of line %0d", i), got_bs[i], exp_bs[i]);
      chk($sformatf("IndexA of line %0d", i), got_ia[i], exp_ia[i]);
    end
    // First input words: top neighbours B0..B3 by rows, then B5 (row 0 of the MB).
    for (int i = 0; i < 16; i++) begin
      chk("top block", int'(in_tags[i].blk), i / 4);
      chk("top line", int'(in_tags[i].line), i % 4);
    end
    chk("first MB block", int'(in_tags[16].blk), 5);
    chk("second MB block", int'(in_tags[20].blk), 6);
    // Flush.
    n_out = 0; n_r1r = 0;
    @(negedge clk); flush = 1; t0 = int'($time);
    @(negedge clk); flush = 0;
    while (!done) @(negedge clk);
    chk("flush cycles", (int'($time) - t0) / 10, 38);
    chk("flush words", n_out, 32);
    chk("flush RAM-1 reads", n_r1r, 32);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
