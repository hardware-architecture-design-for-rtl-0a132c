// Testbench of the flag operation unit: random pixels and thresholds, flags
// and selection signals compared with values computed here from the flag
// definitions and the two output selection tables.
module tb_df_flag_unit;
  import df_pkg::*;
  pix_t p0, p1, p2, q0, q1, q2;
  logic [7:0] alpha, beta;
  bs_t bs;
  logic chroma;
  logic [6:1] flag;
  logic en, bs4, p1_mod, q1_mod, strong_p, strong_q;
  logic [1:0] c0_add;
  int checks = 0, failures = 0;

  df_flag_unit dut (.*);

  function automatic int ad(logic [7:0] a, logic [7:0] b); return a > b ? int'(a) - int'(b) : int'(b) - int'(a); endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    static int n_en = 0, n_sp = 0, n_p1 = 0;
    for (int n = 0; n < 20000; n++) begin
      logic [6:1] ef;
      logic e_en, e_p1, e_q1, e_sp, e_sq;
      int e_c0;
      int base;
      base = $urandom_range(30, 220);
      p0 = 8'(base + $urandom_range(0, 16) - 8); p1 = 8'(base + $urandom_range(0, 16) - 8);
      p2 = 8'(base + $urandom_range(0, 16) - 8); q0 = 8'(base + $urandom_range(0, 24) - 12);
      q1 = 8'(base + $urandom_range(0, 24) - 12); q2 = 8'(base + $urandom_range(0, 24) - 12);
      alpha = 8'($urandom_range(0, 40)); beta = 8'($urandom_range(0, 12));
      bs = 3'($urandom_range(0, 4)); chroma = ($urandom_range(0, 3) == 0);
      #1;
      ef[1] = ad(p0, q0) < alpha;  ef[2] = ad(p1, p0) < beta;  ef[3] = ad(q1, q0) < beta;
      ef[4] = ad(p2, p0) < beta;   ef[5] = ad(q2, q0) < beta;
      ef[6] = ad(p0, q0) < (int'(alpha) / 4 + 2);
      e_en = bs != 0 && ef[1] && ef[2] && ef[3];
      // Table 1 (BS 1..3): p1 needs FLAG1..4 and not chroma
      e_p1 = e_en && bs != 4 && ef[4] && !chroma;
      e_q1 = e_en && bs != 4 && ef[5] && !chroma;
      // Table 2 (BS 4): p2..p0 need FLAG1..4, FLAG6 and not chroma
      e_sp = e_en && bs == 4 && ef[4] && ef[6] && !chroma;
      e_sq = e_en && bs == 4 && ef[5] && ef[6] && !chroma;
      e_c0 = chroma ? 1 : int'(ef[4]) + int'(ef[5]);
      checks++;
      if (flag != ef || en != e_en || p1_mod != e_p1 || q1_mod != e_q1 || strong_p != e_sp ||
          strong_q != e_sq || int'(c0_add) != e_c0 || bs4 != (bs == 4)) begin
        failures++;
        if (failures < 10) $display("mismatch n=%0d flags %b/%b en %b/%b", n, flag, ef, en, e_en);
      end
      n_en += e_en; n_sp += e_sp; n_p1 += e_p1;
    end
    checks++;
    if (n_en < 100 || n_sp < 10 || n_p1 < 10) begin failures++; $display("coverage %0d %0d %0d", n_en, n_sp, n_p1); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
