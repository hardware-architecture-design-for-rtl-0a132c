// Testbench of the threshold look-up table: spot values of the standard's
// alpha, beta and tC0 tables, zero below index 16 and for BS 0 / 4, and
// monotonic growth with the index.
module tb_df_lut;
  import df_pkg::*;
  idx_t ia, ib;
  bs_t  bs;
  logic [7:0] alpha, beta;
  logic [4:0] c1;
  int checks = 0, failures = 0;

  df_lut dut (.idx_a(ia), .idx_b(ib), .bs, .alpha, .beta, .c1);

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic probe(int a, int b, int s);
    ia = 6'(a); ib = 6'(b); bs = 3'(s); #1;
  endtask

  initial begin
    int pa, pb, pc;
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk_a(int i, int e); probe(i, 0, 1); chk($sformatf("alpha(%0d)", i), int'(alpha), e); endtask
  task automatic chk_b(int i, int e); probe(0, i, 1); chk($sformatf("beta(%0d)", i), int'(beta), e); endtask
  task automatic chk_t(int i, int e1, int e2, int e3);
    probe(i, 0, 1); chk($sformatf("tc0(%0d,1)", i), int'(c1), e1);
    probe(i, 0, 2); chk($sformatf("tc0(%0d,2)", i), int'(c1), e2);
    probe(i, 0, 3); chk($sformatf("tc0(%0d,3)", i), int'(c1), e3);
  endtask

  initial begin
    chk_a(15, 0); chk_a(16, 4); chk_a(20, 7); chk_a(25, 13); chk_a(30, 25);
    chk_a(36, 50); chk_a(44, 127); chk_a(49, 226); chk_a(51, 255);
    chk_b(15, 0); chk_b(16, 2); chk_b(19, 3); chk_b(23, 4); chk_b(26, 6);
    chk_b(33, 9); chk_b(40, 13); chk_b(51, 18);
    chk_t(16, 0, 0, 0); chk_t(17, 0, 0, 1); chk_t(21, 0, 1, 1); chk_t(23, 1, 1, 1);
    chk_t(29, 1, 1, 2); chk_t(33, 2, 2, 3); chk_t(40, 4, 5, 7); chk_t(45, 6, 8, 13);
    chk_t(51, 13, 17, 25);
    for (int i = 0; i < 52; i++) begin
      int a0, b0, c0;
      probe(i, i, 0); chk("c1 at BS 0", int'(c1), 0);
      probe(i, i, 4); chk("c1 at BS 4", int'(c1), 0);
      if (i < 16) begin chk("alpha low", int'(alpha), 0); chk("beta low", int'(beta), 0); end
      if (i > 0) begin
        probe(i - 1, i - 1, 3); a0 = int'(alpha); b0 = int'(beta); c0 = int'(c1);
        probe(i, i, 3);
        checks++;
        if (int'(alpha) < a0 || int'(beta) < b0 || int'(c1) < c0) begin failures++; $display("not monotonic at %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
