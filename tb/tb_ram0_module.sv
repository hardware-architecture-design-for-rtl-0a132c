// Testbench of RAM-0: both halves are filled (half 0 by rows on port A,
// half 1 by columns on port B), then each cycle reads on port A of both
// halves while writing on port B of both halves, the access pattern of the
// horizontal-edge pass; everything is compared with a model.
module tb_ram0_module;
  import df_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  maddr_t a_req [2], b_req [2];
  pix4_t  a_wdata [2], b_wdata [2], a_rdata [2], b_rdata [2];
  int checks = 0, failures = 0;
  pix_t model [2][8][4][4];   // [half][slot][y][x]

  ram0_module dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic maddr_t mk(bit we, bit col, int slot, int line);
    maddr_t m;
    m.en = 1; m.we = we; m.col = col; m.slot = 3'(slot); m.line = 2'(line);
    return m;
  endfunction
  function automatic pix4_t ex(int h, int s, bit col, int l);
    pix4_t w;
    for (int j = 0; j < 4; j++) w[j] = col ? model[h][s][j][l] : model[h][s][l][j];
    return w;
  endfunction
  task automatic put(int h, int s, bit col, int l, pix4_t w);
    for (int j = 0; j < 4; j++) if (col) model[h][s][j][l] = w[j]; else model[h][s][l][j] = w[j];
  endtask
  task automatic idle();
    for (int h = 0; h < 2; h++) begin a_req[h] = '0; b_req[h] = '0; a_wdata[h] = '0; b_wdata[h] = '0; end
  endtask

  initial begin
    idle();
    @(negedge clk);
    for (int s = 0; s < 8; s++)
      for (int l = 0; l < 4; l++) begin
        idle();
        a_req[0] = mk(1, 0, s, l); a_wdata[0] = $urandom; put(0, s, 0, l, a_wdata[0]);
        b_req[1] = mk(1, 1, s, l); b_wdata[1] = $urandom; put(1, s, 1, l, b_wdata[1]);
        @(negedge clk);
      end
    for (int n = 0; n < 1000; n++) begin
      int s[2], l[2], ws[2], wl[2];
      bit c[2], wc[2];
      pix4_t e[2];
      idle();
      for (int h = 0; h < 2; h++) begin
        s[h] = $urandom_range(0, 3); l[h] = $urandom_range(0, 3); c[h] = 1'($urandom_range(0, 1));
        e[h] = ex(h, s[h], c[h], l[h]);
        a_req[h] = mk(0, c[h], s[h], l[h]);
        ws[h] = $urandom_range(4, 7); wl[h] = $urandom_range(0, 3); wc[h] = 1'($urandom_range(0, 1));
        b_req[h] = mk(1, wc[h], ws[h], wl[h]); b_wdata[h] = $urandom;
        put(h, ws[h], wc[h], wl[h], b_wdata[h]);
      end
      @(negedge clk);
      for (int h = 0; h < 2; h++) begin
        checks++;
        if (a_rdata[h] != e[h]) begin
          failures++;
          if (failures < 10) $display("half %0d: got %h expected %h", h, a_rdata[h], e[h]);
        end
      end
      // read back the slots just written, on port B
      idle();
      for (int h = 0; h < 2; h++) begin
        e[h] = ex(h, ws[h], !wc[h], wl[h]);
        b_req[h] = mk(0, !wc[h], ws[h], wl[h]);
      end
      @(negedge clk);
      for (int h = 0; h < 2; h++) begin
        checks++;
        if (b_rdata[h] != e[h]) begin failures++; if (failures < 10) $display("port B half %0d", h); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
