// Testbench of the two-dimensional memory: blocks written by rows or by
// columns on either port are read back by rows and by columns on either port
// and compared with a model; the shifted placement (pixel (x, y) in bank
// (x + y) mod 4) and the one-cycle read latency are checked, and a read on
// one port runs in the same cycle as a write on the other.
module tb_mem2d;
  import df_pkg::*;
  localparam int DEPTH = 32, NS = DEPTH / 4;
  logic clk = 0;
  always #5 clk = ~clk;
  maddr_t a_req, b_req;
  pix4_t  a_wdata, b_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  pix_t model [NS][4][4];   // [slot][y][x]

  mem2d #(.DEPTH(DEPTH)) dut (.*);

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

  function automatic pix4_t expect_word(int slot, bit col, int line);
    pix4_t w;
    for (int j = 0; j < 4; j++) w[j] = col ? model[slot][j][line] : model[slot][line][j];
    return w;
  endfunction

  task automatic write(bit port_b, bit col, int slot, int line);
    pix4_t w;
    w = $urandom;
    for (int j = 0; j < 4; j++)
      if (col) model[slot][j][line] = w[j]; else model[slot][line][j] = w[j];
    if (port_b) begin b_req = mk(1, col, slot, line); b_wdata = w; end
    else        begin a_req = mk(1, col, slot, line); a_wdata = w; end
  endtask

  task automatic idle();
    a_req = '0; b_req = '0;
  endtask

  initial begin
    idle();
    @(negedge clk);
    // Fill: even slots by rows on A, odd slots by columns on B.
    for (int s = 0; s < NS; s++)
      for (int l = 0; l < 4; l++) begin
        idle();
        write(1'(s % 2), 1'(s % 2), s, l);
        @(negedge clk);
      end
    idle();
    @(negedge clk);
    // Placement check: pixel (x, y) of slot s in bank (x+y)%4, word 4s+y.
    for (int s = 0; s < NS; s++)
      for (int y = 0; y < 4; y++)
        for (int x = 0; x < 4; x++) begin
          checks++;
          if (dut.bank[(x + y) % 4][4 * s + y] != model[s][y][x]) begin
            failures++;
            if (failures < 10) $display("placement slot %0d (%0d,%0d)", s, x, y);
          end
        end
    // Random reads on both ports, with random writes on the other port.
    for (int n = 0; n < 2000; n++) begin
      int s, l, s2, l2;
      bit c, c2, rd_on_b;
      pix4_t ea;
      s = $urandom_range(0, NS - 1); l = $urandom_range(0, 3); c = 1'($urandom_range(0, 1));
      rd_on_b = 1'($urandom_range(0, 1));
      ea = expect_word(s, c, l);
      idle();
      if (rd_on_b) b_req = mk(0, c, s, l); else a_req = mk(0, c, s, l);
      // write to another slot on the other port in the same cycle
      do s2 = $urandom_range(0, NS - 1); while (s2 == s);
      l2 = $urandom_range(0, 3); c2 = 1'($urandom_range(0, 1));
      if (n % 2 == 0) write(!rd_on_b, c2, s2, l2);
      @(negedge clk);
      idle();
      checks++;
      if ((rd_on_b ? b_rdata : a_rdata) != ea) begin
        failures++;
        if (failures < 10) $display("read slot %0d line %0d col %0d: got %h expected %h", s, l, c,
                                    rd_on_b ? b_rdata : a_rdata, ea);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
