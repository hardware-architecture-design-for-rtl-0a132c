// Testbench of RAM-1: writes rows or columns to either half through the
// write port while the read port reads lines written earlier, checking the
// half selection, the row/column access and the one-cycle read latency.
module tb_ram1_module;
  import df_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  maddr_t w_req, r_req;
  logic   w_half, r_half;
  pix4_t  w_data, r_data;
  int checks = 0, failures = 0;
  pix_t model [2][4][4][4];
  bit   valid [2][4];

  ram1_module dut (.*);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic maddr_t mk(bit col, int slot, int line);
    maddr_t m;
    m.en = 1; m.we = 0; m.col = col; m.slot = 3'(slot); m.line = 2'(line);
    return m;
  endfunction

  initial begin
    w_req = '0; r_req = '0; w_half = 0; r_half = 0; w_data = '0;
    @(negedge clk);
    // fill every block by rows
    for (int h = 0; h < 2; h++)
      for (int s = 0; s < 4; s++)
        for (int l = 0; l < 4; l++) begin
          w_req = mk(0, s, l); w_half = 1'(h); w_data = $urandom;
          for (int j = 0; j < 4; j++) model[h][s][l][j] = w_data[j];
          @(negedge clk);
        end
    w_req = '0;
    for (int n = 0; n < 1500; n++) begin
      int rh, rs, rl, wh, ws, wl;
      bit rc, wc;
      pix4_t e;
      rh = $urandom_range(0, 1); rs = $urandom_range(0, 3); rl = $urandom_range(0, 3); rc = 1'($urandom_range(0, 1));
      for (int j = 0; j < 4; j++) e[j] = rc ? model[rh][rs][j][rl] : model[rh][rs][rl][j];
      r_req = mk(rc, rs, rl); r_half = 1'(rh);
      // concurrent write to a different block
      wh = $urandom_range(0, 1); ws = $urandom_range(0, 3); wl = $urandom_range(0, 3); wc = 1'($urandom_range(0, 1));
      if (wh == rh && ws == rs) ws = (ws + 1) % 4;
      w_req = mk(wc, ws, wl); w_half = 1'(wh); w_data = $urandom;
      for (int j = 0; j < 4; j++) if (wc) model[wh][ws][j][wl] = w_data[j]; else model[wh][ws][wl][j] = w_data[j];
      @(negedge clk);
      r_req = '0; w_req = '0;
      checks++;
      if (r_data != e) begin
        failures++;
        if (failures < 10) $display("half %0d slot %0d line %0d col %0d: got %h expected %h", rh, rs, rl, rc, r_data, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
