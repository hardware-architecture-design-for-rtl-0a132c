// RAM-0: local macroblock memory built from eight dual-port 32-word x 8-bit
// SRAM banks (2048 bits), organised as two halves of four banks. Each half is
// a two-dimensional memory (mem2d) of eight 4x4 block slots, so a block row
// or column is one access. Each half has its own two ports, so in one cycle
// the controller can read one block line from each half (the p and q blocks
// of a horizontal edge live in different halves) while writing filtered lines
// back on the other port of each half. Read latency one cycle.
//
// Size and bank shape (eight dual-port 32x8 banks) follow the published
// architecture; the split into two independently ported halves is this
// design's own.
module ram0_module
  import df_pkg::*;
#(
  parameter int DEPTH = 32   // words per bank
)(
  input  logic   clk,
  input  maddr_t a_req   [2],  // port A of half 0 / half 1
  input  pix4_t  a_wdata [2],
  output pix4_t  a_rdata [2],
  input  maddr_t b_req   [2],  // port B of half 0 / half 1
  input  pix4_t  b_wdata [2],
  output pix4_t  b_rdata [2]
);
  for (genvar h = 0; h < 2; h++) begin : g_half
    mem2d #(.DEPTH(DEPTH)) u_half (
      .clk,
      .a_req(a_req[h]), .a_wdata(a_wdata[h]), .a_rdata(a_rdata[h]),
      .b_req(b_req[h]), .b_wdata(b_wdata[h]), .b_rdata(b_rdata[h]));
  end
endmodule
