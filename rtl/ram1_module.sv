// RAM-1: memory for the rightmost column of blocks of the previous
// macroblock, built from eight two-port 16-word x 8-bit SRAM banks (1024
// bits). Half 0 holds the four luma blocks, half 1 the two Cb and two Cr
// blocks (slots 0..3 each). It is a two-port memory: one write port and one
// read port, each addressing one half per cycle, both with row/column access
// through the two-dimensional organisation of mem2d. Read latency one cycle.
//
// Size and bank shape (eight 16x8 banks, one write and one read port) follow
// the published architecture; the luma/chroma half split is this design's own.
module ram1_module
  import df_pkg::*;
#(
  parameter int DEPTH = 16   // words per bank
)(
  input  logic   clk,
  input  maddr_t w_req,       // write port (w_req.we is ignored)
  input  logic   w_half,
  input  pix4_t  w_data,
  input  maddr_t r_req,       // read port (r_req.we is ignored)
  input  logic   r_half,
  output pix4_t  r_data
);
  maddr_t wq [2], rq [2];
  pix4_t  rd [2], unused_rd [2];
  logic   r_half_d;

  always_comb begin
    for (int h = 0; h < 2; h++) begin
      wq[h]    = w_req;
      wq[h].en = w_req.en && (w_half == 1'(h));
      wq[h].we = 1'b1;
      rq[h]    = r_req;
      rq[h].en = r_req.en && (r_half == 1'(h));
      rq[h].we = 1'b0;
    end
  end

  always_ff @(posedge clk) if (r_req.en) r_half_d <= r_half;

  assign r_data = rd[r_half_d];

  for (genvar h = 0; h < 2; h++) begin : g_half
    mem2d #(.DEPTH(DEPTH)) u_half (
      .clk,
      .a_req(wq[h]), .a_wdata(w_data), .a_rdata(unused_rd[h]),
      .b_req(rq[h]), .b_wdata('0),     .b_rdata(rd[h]));
  end
endmodule
