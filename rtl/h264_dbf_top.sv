// H.264/AVC deblocking filter for a system-on-chip bus.
//
// Filters one macroblock (16x16 luma and two 8x8 chroma blocks, 4:2:0) per
// start pulse (298 cycles), with its top and left neighbour blocks, block row
// by block row (vertical edges of a block row, then the horizontal edges
// above it, with row 1's vertical edges moved ahead of row 0's horizontal
// ones), first luma, then Cb and Cr side by side. The parts:
//   df_ctrl         parameter register and sequencer (one line per cycle);
//   df_pipe_filter  four-stage edge filter with a recursive p input;
//   ram0_module     RAM-0, two-dimensional local macroblock memory
//                   (8 dual-port banks of 32 x 8 bit);
//   ram1_module     RAM-1, two-dimensional memory for the previous
//                   macroblock's right column (8 two-port banks of 16 x 8 bit);
//   the input multiplexers of the filter (p from RAM-0 or RAM-1, q from the
//   input port or RAM-0) and the write-back multiplexers.
// There are no other pixel registers: blocks never pass through a
// transposition buffer because both memories read and write rows and columns.
//
// Pixel port: the macroblock's own blocks and its top neighbours are read in
// rows. pix_in_req asks, with pix_in_tag (block number B0..B39 of the
// macroblock map, line, row/column flag), for one 32-bit word that must be
// on pix_in_data in the same cycle. pix_out_valid delivers a filtered word
// with its tag; column words (tag.col = 1) hold one pixel column, pixel 0 at
// the top. Input and output never happen in the same cycle, so both can share
// one bidirectional 32-bit bus. Left-neighbour blocks (B4, B9, B14, B19, B24,
// B27, B32, B35) come from RAM-1 and are written out as the previous
// macroblock's right column; flush writes out RAM-1 after the last macroblock
// of a picture, tagged as the right column (B8, B13, ...) of that macroblock.
// Parameters: five words on param_data while param_req is high (see df_ctrl).
//
// The block structure (control, pipelined filter, RAM-0, RAM-1 and the
// multiplexers around them) follows the published architecture; the tagged
// pixel port with separate input and output halves of one shared bus is this
// design's own.
module h264_dbf_top
  import df_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        flush,
  output logic        busy,
  output logic        done,
  output logic        param_req,
  input  logic [31:0] param_data,
  output logic        pix_in_req,
  output tag_t        pix_in_tag,
  input  pix4_t       pix_in_data,
  output logic        pix_out_valid,
  output tag_t        pix_out_tag,
  output pix4_t       pix_out_data
);
  logic   f_valid, f_rec, f_chroma, f_p_ram1, f_p_half, f_q_ext, f_q_half;
  bs_t    f_bs;
  idx_t   f_idx_a, f_idx_b;
  maddr_t r0_a_req [2], r0_b_req [2];
  logic   r0_a_wsel [2], r0_b_wsel [2];
  pix4_t  r0_a_wdata [2], r0_b_wdata [2], r0_a_rdata [2], r0_b_rdata [2];
  maddr_t r1_w_req, r1_r_req;
  logic   r1_w_half, r1_w_sel, r1_r_half, out_sel;
  pix4_t  r1_w_data, r1_r_data;
  pix4_t  ext_q, fp, fq, out_p, out_q, res_p;
  logic   out_valid_f;

  df_ctrl u_ctrl (
    .clk, .rst_n, .start, .flush, .busy, .done,
    .param_req, .param_data,
    .in_req(pix_in_req), .in_tag(pix_in_tag),
    .f_valid, .f_rec, .f_bs, .f_idx_a, .f_idx_b, .f_chroma,
    .f_p_ram1, .f_p_half, .f_q_ext, .f_q_half,
    .r0_a_req, .r0_a_wsel, .r0_b_req, .r0_b_wsel,
    .r1_w_req, .r1_w_half, .r1_w_sel, .r1_r_req, .r1_r_half,
    .out_valid(pix_out_valid), .out_tag(pix_out_tag), .out_sel);

  // Pixels read: the input word is registered to line up with memory reads.
  always_ff @(posedge clk) if (pix_in_req) ext_q <= pix_in_data;

  // Filter input multiplexers. p-side lines are stored with p0 last.
  assign fp = f_p_ram1 ? rev4(r1_r_data) : rev4(r0_a_rdata[f_p_half]);
  assign fq = f_q_ext  ? ext_q           : r0_a_rdata[f_q_half];

  df_pipe_filter u_filter (
    .clk, .rst_n, .in_valid(f_valid), .in_recursive(f_rec), .in_p(fp), .in_q(fq),
    .in_bs(f_bs), .in_idx_a(f_idx_a), .in_idx_b(f_idx_b), .in_chroma(f_chroma),
    .out_valid(out_valid_f), .out_p, .out_q);

  // Write-back multiplexers.
  assign res_p = rev4(out_p);
  always_comb begin
    for (int h = 0; h < 2; h++) begin
      r0_a_wdata[h] = r0_a_wsel[h] ? out_q : res_p;
      r0_b_wdata[h] = r0_b_wsel[h] ? out_q : res_p;
    end
  end
  assign r1_w_data    = r1_w_sel ? out_q : res_p;
  assign pix_out_data = out_sel  ? out_q : res_p;

  ram0_module u_ram0 (
    .clk, .a_req(r0_a_req), .a_wdata(r0_a_wdata), .a_rdata(r0_a_rdata),
    .b_req(r0_b_req), .b_wdata(r0_b_wdata), .b_rdata(r0_b_rdata));

  ram1_module u_ram1 (
    .clk, .w_req(r1_w_req), .w_half(r1_w_half), .w_data(r1_w_data),
    .r_req(r1_r_req), .r_half(r1_r_half), .r_data(r1_r_data));

  // Every write-back or output happens while the filter presents a result.
  a_out_has_data: assert property (@(posedge clk) disable iff (!rst_n)
    (pix_out_valid || r1_w_req.en || r0_b_req[0].en || r0_b_req[1].en) |-> out_valid_f)
    else $error("h264_dbf_top: write-back without filter result");
endmodule
