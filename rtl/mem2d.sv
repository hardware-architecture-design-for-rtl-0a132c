// Two-dimensional access memory for 4x4 pixel blocks.
//
// Four 8-bit SRAM banks M0..M3 hold DEPTH/4 blocks ("slots"). A block's pixel
// (x, y) is stored in bank (x + y) mod 4 at word slot*4 + y: each row is
// rotated by its row number, so the four pixels of any row AND of any column
// lie in four different banks and either can be read or written in one cycle
// without a transposition buffer.
//   Data input alignment: rotates the write word so that bank b receives
//     pixel (b - line) mod 4.
//   Address generator: row access -> every bank at slot*4 + line; column
//     access -> bank b at slot*4 + ((b - line) mod 4).
//   Delay: keeps the line number of a read for one cycle.
//   Data output alignment: rotates the bank outputs back, word[j] =
//     bank[(j + line) mod 4].
// Two independent ports (A and B); each bank is a dual-port SRAM, so a port
// may read or write in any cycle. The two ports must not write the same word
// in the same cycle. Reads have one cycle of latency; a read and a write of
// the same word in the same cycle return the old contents. Word index j of a
// row word is pixel x = j, of a column word pixel y = j. The storage is not
// reset.
//
// The shifted placement and the alignment / address-generator / delay
// structure follow the published architecture; the latency, the word
// addressing and the port behaviour on collisions are this design's own.
module mem2d
  import df_pkg::*;
#(
  parameter int DEPTH = 32            // words per bank (4 per block slot)
)(
  input  logic   clk,
  input  maddr_t a_req,
  input  pix4_t  a_wdata,
  output pix4_t  a_rdata,
  input  maddr_t b_req,
  input  pix4_t  b_wdata,
  output pix4_t  b_rdata
);
  localparam int AW = $clog2(DEPTH);

  pix_t bank [4][DEPTH];

  // Address generator
  function automatic logic [AW-1:0] bank_addr(input maddr_t r, input int b);
    logic [1:0] off;
    off = r.col ? 2'(b - int'(r.line)) : r.line;
    return AW'({r.slot, off});
  endfunction

  // Data input alignment
  function automatic pix_t align_in(input pix4_t w, input logic [1:0] line, input int b);
    return w[2'(b - int'(line))];
  endfunction

  pix4_t      a_q, b_q;
  logic [1:0] a_line_d, b_line_d;   // Delay

  always_ff @(posedge clk) begin
    a_line_d <= a_req.line;
    b_line_d <= b_req.line;
  end

  for (genvar b = 0; b < 4; b++) begin : g_bank
    always_ff @(posedge clk) begin
      if (a_req.en && a_req.we) bank[b][bank_addr(a_req, b)] <= align_in(a_wdata, a_req.line, b);
      if (b_req.en && b_req.we) bank[b][bank_addr(b_req, b)] <= align_in(b_wdata, b_req.line, b);
      if (a_req.en && !a_req.we) a_q[b] <= bank[b][bank_addr(a_req, b)];
      if (b_req.en && !b_req.we) b_q[b] <= bank[b][bank_addr(b_req, b)];
    end
  end

  // Data output alignment
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      a_rdata[j] = a_q[2'(j + int'(a_line_d))];
      b_rdata[j] = b_q[2'(j + int'(b_line_d))];
    end
  end

  initial assert (DEPTH >= 4 && DEPTH % 4 == 0 && DEPTH <= 32)
    else $error("mem2d: DEPTH must be a multiple of 4, at most 32");

  a_same_word: assert property (@(posedge clk)
    !(a_req.en && a_req.we && b_req.en && b_req.we && a_req.slot == b_req.slot &&
      a_req.col == b_req.col && a_req.line == b_req.line))
    else $error("mem2d: both ports write the same line");
endmodule
