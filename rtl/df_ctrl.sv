// Control module and information register of the deblocking filter.
//
// Holds the parameters of the current macroblock (MB) and sequences its
// filtering one line per cycle. Parameters arrive as five 32-bit words on the
// parameter port (one per cycle, param_req high):
//   words 0..2  96-bit vector of 32 boundary strengths, 3 bits each, BS i in
//               bits [3i+2:3i]; i = 0..15 vertical edges (index 4*column +
//               row), i = 16..31 horizontal edges (16 + 4*row + column).
//               Chroma edges reuse the luma BS of the same position.
//   word 3      IndexA/IndexB for the inner edges: [23:18] luma IndexA,
//               [17:12] luma IndexB, [11:6] chroma IndexA, [5:0] chroma IndexB
//   word 4      the same four values for the MB's left and top edges.
//
// The MB is filtered in two planes: luma (4x4 blocks), then chroma, where
// the 2x2 blocks of Cb and of Cr sit side by side as one plane of 2 rows by 4
// block columns (Cb columns 0..1, Cr columns 2..3; the two components never
// share an edge, so they simply take turns inside each pass). Per plane:
// load the top neighbour blocks into RAM-0 (TIN pass); then for each block
// row r the vertical edges of row r left to right (H pass: the left
// neighbour's row comes from RAM-1, the MB's rows from the input port, and
// each later edge takes its p side recursively from the filter's q output),
// and the horizontal edges above row r (V pass, columns read from RAM-0), in
// the row order H(0) H(1) V(0) V(1) H(2) V(2) H(3) V(3); finally a drain pass
// writes out the blocks still held in RAM-0 and copies the rightmost bottom
// blocks to RAM-1. Running H(1) before V(0) is allowed because H(1) touches
// only row 1, and it lets the pass that sends out the top neighbours, V(0),
// be followed by V(1), which needs no input word. Every pass issues one operation per
// cycle, and every operation, pass-through ones included, goes through the
// filter (BS 0 leaves pixels unchanged), so all results return five cycles
// after issue: an operation issued in cycle t reads memory / the input port
// in t, enters the filter in t+1 and is written back (RAM-0, RAM-1 or output
// port) in t+5.
//
// RAM-0 placement: block row r of the plane lives in half r mod 2, slot =
// block column, except the rightmost block of each component, which lives in
// the other half. The top neighbours count as row -1 (slots 4..7), the
// left-neighbour temporaries use slots 4..7 of half 0, except the chroma
// ones of block row 1, which go to half 1 (slots 5 and 7) because half 0
// slots 5 and 7 still hold the rightmost chroma top neighbours when H(1) runs. Hence an H pass writes
// only through port B, a V pass reads its p and q lines from different halves
// on port A and writes its q results through port B, and a V pass can start
// right after its H pass.
//
// Passes follow each other directly except where a pass would collide with
// the write-backs still in flight from the previous one on the shared pixel
// port:
//   V(r) -> H(r+1)  1 cycle (luma r = 1, 2): the last block of V goes to
//                   RAM-1, so only the last output word is in the way;
//   drain -> chroma 1 cycle, for the same reason;
//   end of MB       1 cycle: done rises after the last output word; the final
//                   RAM-1 writes complete in the following cycles.
// The shared input / output port therefore never carries two words in one
// cycle, and no pass reads a line that is still being written.
//
// With these rules an MB takes 298 cycles from the start pulse to the done
// pulse: 1 to leave idle, 5 parameter words, 178 for luma (16 + 4*16 + 4*16 +
// 32 operations and 2 gap cycles), 1 gap, 112 for chroma (16 + 2*16 + 2*16 +
// 32 operations, no gap) and 1 end cycle. flush writes out the eight
// blocks kept in RAM-1 (the last MB's right column) in 32 operations, 38
// cycles to done.
//
// Interfaces: start/flush are one-cycle pulses accepted when busy is low;
// done pulses for one cycle at the end. in_req/in_tag ask for one input word
// in the same cycle; out_valid/out_tag/out_sel announce an output word.
//
// The edge order inside a block row, the five parameter cycles, the use of
// RAM-0 for the current macroblock and of RAM-1 for the right column, and the
// 32-operation flush follow the published architecture. The parameter word
// layout, the block tags, the placement of blocks in RAM-0, the side-by-side
// chroma passes, the H(1)-before-V(0) row order and the pass-by-pass schedule
// (298 cycles per macroblock where the published, more tightly overlapped
// schedule needs 279) are this design's own.
module df_ctrl
  import df_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        flush,
  output logic        busy,
  output logic        done,
  // parameter port
  output logic        param_req,
  input  logic [31:0] param_data,
  // pixel input request (data goes to the datapath)
  output logic        in_req,
  output tag_t        in_tag,
  // filter control, one cycle after issue
  output logic        f_valid,
  output logic        f_rec,
  output bs_t         f_bs,
  output idx_t        f_idx_a,
  output idx_t        f_idx_b,
  output logic        f_chroma,
  output logic        f_p_ram1,    // p from RAM-1 (else RAM-0)
  output logic        f_p_half,    // RAM-0 half of p
  output logic        f_q_ext,     // q from input port (else RAM-0)
  output logic        f_q_half,    // RAM-0 half of q
  // RAM-0 requests; *_wsel: write data is 0 = filtered p, 1 = filtered q
  output maddr_t      r0_a_req  [2],
  output logic        r0_a_wsel [2],
  output maddr_t      r0_b_req  [2],
  output logic        r0_b_wsel [2],
  // RAM-1 requests
  output maddr_t      r1_w_req,
  output logic        r1_w_half,
  output logic        r1_w_sel,
  output maddr_t      r1_r_req,
  output logic        r1_r_half,
  // output port
  output logic        out_valid,
  output tag_t        out_tag,
  output logic        out_sel
);
  // Idle cycles between passes, each set by the hazard it covers (see above).
  localparam int GAP_VH    = 1;  // V(r) -> H(r+1): last output on the port
  localparam int GAP_DT    = 1;  // drain -> next plane: last output on the port
  localparam int END_MB    = 1;  // macroblock: last output on the port
  localparam int END_FLUSH = 5;  // flush: last five outputs

  typedef enum logic [3:0] {
    PH_IDLE, PH_PARAM, PH_TIN, PH_H, PH_V, PH_DRAIN, PH_FLUSH, PH_GAP, PH_END
  } phase_t;

  typedef enum logic [1:0] {SRC_NONE, SRC_RAM0, SRC_RAM1, SRC_REC} psrc_t;
  typedef enum logic [1:0] {DST_NONE, DST_RAM0, DST_RAM1, DST_BUS} dst_t;

  typedef struct packed {
    dst_t   kind;
    logic   port;   // RAM-0 port (0 = A, 1 = B)
    logic   half;
    maddr_t addr;
    tag_t   tag;
  } dest_t;

  typedef struct packed {
    logic   valid;
    psrc_t  psrc;
    logic   phalf;
    maddr_t prd;
    logic   qext;
    logic   qram0;
    logic   qhalf;
    maddr_t qrd;
    tag_t   itag;
    bs_t    bs;
    idx_t   ia, ib;
    logic   chroma;
    dest_t  pd, qd;
  } op_t;

  // ---------------- information register ----------------
  logic [95:0] bs_reg;
  logic [23:0] idx_in, idx_mb;

  // ---------------- sequencer state ----------------
  phase_t     phase, after_gap;
  logic [1:0] plane;
  logic [1:0] row;
  logic [4:0] cnt;
  logic [2:0] gap_len;   // length of the current gap / end phase

  logic [2:0] nw;        // block rows of the current plane (4 luma, 2 chroma)
  logic [4:0] last_cnt;  // last operation of the current pass
  assign nw = (plane == 2'd0) ? 3'd4 : 3'd2;
  localparam int NC = 4;  // block columns per pass: 4 luma, or Cb 0..1 and Cr 0..1

  always_comb begin
    unique case (phase)
      PH_PARAM: last_cnt = 5'd4;
      PH_DRAIN: last_cnt = 5'(8 * NC - 1);
      PH_FLUSH: last_cnt = 5'd31;
      PH_GAP,
      PH_END:   last_cnt = 5'(gap_len - 3'd1);
      default:  last_cnt = 5'(4 * NC - 1);
    endcase
  end

  // ---------------- helpers: slots, block numbers, parameters ----------------
  function automatic logic [5:0] blk_c(input logic [1:0] pl, input logic [7:0] r, input logic [7:0] c);
    case (pl)
      2'd0:    return 6'(5 + 5 * r + c);
      2'd1:    return 6'(25 + 3 * r + c);
      default: return 6'(33 + 3 * r + c);
    endcase
  endfunction
  function automatic logic [5:0] blk_l(input logic [1:0] pl, input logic [7:0] r);
    case (pl)
      2'd0:    return 6'(4 + 5 * r);
      2'd1:    return 6'(24 + 3 * r);
      default: return 6'(32 + 3 * r);
    endcase
  endfunction
  function automatic logic [5:0] blk_t(input logic [1:0] pl, input logic [7:0] c);
    case (pl)
      2'd0:    return 6'(c);
      2'd1:    return 6'(30 + c);
      default: return 6'(38 + c);
    endcase
  endfunction
  function automatic maddr_t ma(input logic we, input logic col, input logic [7:0] slot, input logic [7:0] line);
    maddr_t m;
    m.en = 1'b1; m.we = we; m.col = col; m.slot = 3'(slot); m.line = 2'(line);
    return m;
  endfunction
  function automatic tag_t tg(input logic [5:0] blk, input logic [7:0] line, input logic col);
    tag_t t;
    t.blk = blk; t.line = 2'(line); t.col = col;
    return t;
  endfunction
  function automatic bs_t bs_at(input logic [7:0] i);
    return bs_reg[3 * i +: 3];
  endfunction

  // ---------------- operation of the current cycle ----------------
  // e is the block column of the pass (0..3). In the chroma plane columns 0..1
  // are Cb blocks 0..1 and columns 2..3 are Cr blocks 0..1, so both chroma
  // components share every pass. ep is the column inside the component, pw
  // the component's width; rm marks the component's rightmost block, which
  // is kept in the other RAM-0 half than the rest of its block row.
  op_t         op;
  logic [7:0]  e, k, r, ep, pw, l1, lslot;   // column, line, row, slot bases
  logic [1:0]  bp;                            // component: 0 Y, 1 Cb, 2 Cr
  logic        rm, mbedge, nrm;
  logic [23:0] ix;
  always_comb begin
    op = '0;
    op.chroma = (plane != 2'd0);
    e  = 8'(cnt[4:2]);
    k  = 8'(cnt[1:0]);
    r  = 8'(row);
    bp = op.chroma ? (e[1] ? 2'd2 : 2'd1) : 2'd0;
    pw = op.chroma ? 8'd2 : 8'd4;
    ep = op.chroma ? 8'(e[0]) : e;
    rm = (ep == pw - 1);
    nrm = ~rm;
    l1 = (bp == 2'd2) ? 8'd2 : 8'd0;              // RAM-1 slot base
    lslot = 8'd4 + l1 + r;                        // left-neighbour temp slot
    mbedge = (phase == PH_H && ep == 0) || (phase == PH_V && r == 0);
    ix = mbedge ? idx_mb : idx_in;
    op.ia = op.chroma ? ix[11:6] : ix[23:18];
    op.ib = op.chroma ? ix[5:0]  : ix[17:12];
    case (phase)
      PH_TIN: begin
        op.valid = 1'b1;
        op.qext  = 1'b1;
        op.itag  = tg(blk_t(bp, ep), k, 1'b0);
        op.qd    = '{kind: DST_RAM0, port: 1'b0, half: nrm,
                     addr: ma(1'b1, 1'b0, 4 + e, k), tag: '0};
      end
      PH_H: begin
        op.valid = 1'b1;
        op.qext  = 1'b1;
        op.itag  = tg(blk_c(bp, r, ep), k, 1'b0);
        if (ep == 0) begin
          op.psrc  = SRC_RAM1;
          op.phalf = op.chroma;
          op.prd   = ma(1'b0, 1'b0, l1 + r, k);
          op.pd    = '{kind: DST_RAM0, port: 1'b1, half: op.chroma & row[0],
                       addr: ma(1'b1, 1'b0, lslot, k), tag: '0};
        end else begin
          op.psrc  = SRC_REC;
          op.pd    = '{kind: DST_RAM0, port: 1'b1, half: row[0],
                       addr: ma(1'b1, 1'b0, e - 1, k), tag: '0};
        end
        if (rm)
          op.qd    = '{kind: DST_RAM0, port: 1'b1, half: ~row[0],
                       addr: ma(1'b1, 1'b0, e, k), tag: '0};
        if (op.chroma) op.bs = bs_at(4 * (2 * ep) + 2 * r + k / 2);
        else           op.bs = bs_at(4 * ep + r);
      end
      PH_V: begin
        op.valid = 1'b1;
        op.psrc  = SRC_RAM0;
        op.qram0 = 1'b1;
        op.qhalf = row[0] ^ rm;
        op.qrd   = ma(1'b0, 1'b1, e, k);
        if (r == 0) begin
          op.phalf = nrm;
          op.prd   = ma(1'b0, 1'b1, 4 + e, k);
          op.pd    = '{kind: DST_BUS, port: 1'b0, half: 1'b0, addr: '0,
                       tag: tg(blk_t(bp, ep), k, 1'b1)};
        end else begin
          op.phalf = ~row[0] ^ rm;
          op.prd   = ma(1'b0, 1'b1, e, k);
          if (rm)
            op.pd  = '{kind: DST_RAM1, port: 1'b0, half: op.chroma,
                       addr: ma(1'b1, 1'b1, l1 + r - 1, k), tag: '0};
          else
            op.pd  = '{kind: DST_BUS, port: 1'b0, half: 1'b0, addr: '0,
                       tag: tg(blk_c(bp, r - 1, ep), k, 1'b1)};
        end
        op.qd      = '{kind: DST_RAM0, port: 1'b1, half: row[0] ^ rm,
                       addr: ma(1'b1, 1'b1, e, k), tag: '0};
        if (op.chroma) op.bs = bs_at(16 + 4 * (2 * r) + 2 * ep + k / 2);
        else           op.bs = bs_at(16 + 4 * r + ep);
      end
      PH_DRAIN: begin
        // items 0..3: left-neighbour temps (luma rows 0..3, or Cb rows 0..1
        // and Cr rows 0..1); items 4..7: the bottom block row, whose
        // rightmost blocks are copied to RAM-1 instead of being sent out.
        op.valid = 1'b1;
        op.psrc  = SRC_RAM0;
        if (e < 4) begin
          op.phalf = op.chroma & e[0];            // chroma row 1 temps: half 1
          op.prd   = ma(1'b0, 1'b0, 4 + e, k);
          op.pd    = '{kind: DST_BUS, port: 1'b0, half: 1'b0, addr: '0,
                       tag: op.chroma ? tg(blk_l(e[1] ? 2'd2 : 2'd1, 8'(e[0])), k, 1'b0)
                                      : tg(blk_l(2'd0, e), k, 1'b0)};
        end else begin
          bp = op.chroma ? (e[1] ? 2'd2 : 2'd1) : 2'd0;
          ep = op.chroma ? 8'(e[0]) : e - 4;
          rm = (ep == pw - 1);
          l1 = (bp == 2'd2) ? 8'd2 : 8'd0;
          op.phalf = ~rm;                         // bottom row is odd
          op.prd   = ma(1'b0, 1'b0, e - 4, k);
          if (rm)
            op.pd  = '{kind: DST_RAM1, port: 1'b0, half: op.chroma,
                       addr: ma(1'b1, 1'b0, l1 + 8'(nw) - 1, k), tag: '0};
          else
            op.pd  = '{kind: DST_BUS, port: 1'b0, half: 1'b0, addr: '0,
                       tag: tg(blk_c(bp, 8'(nw) - 1, ep), k, 1'b0)};
        end
      end
      PH_FLUSH: begin
        op.valid  = 1'b1;
        op.psrc   = SRC_RAM1;
        op.phalf  = cnt[4];
        op.prd    = ma(1'b0, 1'b0, 8'(cnt[3:2]), k);
        op.chroma = cnt[4];
        op.pd     = '{kind: DST_BUS, port: 1'b0, half: 1'b0, addr: '0,
                      tag: tg(!cnt[4] ? blk_c(2'd0, 8'(cnt[3:2]), 8'd3) :
                              !cnt[3] ? blk_c(2'd1, 8'(cnt[2]), 8'd1) :
                                        blk_c(2'd2, 8'(cnt[2]), 8'd1), k, 1'b0)};
      end
      default: ;
    endcase
  end

  // ---------------- operation delay line (issue -> t+1 -> ... -> t+5) -------
  op_t d [1:5];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= 5; i++) d[i] <= '0;
    end else begin
      d[1] <= op;
      for (int i = 2; i <= 5; i++) d[i] <= d[i-1];
    end
  end

  // ---------------- sequencer ----------------
  logic pass_end;
  assign pass_end = (cnt == last_cnt);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= PH_IDLE; after_gap <= PH_IDLE; plane <= '0; row <= '0; cnt <= '0;
      gap_len <= 3'd1;
      done <= 1'b0;
      bs_reg <= '0; idx_in <= '0; idx_mb <= '0;
    end else begin
      done <= 1'b0;
      cnt  <= pass_end ? 5'd0 : cnt + 5'd1;
      case (phase)
        PH_IDLE: begin
          cnt <= '0;
          if (start) begin
            phase <= PH_PARAM; plane <= '0; row <= '0;
          end else if (flush) begin
            phase <= PH_FLUSH;
          end
        end
        PH_PARAM: begin
          case (cnt)
            5'd0: bs_reg[31:0]  <= param_data;
            5'd1: bs_reg[63:32] <= param_data;
            5'd2: bs_reg[95:64] <= param_data;
            5'd3: idx_in        <= param_data[23:0];
            default: idx_mb     <= param_data[23:0];
          endcase
          if (pass_end) phase <= PH_TIN;
        end
        PH_TIN:   if (pass_end) begin phase <= PH_H; row <= '0; end
        // row order H(0) H(1) V(0) V(1) [H(r) V(r)]: H(1) runs before V(0)
        PH_H:     if (pass_end) begin
                    if (row == 2'd0) row <= 2'd1;
                    else begin
                      phase <= PH_V;
                      if (row == 2'd1) row <= 2'd0;
                    end
                  end
        PH_V:     if (pass_end) begin
                    if (row == 2'd0) row <= 2'd1;
                    else if (3'(row) == nw - 3'd1) phase <= PH_DRAIN;
                    else begin
                      phase <= PH_GAP; after_gap <= PH_H; row <= row + 2'd1;
                      gap_len <= 3'(GAP_VH);
                    end
                  end
        PH_DRAIN: if (pass_end) begin
                    if (plane == 2'd1) begin phase <= PH_END; gap_len <= 3'(END_MB); end
                    else begin
                      phase <= PH_GAP; gap_len <= 3'(GAP_DT); after_gap <= PH_TIN;
                      plane <= plane + 2'd1;
                    end
                  end
        PH_FLUSH: if (pass_end) begin phase <= PH_END; gap_len <= 3'(END_FLUSH); end
        PH_GAP:   if (pass_end) phase <= after_gap;
        PH_END:   if (pass_end) begin phase <= PH_IDLE; done <= 1'b1; end
        default:  phase <= PH_IDLE;
      endcase
    end
  end

  assign busy      = (phase != PH_IDLE);
  assign param_req = (phase == PH_PARAM);
  assign in_req    = op.valid && op.qext;
  assign in_tag    = op.itag;

  // ---------------- filter control (t+1) ----------------
  assign f_valid  = d[1].valid;
  assign f_rec    = d[1].psrc == SRC_REC;
  assign f_bs     = d[1].bs;
  assign f_idx_a  = d[1].ia;
  assign f_idx_b  = d[1].ib;
  assign f_chroma = d[1].chroma;
  assign f_p_ram1 = d[1].psrc == SRC_RAM1;
  assign f_p_half = d[1].phalf;
  assign f_q_ext  = d[1].qext;
  assign f_q_half = d[1].qhalf;

  // ---------------- memory requests ----------------
  always_comb begin
    for (int h = 0; h < 2; h++) begin
      r0_a_req[h] = '0; r0_a_wsel[h] = 1'b0;
      r0_b_req[h] = '0; r0_b_wsel[h] = 1'b0;
      // reads at issue (port A)
      if (op.psrc == SRC_RAM0 && op.phalf == 1'(h)) r0_a_req[h] = op.prd;
      if (op.qram0 && op.qhalf == 1'(h))           r0_a_req[h] = op.qrd;
      // writes five cycles later
      if (d[5].pd.kind == DST_RAM0 && d[5].pd.half == 1'(h)) begin
        if (d[5].pd.port) begin r0_b_req[h] = d[5].pd.addr; r0_b_wsel[h] = 1'b0; end
        else              begin r0_a_req[h] = d[5].pd.addr; r0_a_wsel[h] = 1'b0; end
      end
      if (d[5].qd.kind == DST_RAM0 && d[5].qd.half == 1'(h)) begin
        if (d[5].qd.port) begin r0_b_req[h] = d[5].qd.addr; r0_b_wsel[h] = 1'b1; end
        else              begin r0_a_req[h] = d[5].qd.addr; r0_a_wsel[h] = 1'b1; end
      end
    end
    r1_r_req  = (op.psrc == SRC_RAM1) ? op.prd : '0;
    r1_r_half = op.phalf;
    r1_w_req  = '0; r1_w_half = 1'b0; r1_w_sel = 1'b0;
    if (d[5].pd.kind == DST_RAM1) begin
      r1_w_req = d[5].pd.addr; r1_w_half = d[5].pd.half; r1_w_sel = 1'b0;
    end else if (d[5].qd.kind == DST_RAM1) begin
      r1_w_req = d[5].qd.addr; r1_w_half = d[5].qd.half; r1_w_sel = 1'b1;
    end
    out_valid = 1'b0; out_tag = '0; out_sel = 1'b0;
    if (d[5].pd.kind == DST_BUS) begin
      out_valid = 1'b1; out_tag = d[5].pd.tag;
    end else if (d[5].qd.kind == DST_BUS) begin
      out_valid = 1'b1; out_tag = d[5].qd.tag; out_sel = 1'b1;
    end
  end

  // ---------------- rules of the schedule ----------------
  // The shared pixel port carries one word per cycle.
  a_bus_shared: assert property (@(posedge clk) disable iff (!rst_n) !(in_req && out_valid))
    else $error("df_ctrl: input and output on the pixel port in the same cycle");
  // A RAM-0 port is never asked to read and write in one cycle.
  for (genvar h = 0; h < 2; h++) begin : g_chk
    a_port_a: assert property (@(posedge clk) disable iff (!rst_n)
      !(((op.psrc == SRC_RAM0 && op.phalf == 1'(h)) || (op.qram0 && op.qhalf == 1'(h))) &&
        ((d[5].pd.kind == DST_RAM0 && d[5].pd.half == 1'(h) && !d[5].pd.port) ||
         (d[5].qd.kind == DST_RAM0 && d[5].qd.half == 1'(h) && !d[5].qd.port))))
      else $error("df_ctrl: RAM-0 port A conflict");
  end
  a_p_q_halves: assert property (@(posedge clk) disable iff (!rst_n)
    !(op.psrc == SRC_RAM0 && op.qram0 && op.phalf == op.qhalf))
    else $error("df_ctrl: p and q read from the same RAM-0 half");
endmodule
