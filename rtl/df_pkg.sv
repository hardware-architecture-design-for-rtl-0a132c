// Shared types, constants and threshold tables of the H.264/AVC deblocking filter.
//
// A pixel is 8 bits. A 32-bit word carries four pixels, pixel 0 in bits [7:0]:
// one row or one column of a 4x4 block, the unit of the internal data bus.
// Along an edge, a line of eight pixels is split into the p side and the q
// side; index 0 is the pixel next to the edge (p0, q0) and index 3 the
// farthest one (p3, q3).
//
// The alpha, beta and tC0 tables are those of the H.264/AVC standard
// (indexed by IndexA, IndexB and BS). The memory request type describes one
// 32-bit access of a two-dimensional memory: a block slot, a line inside the
// block and whether the line is a row or a column.
package df_pkg;

  typedef logic [7:0]      pix_t;
  typedef logic [3:0][7:0] pix4_t;
  typedef logic [2:0]      bs_t;
  typedef logic [5:0]      idx_t;

  // One access of a two-dimensional memory (data travels separately).
  typedef struct packed {
    logic       en;    // access this cycle
    logic       we;    // 1: write, 0: read
    logic       col;   // 1: column of the block, 0: row
    logic [2:0] slot;  // 4x4 block slot
    logic [1:0] line;  // row or column number inside the block
  } maddr_t;

  // Identifies a 4x4 block line on the external bus: block number as in the
  // macroblock map (B0..B39), line number and orientation.
  typedef struct packed {
    logic [5:0] blk;
    logic [1:0] line;
    logic       col;
  } tag_t;

  // Standard alpha' table (IndexA 0..51).
  function automatic logic [7:0] alpha_tab(input idx_t i);
    case (i)
      16, 17: return 8'd4;   18: return 8'd5;   19: return 8'd6;
      20: return 8'd7;   21: return 8'd8;   22: return 8'd9;   23: return 8'd10;
      24: return 8'd12;  25: return 8'd13;  26: return 8'd15;  27: return 8'd17;
      28: return 8'd20;  29: return 8'd22;  30: return 8'd25;  31: return 8'd28;
      32: return 8'd32;  33: return 8'd36;  34: return 8'd40;  35: return 8'd45;
      36: return 8'd50;  37: return 8'd56;  38: return 8'd63;  39: return 8'd71;
      40: return 8'd80;  41: return 8'd90;  42: return 8'd101; 43: return 8'd113;
      44: return 8'd127; 45: return 8'd144; 46: return 8'd162; 47: return 8'd182;
      48: return 8'd203; 49: return 8'd226; 50, 51: return 8'd255;
      default: return 8'd0;
    endcase
  endfunction

  // Standard beta' table (IndexB 0..51).
  function automatic logic [7:0] beta_tab(input idx_t i);
    if (i < 16)  return 8'd0;
    if (i < 19)  return 8'd2;
    if (i < 23)  return 8'd3;
    if (i < 26)  return 8'd4;
    if (i > 51)  return 8'd0;
    return 8'(6 + ((int'(i) - 26) >> 1));  // 26,27:6  28,29:7 ... 50,51:18
  endfunction

  // Standard tC0 table: one 5-bit value per BS 1..3, packed {bs3, bs2, bs1}.
  function automatic logic [14:0] tc0_row(input idx_t i);
    case (i)
      17, 18, 19, 20:     return {5'd1,  5'd0,  5'd0};
      21, 22:             return {5'd1,  5'd1,  5'd0};
      23, 24, 25, 26:     return {5'd1,  5'd1,  5'd1};
      27, 28, 29, 30:     return {5'd2,  5'd1,  5'd1};
      31, 32:             return {5'd3,  5'd2,  5'd1};
      33:                 return {5'd3,  5'd2,  5'd2};
      34:                 return {5'd4,  5'd2,  5'd2};
      35, 36:             return {5'd4,  5'd3,  5'd2};
      37:                 return {5'd5,  5'd3,  5'd3};
      38, 39:             return {5'd6,  5'd4,  5'd3};
      40:                 return {5'd7,  5'd5,  5'd4};
      41:                 return {5'd8,  5'd5,  5'd4};
      42:                 return {5'd9,  5'd6,  5'd4};
      43:                 return {5'd10, 5'd7,  5'd5};
      44:                 return {5'd11, 5'd8,  5'd6};
      45:                 return {5'd13, 5'd8,  5'd6};
      46:                 return {5'd14, 5'd10, 5'd7};
      47:                 return {5'd16, 5'd11, 5'd8};
      48:                 return {5'd18, 5'd12, 5'd9};
      49:                 return {5'd20, 5'd13, 5'd10};
      50:                 return {5'd23, 5'd15, 5'd11};
      51:                 return {5'd25, 5'd17, 5'd13};
      default:            return '0;
    endcase
  endfunction

  function automatic logic [4:0] tc0_tab(input idx_t i, input bs_t bs);
    logic [14:0] row;
    row = tc0_row(i);
    case (bs)
      3'd1:    return row[4:0];
      3'd2:    return row[9:5];
      3'd3:    return row[14:10];
      default: return 5'd0;
    endcase
  endfunction

  // Reverse the pixel order of a word (a p-side line read from memory has
  // the pixel next to the edge last).
  function automatic pix4_t rev4(input pix4_t w);
    return {w[0], w[1], w[2], w[3]};
  endfunction

endpackage
