// entropy_pkg: types and constants shared by the H.264 baseline entropy coder.
// A codeword travels as a right-aligned code with its length (1..32 bits, MSB sent first).
// Block types cover the residual blocks of the baseline profile: luma 4x4 (16 coefficients),
// Intra16x16 luma DC and AC, chroma DC (2x2) and chroma AC (15 coefficients).
// The coefficient memory holds one macroblock: 24 4x4 blocks x 16 coefficients of 16 bits,
// two per 32-bit word (192 words, as in the on-chip memory table of the design).
// The codeword format, the block type encoding and the widths are this design's choices;
// the document fixes only the memory sizes.
package entropy_pkg;
  localparam int unsigned CW_W  = 32;   // widest codeword the packer accepts
  localparam int unsigned LEN_W = 6;    // codeword length field, 0..32
  localparam int unsigned COEF_W = 16;  // transform coefficient width
  typedef logic [COEF_W-1:0] coef_t;    // one coefficient, two's complement

  typedef struct packed {
    logic [CW_W-1:0]  code;  // right-aligned, bit len-1 is sent first
    logic [LEN_W-1:0] len;
  } codeword_t;

  // Header symbol kinds for the Exp-Golomb code unit
  typedef enum logic [1:0] {
    SYM_UE  = 2'd0,  // unsigned Exp-Golomb ue(v)
    SYM_SE  = 2'd1,  // signed Exp-Golomb se(v), through the signed-to-unsigned converter
    SYM_FLC = 2'd2   // fixed-length u(n): raw bits, n given with the symbol
  } sym_type_e;

  typedef enum logic [2:0] {
    BT_LUMA4x4   = 3'd0,
    BT_LUMA_DC   = 3'd1,
    BT_LUMA_AC   = 3'd2,
    BT_CHROMA_DC = 3'd3,
    BT_CHROMA_AC = 3'd4
  } blk_type_e;

  // coeff_token table class picked from nC
  typedef enum logic [2:0] {
    NC_VLC0 = 3'd0,  // 0 <= nC < 2
    NC_VLC1 = 3'd1,  // 2 <= nC < 4
    NC_VLC2 = 3'd2,  // 4 <= nC < 8
    NC_FLC  = 3'd3,  // 8 <= nC
    NC_CDC  = 3'd4   // chroma DC, nC = -1
  } nc_class_e;

  // One residual block to scan and code.
  // blk: 0..15 luma 4x4 block in double-zigzag order, 16..19 Cb, 20..23 Cr.
  // For the DC block types blk is 0 (luma) or 16 / 20 (chroma component).
  typedef struct packed {
    blk_type_e  btype;
    logic [4:0] blk;
  } blk_desc_t;

  // Raster position (y*4+x) of zig-zag scan index i in a 4x4 block (frame scan)
  function automatic logic [3:0] zigzag4x4(input logic [3:0] i);
    unique case (i)
      4'd0:  return 4'd0;   4'd1:  return 4'd1;   4'd2:  return 4'd4;   4'd3:  return 4'd8;
      4'd4:  return 4'd5;   4'd5:  return 4'd2;   4'd6:  return 4'd3;   4'd7:  return 4'd6;
      4'd8:  return 4'd9;   4'd9:  return 4'd12;  4'd10: return 4'd13;  4'd11: return 4'd10;
      4'd12: return 4'd7;   4'd13: return 4'd11;  4'd14: return 4'd14;  default: return 4'd15;
    endcase
  endfunction

  // Double-zigzag luma block index (8x8 quadrant, then 4x4 inside) from 4x4 block column x, row y
  function automatic logic [3:0] luma_blk_idx(input logic [1:0] x, input logic [1:0] y);
    return {y[1], x[1], y[0], x[0]};
  endfunction

  // Number of coefficients a block type carries
  function automatic logic [4:0] max_coeff(input blk_type_e t);
    unique case (t)
      BT_LUMA4x4, BT_LUMA_DC:   return 5'd16;
      BT_LUMA_AC, BT_CHROMA_AC: return 5'd15;
      default:                  return 5'd4;
    endcase
  endfunction
endpackage
