// level_table: level code of CAVLC (the "Level Table (VLC0-VLC6)" class).
// The signed level becomes levelCode = 2*level-2 (level>0) or -2*level-1 (level<0); the first
// level after fewer than three trailing ones is lowered by 2, since it cannot be +-1. With
// suffix length s (VLC s) the code is levelCode>>s zeros, a one, then s suffix bits; when that
// prefix would reach 15 an escape with prefix 15 and a 12-bit suffix is used (VLC0 also has a
// 4-bit suffix form for prefix 14). The next suffix length is 1 after VLC0 and grows by one,
// up to 6, when |level| exceeds 3<<(s-1). This follows the H.264 rules; the document names
// the table class and says the choice of table depends on the previously coded symbol.
// Levels must fit the 12-bit escape (|level| up to 2063 at s=0), as in the baseline profile.
// Interface: level (16-bit two's complement), suffix_len 0..6, first_adj -> code (28-bit,
// right-aligned), len (1..28) and next_suffix_len. Combinational.
module level_table (
  input  logic [15:0] level,
  input  logic [2:0]  suffix_len,
  input  logic        first_adj,
  output logic [27:0] code,
  output logic [4:0]  len,
  output logic [2:0]  next_suffix_len
);
  logic [27:0] abs_lvl;
  logic [27:0] lc;
  logic [27:0] pfx;
  logic [2:0]  s1;

  always_comb begin
    abs_lvl = level[15] ? (28'd0 - 28'($signed(level))) : 28'(level);
    lc = level[15] ? ((abs_lvl << 1) - 28'd1) : ((abs_lvl << 1) - 28'd2);
    if (first_adj) lc = lc - 28'd2;

    code = '0;
    len  = '0;
    pfx  = '0;
    if (suffix_len == 3'd0) begin
      if (lc < 28'd14) begin
        code = 28'd1;
        len  = 5'(lc + 28'd1);
      end else if (lc < 28'd30) begin
        code = 28'h10 | (lc - 28'd14);
        len  = 5'd19;
      end else begin
        code = 28'h1000 | (lc - 28'd30);
        len  = 5'd28;
      end
    end else begin
      if (lc < (28'd15 << suffix_len)) begin
        pfx  = lc >> suffix_len;
        code = 28'((28'd1 << suffix_len) | (lc & ((28'd1 << suffix_len) - 28'd1)));
        len  = 5'(pfx + 28'd1 + 28'(suffix_len));
      end else begin
        code = 28'h1000 | (lc - (28'd15 << suffix_len));
        len  = 5'd28;
      end
    end

    s1 = (suffix_len == 3'd0) ? 3'd1 : suffix_len;
    if ((abs_lvl > (28'd3 << (s1 - 3'd1))) && (s1 < 3'd6)) next_suffix_len = s1 + 3'd1;
    else                                                    next_suffix_len = s1;
  end
endmodule
