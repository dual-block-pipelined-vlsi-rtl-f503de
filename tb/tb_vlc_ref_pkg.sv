// tb_vlc_ref_pkg: reference model pieces for the testbenches. The VLC tables of the H.264
// standard are kept here as bit strings (looked up by value, separately from the case tables
// of the RTL), and the CAVLC block syntax, Exp-Golomb codes and RBSP-to-EBSP conversion are
// written directly from the standard's rules, as a bit queue, not from the RTL structure.
package tb_vlc_ref_pkg;
  function automatic string ct_str(int cls, int tc, int t1);
    case (cls)
      0: case ({t1, tc})
        {32'd0, 32'd0}: return "1";
        {32'd0, 32'd1}: return "000101";
        {32'd0, 32'd2}: return "00000111";
        {32'd0, 32'd3}: return "000000111";
        {32'd0, 32'd4}: return "0000000111";
        {32'd0, 32'd5}: return "00000000111";
        {32'd0, 32'd6}: return "0000000001111";
        {32'd0, 32'd7}: return "0000000001011";
        {32'd0, 32'd8}: return "0000000001000";
        {32'd0, 32'd9}: return "00000000001111";
        {32'd0, 32'd10}: return "00000000001011";
        {32'd0, 32'd11}: return "000000000001111";
        {32'd0, 32'd12}: return "000000000001011";
        {32'd0, 32'd13}: return "0000000000001111";
        {32'd0, 32'd14}: return "0000000000001011";
        {32'd0, 32'd15}: return "0000000000000111";
        {32'd0, 32'd16}: return "0000000000000100";
        {32'd1, 32'd1}: return "01";
        {32'd1, 32'd2}: return "000100";
        {32'd1, 32'd3}: return "00000110";
        {32'd1, 32'd4}: return "000000110";
        {32'd1, 32'd5}: return "0000000110";
        {32'd1, 32'd6}: return "00000000110";
        {32'd1, 32'd7}: return "0000000001110";
        {32'd1, 32'd8}: return "0000000001010";
        {32'd1, 32'd9}: return "00000000001110";
        {32'd1, 32'd10}: return "00000000001010";
        {32'd1, 32'd11}: return "000000000001110";
        {32'd1, 32'd12}: return "000000000001010";
        {32'd1, 32'd13}: return "000000000000001";
        {32'd1, 32'd14}: return "0000000000001110";
        {32'd1, 32'd15}: return "0000000000001010";
        {32'd1, 32'd16}: return "0000000000000110";
        {32'd2, 32'd2}: return "001";
        {32'd2, 32'd3}: return "0000101";
        {32'd2, 32'd4}: return "00000101";
        {32'd2, 32'd5}: return "000000101";
        {32'd2, 32'd6}: return "0000000101";
        {32'd2, 32'd7}: return "00000000101";
        {32'd2, 32'd8}: return "0000000001101";
        {32'd2, 32'd9}: return "0000000001001";
        {32'd2, 32'd10}: return "00000000001101";
        {32'd2, 32'd11}: return "00000000001001";
        {32'd2, 32'd12}: return "000000000001101";
        {32'd2, 32'd13}: return "000000000001001";
        {32'd2, 32'd14}: return "0000000000001101";
        {32'd2, 32'd15}: return "0000000000001001";
        {32'd2, 32'd16}: return "0000000000000101";
        {32'd3, 32'd3}: return "00011";
        {32'd3, 32'd4}: return "000011";
        {32'd3, 32'd5}: return "0000100";
        {32'd3, 32'd6}: return "00000100";
        {32'd3, 32'd7}: return "000000100";
        {32'd3, 32'd8}: return "0000000100";
        {32'd3, 32'd9}: return "00000000100";
        {32'd3, 32'd10}: return "0000000001100";
        {32'd3, 32'd11}: return "00000000001100";
        {32'd3, 32'd12}: return "00000000001000";
        {32'd3, 32'd13}: return "000000000001100";
        {32'd3, 32'd14}: return "000000000001000";
        {32'd3, 32'd15}: return "0000000000001100";
        {32'd3, 32'd16}: return "0000000000001000";
        default: return "";
      endcase
      1: case ({t1, tc})
        {32'd0, 32'd0}: return "11";
        {32'd0, 32'd1}: return "001011";
        {32'd0, 32'd2}: return "000111";
        {32'd0, 32'd3}: return "0000111";
        {32'd0, 32'd4}: return "00000111";
        {32'd0, 32'd5}: return "00000100";
        {32'd0, 32'd6}: return "000000111";
        {32'd0, 32'd7}: return "00000001111";
        {32'd0, 32'd8}: return "00000001011";
        {32'd0, 32'd9}: return "000000001111";
        {32'd0, 32'd10}: return "000000001011";
        {32'd0, 32'd11}: return "000000001000";
        {32'd0, 32'd12}: return "0000000001111";
        {32'd0, 32'd13}: return "0000000001011";
        {32'd0, 32'd14}: return "0000000000111";
        {32'd0, 32'd15}: return "00000000001001";
        {32'd0, 32'd16}: return "00000000000111";
        {32'd1, 32'd1}: return "10";
        {32'd1, 32'd2}: return "00111";
        {32'd1, 32'd3}: return "001010";
        {32'd1, 32'd4}: return "000110";
        {32'd1, 32'd5}: return "0000110";
        {32'd1, 32'd6}: return "00000110";
        {32'd1, 32'd7}: return "000000110";
        {32'd1, 32'd8}: return "00000001110";
        {32'd1, 32'd9}: return "00000001010";
        {32'd1, 32'd10}: return "000000001110";
        {32'd1, 32'd11}: return "000000001010";
        {32'd1, 32'd12}: return "0000000001110";
        {32'd1, 32'd13}: return "0000000001010";
        {32'd1, 32'd14}: return "00000000001011";
        {32'd1, 32'd15}: return "00000000001000";
        {32'd1, 32'd16}: return "00000000000110";
        {32'd2, 32'd2}: return "011";
        {32'd2, 32'd3}: return "001001";
        {32'd2, 32'd4}: return "000101";
        {32'd2, 32'd5}: return "0000101";
        {32'd2, 32'd6}: return "00000101";
        {32'd2, 32'd7}: return "000000101";
        {32'd2, 32'd8}: return "00000001101";
        {32'd2, 32'd9}: return "00000001001";
        {32'd2, 32'd10}: return "000000001101";
        {32'd2, 32'd11}: return "000000001001";
        {32'd2, 32'd12}: return "0000000001101";
        {32'd2, 32'd13}: return "0000000001001";
        {32'd2, 32'd14}: return "0000000000110";
        {32'd2, 32'd15}: return "00000000001010";
        {32'd2, 32'd16}: return "00000000000101";
        {32'd3, 32'd3}: return "0101";
        {32'd3, 32'd4}: return "0100";
        {32'd3, 32'd5}: return "00110";
        {32'd3, 32'd6}: return "001000";
        {32'd3, 32'd7}: return "000100";
        {32'd3, 32'd8}: return "0000100";
        {32'd3, 32'd9}: return "000000100";
        {32'd3, 32'd10}: return "00000001100";
        {32'd3, 32'd11}: return "00000001000";
        {32'd3, 32'd12}: return "000000001100";
        {32'd3, 32'd13}: return "0000000001100";
        {32'd3, 32'd14}: return "0000000001000";
        {32'd3, 32'd15}: return "0000000000001";
        {32'd3, 32'd16}: return "00000000000100";
        default: return "";
      endcase
      2: case ({t1, tc})
        {32'd0, 32'd0}: return "1111";
        {32'd0, 32'd1}: return "001111";
        {32'd0, 32'd2}: return "001011";
        {32'd0, 32'd3}: return "001000";
        {32'd0, 32'd4}: return "0001111";
        {32'd0, 32'd5}: return "0001011";
        {32'd0, 32'd6}: return "0001001";
        {32'd0, 32'd7}: return "0001000";
        {32'd0, 32'd8}: return "00001111";
        {32'd0, 32'd9}: return "00001011";
        {32'd0, 32'd10}: return "000001111";
        {32'd0, 32'd11}: return "000001011";
        {32'd0, 32'd12}: return "000001000";
        {32'd0, 32'd13}: return "0000001101";
        {32'd0, 32'd14}: return "0000001001";
        {32'd0, 32'd15}: return "0000000101";
        {32'd0, 32'd16}: return "0000000001";
        {32'd1, 32'd1}: return "1110";
        {32'd1, 32'd2}: return "01111";
        {32'd1, 32'd3}: return "01100";
        {32'd1, 32'd4}: return "01010";
        {32'd1, 32'd5}: return "01000";
        {32'd1, 32'd6}: return "001110";
        {32'd1, 32'd7}: return "001010";
        {32'd1, 32'd8}: return "0001110";
        {32'd1, 32'd9}: return "00001110";
        {32'd1, 32'd10}: return "00001010";
        {32'd1, 32'd11}: return "000001110";
        {32'd1, 32'd12}: return "000001010";
        {32'd1, 32'd13}: return "000000111";
        {32'd1, 32'd14}: return "0000001100";
        {32'd1, 32'd15}: return "0000001000";
        {32'd1, 32'd16}: return "0000000100";
        {32'd2, 32'd2}: return "1101";
        {32'd2, 32'd3}: return "01110";
        {32'd2, 32'd4}: return "01011";
        {32'd2, 32'd5}: return "01001";
        {32'd2, 32'd6}: return "001101";
        {32'd2, 32'd7}: return "001001";
        {32'd2, 32'd8}: return "0001101";
        {32'd2, 32'd9}: return "0001010";
        {32'd2, 32'd10}: return "00001101";
        {32'd2, 32'd11}: return "00001001";
        {32'd2, 32'd12}: return "000001101";
        {32'd2, 32'd13}: return "000001001";
        {32'd2, 32'd14}: return "0000001011";
        {32'd2, 32'd15}: return "0000000111";
        {32'd2, 32'd16}: return "0000000011";
        {32'd3, 32'd3}: return "1100";
        {32'd3, 32'd4}: return "1011";
        {32'd3, 32'd5}: return "1010";
        {32'd3, 32'd6}: return "1001";
        {32'd3, 32'd7}: return "1000";
        {32'd3, 32'd8}: return "01101";
        {32'd3, 32'd9}: return "001100";
        {32'd3, 32'd10}: return "0001100";
        {32'd3, 32'd11}: return "00001100";
        {32'd3, 32'd12}: return "00001000";
        {32'd3, 32'd13}: return "000001100";
        {32'd3, 32'd14}: return "0000001010";
        {32'd3, 32'd15}: return "0000000110";
        {32'd3, 32'd16}: return "0000000010";
        default: return "";
      endcase
      3: case ({t1, tc})
        {32'd0, 32'd0}: return "000011";
        {32'd0, 32'd1}: return "000000";
        {32'd0, 32'd2}: return "000100";
        {32'd0, 32'd3}: return "001000";
        {32'd0, 32'd4}: return "001100";
        {32'd0, 32'd5}: return "010000";
        {32'd0, 32'd6}: return "010100";
        {32'd0, 32'd7}: return "011000";
        {32'd0, 32'd8}: return "011100";
        {32'd0, 32'd9}: return "100000";
        {32'd0, 32'd10}: return "100100";
        {32'd0, 32'd11}: return "101000";
        {32'd0, 32'd12}: return "101100";
        {32'd0, 32'd13}: return "110000";
        {32'd0, 32'd14}: return "110100";
        {32'd0, 32'd15}: return "111000";
        {32'd0, 32'd16}: return "111100";
        {32'd1, 32'd1}: return "000001";
        {32'd1, 32'd2}: return "000101";
        {32'd1, 32'd3}: return "001001";
        {32'd1, 32'd4}: return "001101";
        {32'd1, 32'd5}: return "010001";
        {32'd1, 32'd6}: return "010101";
        {32'd1, 32'd7}: return "011001";
        {32'd1, 32'd8}: return "011101";
        {32'd1, 32'd9}: return "100001";
        {32'd1, 32'd10}: return "100101";
        {32'd1, 32'd11}: return "101001";
        {32'd1, 32'd12}: return "101101";
        {32'd1, 32'd13}: return "110001";
        {32'd1, 32'd14}: return "110101";
        {32'd1, 32'd15}: return "111001";
        {32'd1, 32'd16}: return "111101";
        {32'd2, 32'd2}: return "000110";
        {32'd2, 32'd3}: return "001010";
        {32'd2, 32'd4}: return "001110";
        {32'd2, 32'd5}: return "010010";
        {32'd2, 32'd6}: return "010110";
        {32'd2, 32'd7}: return "011010";
        {32'd2, 32'd8}: return "011110";
        {32'd2, 32'd9}: return "100010";
        {32'd2, 32'd10}: return "100110";
        {32'd2, 32'd11}: return "101010";
        {32'd2, 32'd12}: return "101110";
        {32'd2, 32'd13}: return "110010";
        {32'd2, 32'd14}: return "110110";
        {32'd2, 32'd15}: return "111010";
        {32'd2, 32'd16}: return "111110";
        {32'd3, 32'd3}: return "001011";
        {32'd3, 32'd4}: return "001111";
        {32'd3, 32'd5}: return "010011";
        {32'd3, 32'd6}: return "010111";
        {32'd3, 32'd7}: return "011011";
        {32'd3, 32'd8}: return "011111";
        {32'd3, 32'd9}: return "100011";
        {32'd3, 32'd10}: return "100111";
        {32'd3, 32'd11}: return "101011";
        {32'd3, 32'd12}: return "101111";
        {32'd3, 32'd13}: return "110011";
        {32'd3, 32'd14}: return "110111";
        {32'd3, 32'd15}: return "111011";
        {32'd3, 32'd16}: return "111111";
        default: return "";
      endcase
      4: case ({t1, tc})
        {32'd0, 32'd0}: return "01";
        {32'd0, 32'd1}: return "000111";
        {32'd0, 32'd2}: return "000100";
        {32'd0, 32'd3}: return "000011";
        {32'd0, 32'd4}: return "000010";
        {32'd1, 32'd1}: return "1";
        {32'd1, 32'd2}: return "000110";
        {32'd1, 32'd3}: return "0000011";
        {32'd1, 32'd4}: return "00000011";
        {32'd2, 32'd2}: return "001";
        {32'd2, 32'd3}: return "0000010";
        {32'd2, 32'd4}: return "00000010";
        {32'd3, 32'd3}: return "000101";
        {32'd3, 32'd4}: return "0000000";
        default: return "";
      endcase
      default: return "";
    endcase
  endfunction
  function automatic string tz_str(bit cdc, int tc, int tz);
    if (cdc) case ({tc, tz})
      {32'd1, 32'd0}: return "1";
      {32'd1, 32'd1}: return "01";
      {32'd1, 32'd2}: return "001";
      {32'd1, 32'd3}: return "000";
      {32'd2, 32'd0}: return "1";
      {32'd2, 32'd1}: return "01";
      {32'd2, 32'd2}: return "00";
      {32'd3, 32'd0}: return "1";
      {32'd3, 32'd1}: return "0";
      default: return "";
    endcase
    else case ({tc, tz})
      {32'd1, 32'd0}: return "1";
      {32'd1, 32'd1}: return "011";
      {32'd1, 32'd2}: return "010";
      {32'd1, 32'd3}: return "0011";
      {32'd1, 32'd4}: return "0010";
      {32'd1, 32'd5}: return "00011";
      {32'd1, 32'd6}: return "00010";
      {32'd1, 32'd7}: return "000011";
      {32'd1, 32'd8}: return "000010";
      {32'd1, 32'd9}: return "0000011";
      {32'd1, 32'd10}: return "0000010";
      {32'd1, 32'd11}: return "00000011";
      {32'd1, 32'd12}: return "00000010";
      {32'd1, 32'd13}: return "000000011";
      {32'd1, 32'd14}: return "000000010";
      {32'd1, 32'd15}: return "000000001";
      {32'd2, 32'd0}: return "111";
      {32'd2, 32'd1}: return "110";
      {32'd2, 32'd2}: return "101";
      {32'd2, 32'd3}: return "100";
      {32'd2, 32'd4}: return "011";
      {32'd2, 32'd5}: return "0101";
      {32'd2, 32'd6}: return "0100";
      {32'd2, 32'd7}: return "0011";
      {32'd2, 32'd8}: return "0010";
      {32'd2, 32'd9}: return "00011";
      {32'd2, 32'd10}: return "00010";
      {32'd2, 32'd11}: return "000011";
      {32'd2, 32'd12}: return "000010";
      {32'd2, 32'd13}: return "000001";
      {32'd2, 32'd14}: return "000000";
      {32'd3, 32'd0}: return "0101";
      {32'd3, 32'd1}: return "111";
      {32'd3, 32'd2}: return "110";
      {32'd3, 32'd3}: return "101";
      {32'd3, 32'd4}: return "0100";
      {32'd3, 32'd5}: return "0011";
      {32'd3, 32'd6}: return "100";
      {32'd3, 32'd7}: return "011";
      {32'd3, 32'd8}: return "0010";
      {32'd3, 32'd9}: return "00011";
      {32'd3, 32'd10}: return "00010";
      {32'd3, 32'd11}: return "000001";
      {32'd3, 32'd12}: return "00001";
      {32'd3, 32'd13}: return "000000";
      {32'd4, 32'd0}: return "00011";
      {32'd4, 32'd1}: return "111";
      {32'd4, 32'd2}: return "0101";
      {32'd4, 32'd3}: return "0100";
      {32'd4, 32'd4}: return "110";
      {32'd4, 32'd5}: return "101";
      {32'd4, 32'd6}: return "100";
      {32'd4, 32'd7}: return "0011";
      {32'd4, 32'd8}: return "011";
      {32'd4, 32'd9}: return "0010";
      {32'd4, 32'd10}: return "00010";
      {32'd4, 32'd11}: return "00001";
      {32'd4, 32'd12}: return "00000";
      {32'd5, 32'd0}: return "0101";
      {32'd5, 32'd1}: return "0100";
      {32'd5, 32'd2}: return "0011";
      {32'd5, 32'd3}: return "111";
      {32'd5, 32'd4}: return "110";
      {32'd5, 32'd5}: return "101";
      {32'd5, 32'd6}: return "100";
      {32'd5, 32'd7}: return "011";
      {32'd5, 32'd8}: return "0010";
      {32'd5, 32'd9}: return "00001";
      {32'd5, 32'd10}: return "0001";
      {32'd5, 32'd11}: return "00000";
      {32'd6, 32'd0}: return "000001";
      {32'd6, 32'd1}: return "00001";
      {32'd6, 32'd2}: return "111";
      {32'd6, 32'd3}: return "110";
      {32'd6, 32'd4}: return "101";
      {32'd6, 32'd5}: return "100";
      {32'd6, 32'd6}: return "011";
      {32'd6, 32'd7}: return "010";
      {32'd6, 32'd8}: return "0001";
      {32'd6, 32'd9}: return "001";
      {32'd6, 32'd10}: return "000000";
      {32'd7, 32'd0}: return "000001";
      {32'd7, 32'd1}: return "00001";
      {32'd7, 32'd2}: return "101";
      {32'd7, 32'd3}: return "100";
      {32'd7, 32'd4}: return "011";
      {32'd7, 32'd5}: return "11";
      {32'd7, 32'd6}: return "010";
      {32'd7, 32'd7}: return "0001";
      {32'd7, 32'd8}: return "001";
      {32'd7, 32'd9}: return "000000";
      {32'd8, 32'd0}: return "000001";
      {32'd8, 32'd1}: return "0001";
      {32'd8, 32'd2}: return "00001";
      {32'd8, 32'd3}: return "011";
      {32'd8, 32'd4}: return "11";
      {32'd8, 32'd5}: return "10";
      {32'd8, 32'd6}: return "010";
      {32'd8, 32'd7}: return "001";
      {32'd8, 32'd8}: return "000000";
      {32'd9, 32'd0}: return "000001";
      {32'd9, 32'd1}: return "000000";
      {32'd9, 32'd2}: return "0001";
      {32'd9, 32'd3}: return "11";
      {32'd9, 32'd4}: return "10";
      {32'd9, 32'd5}: return "001";
      {32'd9, 32'd6}: return "01";
      {32'd9, 32'd7}: return "00001";
      {32'd10, 32'd0}: return "00001";
      {32'd10, 32'd1}: return "00000";
      {32'd10, 32'd2}: return "001";
      {32'd10, 32'd3}: return "11";
      {32'd10, 32'd4}: return "10";
      {32'd10, 32'd5}: return "01";
      {32'd10, 32'd6}: return "0001";
      {32'd11, 32'd0}: return "0000";
      {32'd11, 32'd1}: return "0001";
      {32'd11, 32'd2}: return "001";
      {32'd11, 32'd3}: return "010";
      {32'd11, 32'd4}: return "1";
      {32'd11, 32'd5}: return "011";
      {32'd12, 32'd0}: return "0000";
      {32'd12, 32'd1}: return "0001";
      {32'd12, 32'd2}: return "01";
      {32'd12, 32'd3}: return "1";
      {32'd12, 32'd4}: return "001";
      {32'd13, 32'd0}: return "000";
      {32'd13, 32'd1}: return "001";
      {32'd13, 32'd2}: return "1";
      {32'd13, 32'd3}: return "01";
      {32'd14, 32'd0}: return "00";
      {32'd14, 32'd1}: return "01";
      {32'd14, 32'd2}: return "1";
      {32'd15, 32'd0}: return "0";
      {32'd15, 32'd1}: return "1";
      default: return "";
    endcase
  endfunction
  function automatic string rb_str(int zl, int rb);
    int s;
    s = (zl > 6) ? 7 : zl;
    case ({s, rb})
      {32'd1, 32'd0}: return "1";
      {32'd1, 32'd1}: return "0";
      {32'd2, 32'd0}: return "1";
      {32'd2, 32'd1}: return "01";
      {32'd2, 32'd2}: return "00";
      {32'd3, 32'd0}: return "11";
      {32'd3, 32'd1}: return "10";
      {32'd3, 32'd2}: return "01";
      {32'd3, 32'd3}: return "00";
      {32'd4, 32'd0}: return "11";
      {32'd4, 32'd1}: return "10";
      {32'd4, 32'd2}: return "01";
      {32'd4, 32'd3}: return "001";
      {32'd4, 32'd4}: return "000";
      {32'd5, 32'd0}: return "11";
      {32'd5, 32'd1}: return "10";
      {32'd5, 32'd2}: return "011";
      {32'd5, 32'd3}: return "010";
      {32'd5, 32'd4}: return "001";
      {32'd5, 32'd5}: return "000";
      {32'd6, 32'd0}: return "11";
      {32'd6, 32'd1}: return "000";
      {32'd6, 32'd2}: return "001";
      {32'd6, 32'd3}: return "011";
      {32'd6, 32'd4}: return "010";
      {32'd6, 32'd5}: return "101";
      {32'd6, 32'd6}: return "100";
      {32'd7, 32'd0}: return "111";
      {32'd7, 32'd1}: return "110";
      {32'd7, 32'd2}: return "101";
      {32'd7, 32'd3}: return "100";
      {32'd7, 32'd4}: return "011";
      {32'd7, 32'd5}: return "010";
      {32'd7, 32'd6}: return "001";
      {32'd7, 32'd7}: return "0001";
      {32'd7, 32'd8}: return "00001";
      {32'd7, 32'd9}: return "000001";
      {32'd7, 32'd10}: return "0000001";
      {32'd7, 32'd11}: return "00000001";
      {32'd7, 32'd12}: return "000000001";
      {32'd7, 32'd13}: return "0000000001";
      {32'd7, 32'd14}: return "00000000001";
      default: return "";
    endcase
  endfunction

  // ---- bit helpers ----
  typedef bit bitq_t[$];

  function automatic void put_str(ref bitq_t q, input string s);
    for (int n = 0; n < s.len(); n++) q.push_back(s[n] == "1");
  endfunction

  function automatic void put_val(ref bitq_t q, input longint unsigned v, input int nbits);
    for (int n = nbits - 1; n >= 0; n--) q.push_back(v[n]);
  endfunction

  // ue(v): M zeros, then v+1 in M+1 bits
  function automatic void put_ue(ref bitq_t q, input longint unsigned v);
    int m;
    longint unsigned x;
    x = v + 1;
    m = 0;
    while ((x >> (m + 1)) != 0) m++;
    for (int n = 0; n < m; n++) q.push_back(1'b0);
    put_val(q, x, m + 1);
  endfunction

  function automatic void put_se(ref bitq_t q, input int v);
    put_ue(q, (v > 0) ? longint'(2 * v - 1) : longint'(-2 * v));
  endfunction

  // level with suffix length sl; returns next suffix length
  function automatic int put_level(ref bitq_t q, input int level, input int sl, input bit adj);
    int lc, prefix, suffix, ssize, a, s;
    lc = (level > 0) ? (2 * level - 2) : (-2 * level - 1);
    if (adj) lc -= 2;
    if (sl == 0) begin
      if (lc < 14)      begin prefix = lc; ssize = 0; suffix = 0; end
      else if (lc < 30) begin prefix = 14; ssize = 4; suffix = lc - 14; end
      else              begin prefix = 15; ssize = 12; suffix = lc - 30; end
    end else begin
      if ((lc >> sl) < 15) begin prefix = lc >> sl; ssize = sl; suffix = lc % (1 << sl); end
      else                 begin prefix = 15; ssize = 12; suffix = lc - (15 << sl); end
    end
    for (int n = 0; n < prefix; n++) q.push_back(1'b0);
    q.push_back(1'b1);
    put_val(q, suffix, ssize);
    a = (level < 0) ? -level : level;
    s = (sl == 0) ? 1 : sl;
    if (a > (3 << (s - 1)) && s < 6) s++;
    return s;
  endfunction

  // one residual block, coefficients in zig-zag scan order
  // cls: 0..3 from nC, 4 chroma DC
  function automatic int put_block(ref bitq_t q, input int c[16], input int n, input int cls);
    int tc, t1, hi, tz, sl, zl, idx[$];
    bit t1_open;
    idx = {};
    for (int k = n - 1; k >= 0; k--) if (c[k] != 0) idx.push_back(k);
    tc = idx.size();
    t1 = 0; t1_open = 1;
    foreach (idx[m]) begin
      if (t1_open && (c[idx[m]] == 1 || c[idx[m]] == -1) && t1 < 3) t1++;
      else t1_open = 0;
    end
    put_str(q, ct_str(cls, tc, t1));
    if (tc == 0) return 0;
    for (int m = 0; m < t1; m++) q.push_back(c[idx[m]] < 0);
    sl = (tc > 10 && t1 < 3) ? 1 : 0;
    for (int m = t1; m < tc; m++) sl = put_level(q, c[idx[m]], sl, (m == t1) && (t1 < 3));
    hi = idx[0];
    tz = hi + 1 - tc;
    if (tc < n) put_str(q, tz_str(cls == 4, tc, tz));
    zl = tz;
    for (int m = 0; m < tc - 1 && zl > 0; m++) begin
      int run;
      run = idx[m] - idx[m + 1] - 1;
      put_str(q, rb_str(zl, run));
      zl -= run;
    end
    return tc;
  endfunction

  // RBSP bits (already byte aligned) -> EBSP bytes
  function automatic void rbsp_to_ebsp(input bitq_t q, ref byte unsigned out[$]);
    int zeros;
    byte unsigned b;
    zeros = 0;
    for (int n = 0; n + 8 <= q.size(); n += 8) begin
      b = 0;
      for (int k = 0; k < 8; k++) b = {b[6:0], q[n + k]};
      if (zeros >= 2 && b <= 3) begin
        out.push_back(8'h03);
        zeros = 0;
      end
      out.push_back(b);
      zeros = (b == 0) ? zeros + 1 : 0;
    end
  endfunction

  // zig-zag scan index -> raster position
  function automatic int zz(input int k);
    int t[16] = '{0, 1, 4, 8, 5, 2, 3, 6, 9, 12, 13, 10, 7, 11, 14, 15};
    return t[k];
  endfunction

  function automatic int nc_class_of(input int nc);
    if (nc < 2) return 0;
    if (nc < 4) return 1;
    if (nc < 8) return 2;
    return 3;
  endfunction
endpackage
