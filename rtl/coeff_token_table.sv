// coeff_token_table: combinational VLC look-up for coeff_token (TotalCoeff, TrailingOnes).
// The table class is picked by nC as in H.264 CAVLC: VLC0 (0<=nC<2), VLC1 (2<=nC<4),
// VLC2 (4<=nC<8), a 6-bit fixed-length code for nC>=8, and the chroma DC table (nC=-1).
// The code contents are those of the H.264 standard; the document names this table class
// ("TC/T1 Table (VLC0-VLC2)") but does not print it.
// Interface: nc_class (0..4, see entropy_pkg::nc_class_e), total_coeff 0..16, trailing_ones 0..3
// -> code (right-aligned, MSB first on the wire) and len. Purely combinational, no clock.
module coeff_token_table
  import entropy_pkg::*;
(
  input  nc_class_e   nc_class,
  input  logic [4:0]  total_coeff,
  input  logic [1:0]  trailing_ones,
  output logic [15:0] code,
  output logic [4:0]  len
);
  logic [6:0] key;
  assign key = {trailing_ones, total_coeff};
  always_comb begin
    code = '0;
    len  = '0;
    unique case (nc_class)
      NC_VLC0: begin
        unique case (key)
          {2'd0, 5'd0}: begin code = 16'b1; len = 5'd1; end
          {2'd0, 5'd1}: begin code = 16'b000101; len = 5'd6; end
          {2'd1, 5'd1}: begin code = 16'b01; len = 5'd2; end
          {2'd0, 5'd2}: begin code = 16'b00000111; len = 5'd8; end
          {2'd1, 5'd2}: begin code = 16'b000100; len = 5'd6; end
          {2'd2, 5'd2}: begin code = 16'b001; len = 5'd3; end
          {2'd0, 5'd3}: begin code = 16'b000000111; len = 5'd9; end
          {2'd1, 5'd3}: begin code = 16'b00000110; len = 5'd8; end
          {2'd2, 5'd3}: begin code = 16'b0000101; len = 5'd7; end
          {2'd3, 5'd3}: begin code = 16'b00011; len = 5'd5; end
          {2'd0, 5'd4}: begin code = 16'b0000000111; len = 5'd10; end
          {2'd1, 5'd4}: begin code = 16'b000000110; len = 5'd9; end
          {2'd2, 5'd4}: begin code = 16'b00000101; len = 5'd8; end
          {2'd3, 5'd4}: begin code = 16'b000011; len = 5'd6; end
          {2'd0, 5'd5}: begin code = 16'b00000000111; len = 5'd11; end
          {2'd1, 5'd5}: begin code = 16'b0000000110; len = 5'd10; end
          {2'd2, 5'd5}: begin code = 16'b000000101; len = 5'd9; end
          {2'd3, 5'd5}: begin code = 16'b0000100; len = 5'd7; end
          {2'd0, 5'd6}: begin code = 16'b0000000001111; len = 5'd13; end
          {2'd1, 5'd6}: begin code = 16'b00000000110; len = 5'd11; end
          {2'd2, 5'd6}: begin code = 16'b0000000101; len = 5'd10; end
          {2'd3, 5'd6}: begin code = 16'b00000100; len = 5'd8; end
          {2'd0, 5'd7}: begin code = 16'b0000000001011; len = 5'd13; end
          {2'd1, 5'd7}: begin code = 16'b0000000001110; len = 5'd13; end
          {2'd2, 5'd7}: begin code = 16'b00000000101; len = 5'd11; end
          {2'd3, 5'd7}: begin code = 16'b000000100; len = 5'd9; end
          {2'd0, 5'd8}: begin code = 16'b0000000001000; len = 5'd13; end
          {2'd1, 5'd8}: begin code = 16'b0000000001010; len = 5'd13; end
          {2'd2, 5'd8}: begin code = 16'b0000000001101; len = 5'd13; end
          {2'd3, 5'd8}: begin code = 16'b0000000100; len = 5'd10; end
          {2'd0, 5'd9}: begin code = 16'b00000000001111; len = 5'd14; end
          {2'd1, 5'd9}: begin code = 16'b00000000001110; len = 5'd14; end
          {2'd2, 5'd9}: begin code = 16'b0000000001001; len = 5'd13; end
          {2'd3, 5'd9}: begin code = 16'b00000000100; len = 5'd11; end
          {2'd0, 5'd10}: begin code = 16'b00000000001011; len = 5'd14; end
          {2'd1, 5'd10}: begin code = 16'b00000000001010; len = 5'd14; end
          {2'd2, 5'd10}: begin code = 16'b00000000001101; len = 5'd14; end
          {2'd3, 5'd10}: begin code = 16'b0000000001100; len = 5'd13; end
          {2'd0, 5'd11}: begin code = 16'b000000000001111; len = 5'd15; end
          {2'd1, 5'd11}: begin code = 16'b000000000001110; len = 5'd15; end
          {2'd2, 5'd11}: begin code = 16'b00000000001001; len = 5'd14; end
          {2'd3, 5'd11}: begin code = 16'b00000000001100; len = 5'd14; end
          {2'd0, 5'd12}: begin code = 16'b000000000001011; len = 5'd15; end
          {2'd1, 5'd12}: begin code = 16'b000000000001010; len = 5'd15; end
          {2'd2, 5'd12}: begin code = 16'b000000000001101; len = 5'd15; end
          {2'd3, 5'd12}: begin code = 16'b00000000001000; len = 5'd14; end
          {2'd0, 5'd13}: begin code = 16'b0000000000001111; len = 5'd16; end
          {2'd1, 5'd13}: begin code = 16'b000000000000001; len = 5'd15; end
          {2'd2, 5'd13}: begin code = 16'b000000000001001; len = 5'd15; end
          {2'd3, 5'd13}: begin code = 16'b000000000001100; len = 5'd15; end
          {2'd0, 5'd14}: begin code = 16'b0000000000001011; len = 5'd16; end
          {2'd1, 5'd14}: begin code = 16'b0000000000001110; len = 5'd16; end
          {2'd2, 5'd14}: begin code = 16'b0000000000001101; len = 5'd16; end
          {2'd3, 5'd14}: begin code = 16'b000000000001000; len = 5'd15; end
          {2'd0, 5'd15}: begin code = 16'b0000000000000111; len = 5'd16; end
          {2'd1, 5'd15}: begin code = 16'b0000000000001010; len = 5'd16; end
          {2'd2, 5'd15}: begin code = 16'b0000000000001001; len = 5'd16; end
          {2'd3, 5'd15}: begin code = 16'b0000000000001100; len = 5'd16; end
          {2'd0, 5'd16}: begin code = 16'b0000000000000100; len = 5'd16; end
          {2'd1, 5'd16}: begin code = 16'b0000000000000110; len = 5'd16; end
          {2'd2, 5'd16}: begin code = 16'b0000000000000101; len = 5'd16; end
          {2'd3, 5'd16}: begin code = 16'b0000000000001000; len = 5'd16; end
          default: begin code = '0; len = '0; end
        endcase
      end
      NC_VLC1: begin
        unique case (key)
          {2'd0, 5'd0}: begin code = 16'b11; len = 5'd2; end
          {2'd0, 5'd1}: begin code = 16'b001011; len = 5'd6; end
          {2'd1, 5'd1}: begin code = 16'b10; len = 5'd2; end
          {2'd0, 5'd2}: begin code = 16'b000111; len = 5'd6; end
          {2'd1, 5'd2}: begin code = 16'b00111; len = 5'd5; end
          {2'd2, 5'd2}: begin code = 16'b011; len = 5'd3; end
          {2'd0, 5'd3}: begin code = 16'b0000111; len = 5'd7; end
          {2'd1, 5'd3}: begin code = 16'b001010; len = 5'd6; end
          {2'd2, 5'd3}: begin code = 16'b001001; len = 5'd6; end
          {2'd3, 5'd3}: begin code = 16'b0101; len = 5'd4; end
          {2'd0, 5'd4}: begin code = 16'b00000111; len = 5'd8; end
          {2'd1, 5'd4}: begin code = 16'b000110; len = 5'd6; end
          {2'd2, 5'd4}: begin code = 16'b000101; len = 5'd6; end
          {2'd3, 5'd4}: begin code = 16'b0100; len = 5'd4; end
          {2'd0, 5'd5}: begin code = 16'b00000100; len = 5'd8; end
          {2'd1, 5'd5}: begin code = 16'b0000110; len = 5'd7; end
          {2'd2, 5'd5}: begin code = 16'b0000101; len = 5'd7; end
          {2'd3, 5'd5}: begin code = 16'b00110; len = 5'd5; end
          {2'd0, 5'd6}: begin code = 16'b000000111; len = 5'd9; end
          {2'd1, 5'd6}: begin code = 16'b00000110; len = 5'd8; end
          {2'd2, 5'd6}: begin code = 16'b00000101; len = 5'd8; end
          {2'd3, 5'd6}: begin code = 16'b001000; len = 5'd6; end
          {2'd0, 5'd7}: begin code = 16'b00000001111; len = 5'd11; end
          {2'd1, 5'd7}: begin code = 16'b000000110; len = 5'd9; end
          {2'd2, 5'd7}: begin code = 16'b000000101; len = 5'd9; end
          {2'd3, 5'd7}: begin code = 16'b000100; len = 5'd6; end
          {2'd0, 5'd8}: begin code = 16'b00000001011; len = 5'd11; end
          {2'd1, 5'd8}: begin code = 16'b00000001110; len = 5'd11; end
          {2'd2, 5'd8}: begin code = 16'b00000001101; len = 5'd11; end
          {2'd3, 5'd8}: begin code = 16'b0000100; len = 5'd7; end
          {2'd0, 5'd9}: begin code = 16'b000000001111; len = 5'd12; end
          {2'd1, 5'd9}: begin code = 16'b00000001010; len = 5'd11; end
          {2'd2, 5'd9}: begin code = 16'b00000001001; len = 5'd11; end
          {2'd3, 5'd9}: begin code = 16'b000000100; len = 5'd9; end
          {2'd0, 5'd10}: begin code = 16'b000000001011; len = 5'd12; end
          {2'd1, 5'd10}: begin code = 16'b000000001110; len = 5'd12; end
          {2'd2, 5'd10}: begin code = 16'b000000001101; len = 5'd12; end
          {2'd3, 5'd10}: begin code = 16'b00000001100; len = 5'd11; end
          {2'd0, 5'd11}: begin code = 16'b000000001000; len = 5'd12; end
          {2'd1, 5'd11}: begin code = 16'b000000001010; len = 5'd12; end
          {2'd2, 5'd11}: begin code = 16'b000000001001; len = 5'd12; end
          {2'd3, 5'd11}: begin code = 16'b00000001000; len = 5'd11; end
          {2'd0, 5'd12}: begin code = 16'b0000000001111; len = 5'd13; end
          {2'd1, 5'd12}: begin code = 16'b0000000001110; len = 5'd13; end
          {2'd2, 5'd12}: begin code = 16'b0000000001101; len = 5'd13; end
          {2'd3, 5'd12}: begin code = 16'b000000001100; len = 5'd12; end
          {2'd0, 5'd13}: begin code = 16'b0000000001011; len = 5'd13; end
          {2'd1, 5'd13}: begin code = 16'b0000000001010; len = 5'd13; end
          {2'd2, 5'd13}: begin code = 16'b0000000001001; len = 5'd13; end
          {2'd3, 5'd13}: begin code = 16'b0000000001100; len = 5'd13; end
          {2'd0, 5'd14}: begin code = 16'b0000000000111; len = 5'd13; end
          {2'd1, 5'd14}: begin code = 16'b00000000001011; len = 5'd14; end
          {2'd2, 5'd14}: begin code = 16'b0000000000110; len = 5'd13; end
          {2'd3, 5'd14}: begin code = 16'b0000000001000; len = 5'd13; end
          {2'd0, 5'd15}: begin code = 16'b00000000001001; len = 5'd14; end
          {2'd1, 5'd15}: begin code = 16'b00000000001000; len = 5'd14; end
          {2'd2, 5'd15}: begin code = 16'b00000000001010; len = 5'd14; end
          {2'd3, 5'd15}: begin code = 16'b0000000000001; len = 5'd13; end
          {2'd0, 5'd16}: begin code = 16'b00000000000111; len = 5'd14; end
          {2'd1, 5'd16}: begin code = 16'b00000000000110; len = 5'd14; end
          {2'd2, 5'd16}: begin code = 16'b00000000000101; len = 5'd14; end
          {2'd3, 5'd16}: begin code = 16'b00000000000100; len = 5'd14; end
          default: begin code = '0; len = '0; end
        endcase
      end
      NC_VLC2: begin
        unique case (key)
          {2'd0, 5'd0}: begin code = 16'b1111; len = 5'd4; end
          {2'd0, 5'd1}: begin code = 16'b001111; len = 5'd6; end
          {2'd1, 5'd1}: begin code = 16'b1110; len = 5'd4; end
          {2'd0, 5'd2}: begin code = 16'b001011; len = 5'd6; end
          {2'd1, 5'd2}: begin code = 16'b01111; len = 5'd5; end
          {2'd2, 5'd2}: begin code = 16'b1101; len = 5'd4; end
          {2'd0, 5'd3}: begin code = 16'b001000; len = 5'd6; end
          {2'd1, 5'd3}: begin code = 16'b01100; len = 5'd5; end
          {2'd2, 5'd3}: begin code = 16'b01110; len = 5'd5; end
          {2'd3, 5'd3}: begin code = 16'b1100; len = 5'd4; end
          {2'd0, 5'd4}: begin code = 16'b0001111; len = 5'd7; end
          {2'd1, 5'd4}: begin code = 16'b01010; len = 5'd5; end
          {2'd2, 5'd4}: begin code = 16'b01011; len = 5'd5; end
          {2'd3, 5'd4}: begin code = 16'b1011; len = 5'd4; end
          {2'd0, 5'd5}: begin code = 16'b0001011; len = 5'd7; end
          {2'd1, 5'd5}: begin code = 16'b01000; len = 5'd5; end
          {2'd2, 5'd5}: begin code = 16'b01001; len = 5'd5; end
          {2'd3, 5'd5}: begin code = 16'b1010; len = 5'd4; end
          {2'd0, 5'd6}: begin code = 16'b0001001; len = 5'd7; end
          {2'd1, 5'd6}: begin code = 16'b001110; len = 5'd6; end
          {2'd2, 5'd6}: begin code = 16'b001101; len = 5'd6; end
          {2'd3, 5'd6}: begin code = 16'b1001; len = 5'd4; end
          {2'd0, 5'd7}: begin code = 16'b0001000; len = 5'd7; end
          {2'd1, 5'd7}: begin code = 16'b001010; len = 5'd6; end
          {2'd2, 5'd7}: begin code = 16'b001001; len = 5'd6; end
          {2'd3, 5'd7}: begin code = 16'b1000; len = 5'd4; end
          {2'd0, 5'd8}: begin code = 16'b00001111; len = 5'd8; end
          {2'd1, 5'd8}: begin code = 16'b0001110; len = 5'd7; end
          {2'd2, 5'd8}: begin code = 16'b0001101; len = 5'd7; end
          {2'd3, 5'd8}: begin code = 16'b01101; len = 5'd5; end
          {2'd0, 5'd9}: begin code = 16'b00001011; len = 5'd8; end
          {2'd1, 5'd9}: begin code = 16'b00001110; len = 5'd8; end
          {2'd2, 5'd9}: begin code = 16'b0001010; len = 5'd7; end
          {2'd3, 5'd9}: begin code = 16'b001100; len = 5'd6; end
          {2'd0, 5'd10}: begin code = 16'b000001111; len = 5'd9; end
          {2'd1, 5'd10}: begin code = 16'b00001010; len = 5'd8; end
          {2'd2, 5'd10}: begin code = 16'b00001101; len = 5'd8; end
          {2'd3, 5'd10}: begin code = 16'b0001100; len = 5'd7; end
          {2'd0, 5'd11}: begin code = 16'b000001011; len = 5'd9; end
          {2'd1, 5'd11}: begin code = 16'b000001110; len = 5'd9; end
          {2'd2, 5'd11}: begin code = 16'b00001001; len = 5'd8; end
          {2'd3, 5'd11}: begin code = 16'b00001100; len = 5'd8; end
          {2'd0, 5'd12}: begin code = 16'b000001000; len = 5'd9; end
          {2'd1, 5'd12}: begin code = 16'b000001010; len = 5'd9; end
          {2'd2, 5'd12}: begin code = 16'b000001101; len = 5'd9; end
          {2'd3, 5'd12}: begin code = 16'b00001000; len = 5'd8; end
          {2'd0, 5'd13}: begin code = 16'b0000001101; len = 5'd10; end
          {2'd1, 5'd13}: begin code = 16'b000000111; len = 5'd9; end
          {2'd2, 5'd13}: begin code = 16'b000001001; len = 5'd9; end
          {2'd3, 5'd13}: begin code = 16'b000001100; len = 5'd9; end
          {2'd0, 5'd14}: begin code = 16'b0000001001; len = 5'd10; end
          {2'd1, 5'd14}: begin code = 16'b0000001100; len = 5'd10; end
          {2'd2, 5'd14}: begin code = 16'b0000001011; len = 5'd10; end
          {2'd3, 5'd14}: begin code = 16'b0000001010; len = 5'd10; end
          {2'd0, 5'd15}: begin code = 16'b0000000101; len = 5'd10; end
          {2'd1, 5'd15}: begin code = 16'b0000001000; len = 5'd10; end
          {2'd2, 5'd15}: begin code = 16'b0000000111; len = 5'd10; end
          {2'd3, 5'd15}: begin code = 16'b0000000110; len = 5'd10; end
          {2'd0, 5'd16}: begin code = 16'b0000000001; len = 5'd10; end
          {2'd1, 5'd16}: begin code = 16'b0000000100; len = 5'd10; end
          {2'd2, 5'd16}: begin code = 16'b0000000011; len = 5'd10; end
          {2'd3, 5'd16}: begin code = 16'b0000000010; len = 5'd10; end
          default: begin code = '0; len = '0; end
        endcase
      end
      NC_FLC: begin
        unique case (key)
          {2'd0, 5'd0}: begin code = 16'b000011; len = 5'd6; end
          {2'd0, 5'd1}: begin code = 16'b000000; len = 5'd6; end
          {2'd1, 5'd1}: begin code = 16'b000001; len = 5'd6; end
          {2'd0, 5'd2}: begin code = 16'b000100; len = 5'd6; end
          {2'd1, 5'd2}: begin code = 16'b000101; len = 5'd6; end
          {2'd2, 5'd2}: begin code = 16'b000110; len = 5'd6; end
          {2'd0, 5'd3}: begin code = 16'b001000; len = 5'd6; end
          {2'd1, 5'd3}: begin code = 16'b001001; len = 5'd6; end
          {2'd2, 5'd3}: begin code = 16'b001010; len = 5'd6; end
          {2'd3, 5'd3}: begin code = 16'b001011; len = 5'd6; end
          {2'd0, 5'd4}: begin code = 16'b001100; len = 5'd6; end
          {2'd1, 5'd4}: begin code = 16'b001101; len = 5'd6; end
          {2'd2, 5'd4}: begin code = 16'b001110; len = 5'd6; end
          {2'd3, 5'd4}: begin code = 16'b001111; len = 5'd6; end
          {2'd0, 5'd5}: begin code = 16'b010000; len = 5'd6; end
          {2'd1, 5'd5}: begin code = 16'b010001; len = 5'd6; end
          {2'd2, 5'd5}: begin code = 16'b010010; len = 5'd6; end
          {2'd3, 5'd5}: begin code = 16'b010011; len = 5'd6; end
          {2'd0, 5'd6}: begin code = 16'b010100; len = 5'd6; end
          {2'd1, 5'd6}: begin code = 16'b010101; len = 5'd6; end
          {2'd2, 5'd6}: begin code = 16'b010110; len = 5'd6; end
          {2'd3, 5'd6}: begin code = 16'b010111; len = 5'd6; end
          {2'd0, 5'd7}: begin code = 16'b011000; len = 5'd6; end
          {2'd1, 5'd7}: begin code = 16'b011001; len = 5'd6; end
          {2'd2, 5'd7}: begin code = 16'b011010; len = 5'd6; end
          {2'd3, 5'd7}: begin code = 16'b011011; len = 5'd6; end
          {2'd0, 5'd8}: begin code = 16'b011100; len = 5'd6; end
          {2'd1, 5'd8}: begin code = 16'b011101; len = 5'd6; end
          {2'd2, 5'd8}: begin code = 16'b011110; len = 5'd6; end
          {2'd3, 5'd8}: begin code = 16'b011111; len = 5'd6; end
          {2'd0, 5'd9}: begin code = 16'b100000; len = 5'd6; end
          {2'd1, 5'd9}: begin code = 16'b100001; len = 5'd6; end
          {2'd2, 5'd9}: begin code = 16'b100010; len = 5'd6; end
          {2'd3, 5'd9}: begin code = 16'b100011; len = 5'd6; end
          {2'd0, 5'd10}: begin code = 16'b100100; len = 5'd6; end
          {2'd1, 5'd10}: begin code = 16'b100101; len = 5'd6; end
          {2'd2, 5'd10}: begin code = 16'b100110; len = 5'd6; end
          {2'd3, 5'd10}: begin code = 16'b100111; len = 5'd6; end
          {2'd0, 5'd11}: begin code = 16'b101000; len = 5'd6; end
          {2'd1, 5'd11}: begin code = 16'b101001; len = 5'd6; end
          {2'd2, 5'd11}: begin code = 16'b101010; len = 5'd6; end
          {2'd3, 5'd11}: begin code = 16'b101011; len = 5'd6; end
          {2'd0, 5'd12}: begin code = 16'b101100; len = 5'd6; end
          {2'd1, 5'd12}: begin code = 16'b101101; len = 5'd6; end
          {2'd2, 5'd12}: begin code = 16'b101110; len = 5'd6; end
          {2'd3, 5'd12}: begin code = 16'b101111; len = 5'd6; end
          {2'd0, 5'd13}: begin code = 16'b110000; len = 5'd6; end
          {2'd1, 5'd13}: begin code = 16'b110001; len = 5'd6; end
          {2'd2, 5'd13}: begin code = 16'b110010; len = 5'd6; end
          {2'd3, 5'd13}: begin code = 16'b110011; len = 5'd6; end
          {2'd0, 5'd14}: begin code = 16'b110100; len = 5'd6; end
          {2'd1, 5'd14}: begin code = 16'b110101; len = 5'd6; end
          {2'd2, 5'd14}: begin code = 16'b110110; len = 5'd6; end
          {2'd3, 5'd14}: begin code = 16'b110111; len = 5'd6; end
          {2'd0, 5'd15}: begin code = 16'b111000; len = 5'd6; end
          {2'd1, 5'd15}: begin code = 16'b111001; len = 5'd6; end
          {2'd2, 5'd15}: begin code = 16'b111010; len = 5'd6; end
          {2'd3, 5'd15}: begin code = 16'b111011; len = 5'd6; end
          {2'd0, 5'd16}: begin code = 16'b111100; len = 5'd6; end
          {2'd1, 5'd16}: begin code = 16'b111101; len = 5'd6; end
          {2'd2, 5'd16}: begin code = 16'b111110; len = 5'd6; end
          {2'd3, 5'd16}: begin code = 16'b111111; len = 5'd6; end
          default: begin code = '0; len = '0; end
        endcase
      end
      NC_CDC: begin
        unique case (key)
          {2'd0, 5'd0}: begin code = 16'b01; len = 5'd2; end
          {2'd0, 5'd1}: begin code = 16'b000111; len = 5'd6; end
          {2'd1, 5'd1}: begin code = 16'b1; len = 5'd1; end
          {2'd0, 5'd2}: begin code = 16'b000100; len = 5'd6; end
          {2'd1, 5'd2}: begin code = 16'b000110; len = 5'd6; end
          {2'd2, 5'd2}: begin code = 16'b001; len = 5'd3; end
          {2'd0, 5'd3}: begin code = 16'b000011; len = 5'd6; end
          {2'd1, 5'd3}: begin code = 16'b0000011; len = 5'd7; end
          {2'd2, 5'd3}: begin code = 16'b0000010; len = 5'd7; end
          {2'd3, 5'd3}: begin code = 16'b000101; len = 5'd6; end
          {2'd0, 5'd4}: begin code = 16'b000010; len = 5'd6; end
          {2'd1, 5'd4}: begin code = 16'b00000011; len = 5'd8; end
          {2'd2, 5'd4}: begin code = 16'b00000010; len = 5'd8; end
          {2'd3, 5'd4}: begin code = 16'b0000000; len = 5'd7; end
          default: begin code = '0; len = '0; end
        endcase
      end
      default: begin code = '0; len = '0; end
    endcase
  end
endmodule
