// total_zeros_table: combinational VLC look-up for total_zeros (the "TR" / total run table).
// 4x4 blocks use the fifteen tables indexed by TotalCoeff (1..15); chroma DC (2x2) blocks use
// the three chroma DC tables. Contents follow the H.264 standard; the document names this
// table but does not print it.
// Interface: chroma_dc selects the 2x2 tables, total_coeff 1..16 (16 gives len 0), total_zeros 0..15 -> code
// (right-aligned) and len. Combinational.
module total_zeros_table (
  input  logic       chroma_dc,
  input  logic [4:0] total_coeff,
  input  logic [3:0] total_zeros,
  output logic [8:0] code,
  output logic [3:0] len
);
  always_comb begin
    code = '0;
    len  = '0;
    if (chroma_dc) begin
      unique case ({total_coeff[1:0], total_zeros[1:0]})
        {2'd1, 2'd0}: begin code = 9'b1; len = 4'd1; end
        {2'd1, 2'd1}: begin code = 9'b01; len = 4'd2; end
        {2'd1, 2'd2}: begin code = 9'b001; len = 4'd3; end
        {2'd1, 2'd3}: begin code = 9'b000; len = 4'd3; end
        {2'd2, 2'd0}: begin code = 9'b1; len = 4'd1; end
        {2'd2, 2'd1}: begin code = 9'b01; len = 4'd2; end
        {2'd2, 2'd2}: begin code = 9'b00; len = 4'd2; end
        {2'd3, 2'd0}: begin code = 9'b1; len = 4'd1; end
        {2'd3, 2'd1}: begin code = 9'b0; len = 4'd1; end
        default: begin code = '0; len = '0; end
      endcase
    end else begin
      unique case ({total_coeff[3:0], total_zeros})
        {4'd1, 4'd0}: begin code = 9'b1; len = 4'd1; end
        {4'd1, 4'd1}: begin code = 9'b011; len = 4'd3; end
        {4'd1, 4'd2}: begin code = 9'b010; len = 4'd3; end
        {4'd1, 4'd3}: begin code = 9'b0011; len = 4'd4; end
        {4'd1, 4'd4}: begin code = 9'b0010; len = 4'd4; end
        {4'd1, 4'd5}: begin code = 9'b00011; len = 4'd5; end
        {4'd1, 4'd6}: begin code = 9'b00010; len = 4'd5; end
        {4'd1, 4'd7}: begin code = 9'b000011; len = 4'd6; end
        {4'd1, 4'd8}: begin code = 9'b000010; len = 4'd6; end
        {4'd1, 4'd9}: begin code = 9'b0000011; len = 4'd7; end
        {4'd1, 4'd10}: begin code = 9'b0000010; len = 4'd7; end
        {4'd1, 4'd11}: begin code = 9'b00000011; len = 4'd8; end
        {4'd1, 4'd12}: begin code = 9'b00000010; len = 4'd8; end
        {4'd1, 4'd13}: begin code = 9'b000000011; len = 4'd9; end
        {4'd1, 4'd14}: begin code = 9'b000000010; len = 4'd9; end
        {4'd1, 4'd15}: begin code = 9'b000000001; len = 4'd9; end
        {4'd2, 4'd0}: begin code = 9'b111; len = 4'd3; end
        {4'd2, 4'd1}: begin code = 9'b110; len = 4'd3; end
        {4'd2, 4'd2}: begin code = 9'b101; len = 4'd3; end
        {4'd2, 4'd3}: begin code = 9'b100; len = 4'd3; end
        {4'd2, 4'd4}: begin code = 9'b011; len = 4'd3; end
        {4'd2, 4'd5}: begin code = 9'b0101; len = 4'd4; end
        {4'd2, 4'd6}: begin code = 9'b0100; len = 4'd4; end
        {4'd2, 4'd7}: begin code = 9'b0011; len = 4'd4; end
        {4'd2, 4'd8}: begin code = 9'b0010; len = 4'd4; end
        {4'd2, 4'd9}: begin code = 9'b00011; len = 4'd5; end
        {4'd2, 4'd10}: begin code = 9'b00010; len = 4'd5; end
        {4'd2, 4'd11}: begin code = 9'b000011; len = 4'd6; end
        {4'd2, 4'd12}: begin code = 9'b000010; len = 4'd6; end
        {4'd2, 4'd13}: begin code = 9'b000001; len = 4'd6; end
        {4'd2, 4'd14}: begin code = 9'b000000; len = 4'd6; end
        {4'd3, 4'd0}: begin code = 9'b0101; len = 4'd4; end
        {4'd3, 4'd1}: begin code = 9'b111; len = 4'd3; end
        {4'd3, 4'd2}: begin code = 9'b110; len = 4'd3; end
        {4'd3, 4'd3}: begin code = 9'b101; len = 4'd3; end
        {4'd3, 4'd4}: begin code = 9'b0100; len = 4'd4; end
        {4'd3, 4'd5}: begin code = 9'b0011; len = 4'd4; end
        {4'd3, 4'd6}: begin code = 9'b100; len = 4'd3; end
        {4'd3, 4'd7}: begin code = 9'b011; len = 4'd3; end
        {4'd3, 4'd8}: begin code = 9'b0010; len = 4'd4; end
        {4'd3, 4'd9}: begin code = 9'b00011; len = 4'd5; end
        {4'd3, 4'd10}: begin code = 9'b00010; len = 4'd5; end
        {4'd3, 4'd11}: begin code = 9'b000001; len = 4'd6; end
        {4'd3, 4'd12}: begin code = 9'b00001; len = 4'd5; end
        {4'd3, 4'd13}: begin code = 9'b000000; len = 4'd6; end
        {4'd4, 4'd0}: begin code = 9'b00011; len = 4'd5; end
        {4'd4, 4'd1}: begin code = 9'b111; len = 4'd3; end
        {4'd4, 4'd2}: begin code = 9'b0101; len = 4'd4; end
        {4'd4, 4'd3}: begin code = 9'b0100; len = 4'd4; end
        {4'd4, 4'd4}: begin code = 9'b110; len = 4'd3; end
        {4'd4, 4'd5}: begin code = 9'b101; len = 4'd3; end
        {4'd4, 4'd6}: begin code = 9'b100; len = 4'd3; end
        {4'd4, 4'd7}: begin code = 9'b0011; len = 4'd4; end
        {4'd4, 4'd8}: begin code = 9'b011; len = 4'd3; end
        {4'd4, 4'd9}: begin code = 9'b0010; len = 4'd4; end
        {4'd4, 4'd10}: begin code = 9'b00010; len = 4'd5; end
        {4'd4, 4'd11}: begin code = 9'b00001; len = 4'd5; end
        {4'd4, 4'd12}: begin code = 9'b00000; len = 4'd5; end
        {4'd5, 4'd0}: begin code = 9'b0101; len = 4'd4; end
        {4'd5, 4'd1}: begin code = 9'b0100; len = 4'd4; end
        {4'd5, 4'd2}: begin code = 9'b0011; len = 4'd4; end
        {4'd5, 4'd3}: begin code = 9'b111; len = 4'd3; end
        {4'd5, 4'd4}: begin code = 9'b110; len = 4'd3; end
        {4'd5, 4'd5}: begin code = 9'b101; len = 4'd3; end
        {4'd5, 4'd6}: begin code = 9'b100; len = 4'd3; end
        {4'd5, 4'd7}: begin code = 9'b011; len = 4'd3; end
        {4'd5, 4'd8}: begin code = 9'b0010; len = 4'd4; end
        {4'd5, 4'd9}: begin code = 9'b00001; len = 4'd5; end
        {4'd5, 4'd10}: begin code = 9'b0001; len = 4'd4; end
        {4'd5, 4'd11}: begin code = 9'b00000; len = 4'd5; end
        {4'd6, 4'd0}: begin code = 9'b000001; len = 4'd6; end
        {4'd6, 4'd1}: begin code = 9'b00001; len = 4'd5; end
        {4'd6, 4'd2}: begin code = 9'b111; len = 4'd3; end
        {4'd6, 4'd3}: begin code = 9'b110; len = 4'd3; end
        {4'd6, 4'd4}: begin code = 9'b101; len = 4'd3; end
        {4'd6, 4'd5}: begin code = 9'b100; len = 4'd3; end
        {4'd6, 4'd6}: begin code = 9'b011; len = 4'd3; end
        {4'd6, 4'd7}: begin code = 9'b010; len = 4'd3; end
        {4'd6, 4'd8}: begin code = 9'b0001; len = 4'd4; end
        {4'd6, 4'd9}: begin code = 9'b001; len = 4'd3; end
        {4'd6, 4'd10}: begin code = 9'b000000; len = 4'd6; end
        {4'd7, 4'd0}: begin code = 9'b000001; len = 4'd6; end
        {4'd7, 4'd1}: begin code = 9'b00001; len = 4'd5; end
        {4'd7, 4'd2}: begin code = 9'b101; len = 4'd3; end
        {4'd7, 4'd3}: begin code = 9'b100; len = 4'd3; end
        {4'd7, 4'd4}: begin code = 9'b011; len = 4'd3; end
        {4'd7, 4'd5}: begin code = 9'b11; len = 4'd2; end
        {4'd7, 4'd6}: begin code = 9'b010; len = 4'd3; end
        {4'd7, 4'd7}: begin code = 9'b0001; len = 4'd4; end
        {4'd7, 4'd8}: begin code = 9'b001; len = 4'd3; end
        {4'd7, 4'd9}: begin code = 9'b000000; len = 4'd6; end
        {4'd8, 4'd0}: begin code = 9'b000001; len = 4'd6; end
        {4'd8, 4'd1}: begin code = 9'b0001; len = 4'd4; end
        {4'd8, 4'd2}: begin code = 9'b00001; len = 4'd5; end
        {4'd8, 4'd3}: begin code = 9'b011; len = 4'd3; end
        {4'd8, 4'd4}: begin code = 9'b11; len = 4'd2; end
        {4'd8, 4'd5}: begin code = 9'b10; len = 4'd2; end
        {4'd8, 4'd6}: begin code = 9'b010; len = 4'd3; end
        {4'd8, 4'd7}: begin code = 9'b001; len = 4'd3; end
        {4'd8, 4'd8}: begin code = 9'b000000; len = 4'd6; end
        {4'd9, 4'd0}: begin code = 9'b000001; len = 4'd6; end
        {4'd9, 4'd1}: begin code = 9'b000000; len = 4'd6; end
        {4'd9, 4'd2}: begin code = 9'b0001; len = 4'd4; end
        {4'd9, 4'd3}: begin code = 9'b11; len = 4'd2; end
        {4'd9, 4'd4}: begin code = 9'b10; len = 4'd2; end
        {4'd9, 4'd5}: begin code = 9'b001; len = 4'd3; end
        {4'd9, 4'd6}: begin code = 9'b01; len = 4'd2; end
        {4'd9, 4'd7}: begin code = 9'b00001; len = 4'd5; end
        {4'd10, 4'd0}: begin code = 9'b00001; len = 4'd5; end
        {4'd10, 4'd1}: begin code = 9'b00000; len = 4'd5; end
        {4'd10, 4'd2}: begin code = 9'b001; len = 4'd3; end
        {4'd10, 4'd3}: begin code = 9'b11; len = 4'd2; end
        {4'd10, 4'd4}: begin code = 9'b10; len = 4'd2; end
        {4'd10, 4'd5}: begin code = 9'b01; len = 4'd2; end
        {4'd10, 4'd6}: begin code = 9'b0001; len = 4'd4; end
        {4'd11, 4'd0}: begin code = 9'b0000; len = 4'd4; end
        {4'd11, 4'd1}: begin code = 9'b0001; len = 4'd4; end
        {4'd11, 4'd2}: begin code = 9'b001; len = 4'd3; end
        {4'd11, 4'd3}: begin code = 9'b010; len = 4'd3; end
        {4'd11, 4'd4}: begin code = 9'b1; len = 4'd1; end
        {4'd11, 4'd5}: begin code = 9'b011; len = 4'd3; end
        {4'd12, 4'd0}: begin code = 9'b0000; len = 4'd4; end
        {4'd12, 4'd1}: begin code = 9'b0001; len = 4'd4; end
        {4'd12, 4'd2}: begin code = 9'b01; len = 4'd2; end
        {4'd12, 4'd3}: begin code = 9'b1; len = 4'd1; end
        {4'd12, 4'd4}: begin code = 9'b001; len = 4'd3; end
        {4'd13, 4'd0}: begin code = 9'b000; len = 4'd3; end
        {4'd13, 4'd1}: begin code = 9'b001; len = 4'd3; end
        {4'd13, 4'd2}: begin code = 9'b1; len = 4'd1; end
        {4'd13, 4'd3}: begin code = 9'b01; len = 4'd2; end
        {4'd14, 4'd0}: begin code = 9'b00; len = 4'd2; end
        {4'd14, 4'd1}: begin code = 9'b01; len = 4'd2; end
        {4'd14, 4'd2}: begin code = 9'b1; len = 4'd1; end
        {4'd15, 4'd0}: begin code = 9'b0; len = 4'd1; end
        {4'd15, 4'd1}: begin code = 9'b1; len = 4'd1; end
        default: begin code = '0; len = '0; end
      endcase
    end
    // TotalCoeff 16 (all coefficients non-zero) codes no total_zeros
    if (total_coeff[4]) begin code = '0; len = '0; end
  end
endmodule
