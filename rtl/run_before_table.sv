// run_before_table: combinational VLC look-up for run_before (the "Run" table, "Run After
// Level" in the gate count profile). The table is selected by zerosLeft (1..6, and one shared
// table for zerosLeft > 6). Contents follow the H.264 standard; the document only names it.
// Interface: zeros_left 1..15, run_before 0..14 -> code (right-aligned) and len. Combinational.
module run_before_table (
  input  logic [3:0]  zeros_left,
  input  logic [3:0]  run_before,
  output logic [10:0] code,
  output logic [3:0]  len
);
  logic [2:0] sel;
  assign sel = (zeros_left > 4'd6) ? 3'd7 : zeros_left[2:0];
  always_comb begin
    code = '0;
    len  = '0;
    unique case ({sel, run_before})
      {3'd1, 4'd0}: begin code = 11'b1; len = 4'd1; end
      {3'd1, 4'd1}: begin code = 11'b0; len = 4'd1; end
      {3'd2, 4'd0}: begin code = 11'b1; len = 4'd1; end
      {3'd2, 4'd1}: begin code = 11'b01; len = 4'd2; end
      {3'd2, 4'd2}: begin code = 11'b00; len = 4'd2; end
      {3'd3, 4'd0}: begin code = 11'b11; len = 4'd2; end
      {3'd3, 4'd1}: begin code = 11'b10; len = 4'd2; end
      {3'd3, 4'd2}: begin code = 11'b01; len = 4'd2; end
      {3'd3, 4'd3}: begin code = 11'b00; len = 4'd2; end
      {3'd4, 4'd0}: begin code = 11'b11; len = 4'd2; end
      {3'd4, 4'd1}: begin code = 11'b10; len = 4'd2; end
      {3'd4, 4'd2}: begin code = 11'b01; len = 4'd2; end
      {3'd4, 4'd3}: begin code = 11'b001; len = 4'd3; end
      {3'd4, 4'd4}: begin code = 11'b000; len = 4'd3; end
      {3'd5, 4'd0}: begin code = 11'b11; len = 4'd2; end
      {3'd5, 4'd1}: begin code = 11'b10; len = 4'd2; end
      {3'd5, 4'd2}: begin code = 11'b011; len = 4'd3; end
      {3'd5, 4'd3}: begin code = 11'b010; len = 4'd3; end
      {3'd5, 4'd4}: begin code = 11'b001; len = 4'd3; end
      {3'd5, 4'd5}: begin code = 11'b000; len = 4'd3; end
      {3'd6, 4'd0}: begin code = 11'b11; len = 4'd2; end
      {3'd6, 4'd1}: begin code = 11'b000; len = 4'd3; end
      {3'd6, 4'd2}: begin code = 11'b001; len = 4'd3; end
      {3'd6, 4'd3}: begin code = 11'b011; len = 4'd3; end
      {3'd6, 4'd4}: begin code = 11'b010; len = 4'd3; end
      {3'd6, 4'd5}: begin code = 11'b101; len = 4'd3; end
      {3'd6, 4'd6}: begin code = 11'b100; len = 4'd3; end
      {3'd7, 4'd0}: begin code = 11'b111; len = 4'd3; end
      {3'd7, 4'd1}: begin code = 11'b110; len = 4'd3; end
      {3'd7, 4'd2}: begin code = 11'b101; len = 4'd3; end
      {3'd7, 4'd3}: begin code = 11'b100; len = 4'd3; end
      {3'd7, 4'd4}: begin code = 11'b011; len = 4'd3; end
      {3'd7, 4'd5}: begin code = 11'b010; len = 4'd3; end
      {3'd7, 4'd6}: begin code = 11'b001; len = 4'd3; end
      {3'd7, 4'd7}: begin code = 11'b0001; len = 4'd4; end
      {3'd7, 4'd8}: begin code = 11'b00001; len = 4'd5; end
      {3'd7, 4'd9}: begin code = 11'b000001; len = 4'd6; end
      {3'd7, 4'd10}: begin code = 11'b0000001; len = 4'd7; end
      {3'd7, 4'd11}: begin code = 11'b00000001; len = 4'd8; end
      {3'd7, 4'd12}: begin code = 11'b000000001; len = 4'd9; end
      {3'd7, 4'd13}: begin code = 11'b0000000001; len = 4'd10; end
      {3'd7, 4'd14}: begin code = 11'b00000000001; len = 4'd11; end
      default: begin code = '0; len = '0; end
    endcase
  end
endmodule
