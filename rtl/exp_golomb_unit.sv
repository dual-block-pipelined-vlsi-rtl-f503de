// exp_golomb_unit: Exp-Golomb code unit for macroblock header symbols.
// A signed symbol first passes the signed-to-unsigned converter (k>0 -> 2k-1, k<=0 -> -2k),
// then the unsigned code number N is coded as ue(v): M zeros, a one, then the M low bits of
// N+1, where M = floor(log2(N+1)). The code is simply N+1 right-aligned with length 2M+1.
// A third symbol kind passes raw fixed-length bits, so that slice-level syntax written by
// the system processor can enter the same bitstream (a choice of this design).
// Interface: sym_type, value (two's complement for se), flc_len (1..32 for SYM_FLC) ->
// codeword (code right-aligned, len). Code numbers up to 65534 are supported (31-bit code).
// Purely combinational; the caller registers the result.
module exp_golomb_unit
  import entropy_pkg::*;
(
  input  sym_type_e   sym_type,
  input  logic [31:0] value,
  input  logic [5:0]  flc_len,
  output codeword_t   cw
);
  logic [31:0] code_num;
  logic [31:0] x;
  logic [4:0]  msb;

  // signed-to-unsigned converter
  always_comb begin
    if (sym_type == SYM_SE) begin
      if ($signed(value) > 0) code_num = (value << 1) - 32'd1;
      else                    code_num = (32'd0 - value) << 1;
    end else begin
      code_num = value;
    end
  end

  assign x = code_num + 32'd1;

  // leading-one detector on N+1
  always_comb begin
    msb = '0;
    for (int i = 0; i < 16; i++)
      if (x[i]) msb = 5'(i);
  end

  always_comb begin
    if (sym_type == SYM_FLC) begin
      cw.len  = flc_len;
      cw.code = (flc_len >= 6'd32) ? value : (value & ((32'd1 << flc_len) - 32'd1));
    end else begin
      cw.len  = LEN_W'({msb, 1'b1});
      cw.code = x & 32'h0000_ffff;
    end
  end
endmodule
