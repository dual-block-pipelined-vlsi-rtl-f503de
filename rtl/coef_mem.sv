// coef_mem: residue (coefficient) buffer holding one macroblock of quantized transform
// coefficients, 192 words x 32 bits, dual-port as in the design's memory table.
// Port A is the write port of the prediction/reconstruction engine; port B is the read port
// of the scan engine with one cycle of read latency (registered output).
// Layout (a choice of this design): word = blk*8 + pos/2, coefficient pos of block blk in the
// low half when pos is even, high half when odd; pos is the raster position y*4+x inside
// the 4x4 block; blk 0..15 luma in double-zigzag order, 16..19 Cb, 20..23 Cr.
// DC coefficients (Intra16x16 luma DC, chroma DC) sit at pos 0 of their block.
module coef_mem #(
  parameter int unsigned DEPTH = 192,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             a_we,
  input  logic [AW-1:0]    a_addr,
  input  logic [WIDTH-1:0] a_wdata,
  input  logic             b_re,
  input  logic [AW-1:0]    b_addr,
  output logic [WIDTH-1:0] b_rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_we) mem[a_addr] <= a_wdata;
  end

  always_ff @(posedge clk) begin
    if (b_re) b_rdata <= mem[b_addr];
  end
endmodule
