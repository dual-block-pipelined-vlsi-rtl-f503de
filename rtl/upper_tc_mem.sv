// upper_tc_mem: single-port memory for the total coefficients of the bottom 4x4 blocks of
// each macroblock, read back when the macroblock below is coded. 160 words x 20 bits, as in
// the design's memory table. Each macroblock column uses two words (a choice of this
// design): word 2*mb_x holds the four luma bottom-row counts, word 2*mb_x+1 the two Cb and
// two Cr bottom-row counts, 5 bits each with the leftmost block in the low bits.
// One access per cycle (read or write); read data is registered (one cycle latency).
module upper_tc_mem #(
  parameter int unsigned DEPTH = 160,
  parameter int unsigned WIDTH = 20,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
