// bitstream_buffer: 2K-bit FIFO (64 words x 32 bits) of EBSP words between the bitstream
// packer and the bus interface. It lets the system bus take the bitstream in bursts; when it
// is full the packer cannot empty its register array and the coding core stalls until the
// bus drains it. A sideband bit per word marks the last word of a NAL unit (with its count of
// valid bytes), kept in a small register array beside the data memory.
// Interface: write w_en/w_data (ignored when full), read r_en pops the word shown on r_data
// (first-word fall-through). count is the fill level; full and empty as usual.
// Timing: a write and a read each take effect at the clock edge; r_data shows the head word
// with no read latency, and a word written into an empty buffer is visible the next cycle.
// From the published design: a 64 x 32 (2K-bit) buffer between packer and bus. This design's
// own choices: the separate read and write ports usable in the same cycle (the published
// memory table lists a single-port memory) and the last/bytes sideband.
module bitstream_buffer #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             w_en,
  input  logic [WIDTH-1:0] w_data,
  input  logic             w_last,
  input  logic [2:0]       w_bytes,
  output logic             full,
  input  logic             r_en,
  output logic [WIDTH-1:0] r_data,
  output logic             r_last,
  output logic [2:0]       r_bytes,
  output logic             empty,
  output logic [AW:0]      count
);
  logic [WIDTH-1:0] mem   [DEPTH];
  logic [3:0]       side  [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_w, do_r;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_w  = w_en && !full;
  assign do_r  = r_en && !empty;

  always_ff @(posedge clk) begin
    if (do_w) begin
      mem[wp]  <= w_data;
      side[wp] <= {w_last, w_bytes};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0;
    end else begin
      if (do_w) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_r) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(do_w) - (AW+1)'(do_r);
    end
  end

  assign r_data  = mem[rp];
  assign r_last  = side[rp][3];
  assign r_bytes = side[rp][2:0];
endmodule
