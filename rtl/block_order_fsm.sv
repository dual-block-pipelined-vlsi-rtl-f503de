// block_order_fsm: orders the residual blocks of a macroblock and schedules the two
// statistic buffers in ping-pong fashion so that the scan of one block overlaps the coding
// of the block before it.
// Order: Intra16x16 luma DC, then the sixteen luma blocks in double-zigzag order (4x4 blocks
// in zig-zag inside each 8x8 block, 8x8 blocks in zig-zag), then chroma DC of Cb and Cr, then
// the chroma AC blocks of Cb and Cr. Zero skipping: blocks that the coded block pattern marks
// as all-zero (an 8x8 luma quadrant, all chroma AC, all chroma) are dropped from the list
// when the macroblock starts, so no cycle and no memory read is spent on them.
// Handshake: mb_go (with cbp, is_i16) loads the list; scan_start/scan_done and
// code_start/code_done pair with the scan and coding engines; a buffer is filled by a scan,
// then freed by the coding of it. mb_done pulses once when all blocks are coded.
// Timing: a scan may start in the cycle after the previous scan ends when its buffer is
// free; coding of a buffer starts the cycle after it is filled (or after the previous coding
// ends).
// From the published design: double-zigzag order, the ping-pong statistic buffers and the
// block pipeline, and skipping of all-zero 8x8 blocks by CBP. This design's own choices: the
// slot list, skipping chroma by the chroma part of CBP, and the code_en gate.
module block_order_fsm
  import entropy_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       mb_go,
  input  logic [5:0] cbp,        // [3:0] luma 8x8 flags, [5:4] chroma 0/1/2
  input  logic       is_i16,
  input  logic       code_en,    // coding may begin (MB header sent, nC context loaded)
  output logic       scan_start,
  output blk_desc_t  scan_desc,
  output logic       scan_bank,
  input  logic       scan_done,
  output logic       code_start,
  output logic       code_bank,
  input  logic       code_done,
  output logic       mb_done,
  output logic       overlap,    // a scan and a coding phase run in the same cycle
  output logic [4:0] skipped     // blocks dropped by zero skipping in this macroblock
);
  localparam int unsigned NSLOT = 27;
  logic [NSLOT-1:0] pend;
  logic             active, scanning, coding;
  logic [1:0]       full;

  // slot list of a macroblock
  function automatic logic [NSLOT-1:0] slot_mask(input logic [5:0] c, input logic i16);
    logic [NSLOT-1:0] m;
    m = '0;
    m[0] = i16;
    for (int s = 0; s < 16; s++)
      m[1+s] = i16 ? (c[3:0] == 4'hf) : c[s/4];
    m[17] = (c[5:4] != 2'd0);
    m[18] = (c[5:4] != 2'd0);
    for (int s = 0; s < 8; s++) m[19+s] = (c[5:4] == 2'd2);
    return m;
  endfunction

  function automatic blk_desc_t slot_desc(input int unsigned s, input logic i16);
    blk_desc_t d;
    if (s == 0)       d = '{btype: BT_LUMA_DC, blk: 5'd0};
    else if (s <= 16) d = '{btype: (i16 ? BT_LUMA_AC : BT_LUMA4x4), blk: 5'(s - 1)};
    else if (s == 17) d = '{btype: BT_CHROMA_DC, blk: 5'd16};
    else if (s == 18) d = '{btype: BT_CHROMA_DC, blk: 5'd20};
    else              d = '{btype: BT_CHROMA_AC, blk: 5'(s - 3)};
    return d;
  endfunction

  // first pending slot
  logic [4:0] first;
  logic       any;
  always_comb begin
    first = '0;
    any   = 1'b0;
    for (int s = NSLOT - 1; s >= 0; s--)
      if (pend[s]) begin first = 5'(s); any = 1'b1; end
  end

  logic i16_q;
  assign scan_start = active && any && !scanning && !full[scan_bank];
  assign scan_desc  = slot_desc(32'(first), i16_q);
  assign code_start = active && !coding && full[code_bank] && code_en;
  assign overlap    = scanning && coding;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= '0; active <= 1'b0; scanning <= 1'b0; coding <= 1'b0; full <= '0;
      scan_bank <= 1'b0; code_bank <= 1'b0; mb_done <= 1'b0; i16_q <= 1'b0;
      skipped <= '0;
    end else begin
      mb_done <= 1'b0;
      if (mb_go && !active) begin
        pend    <= slot_mask(cbp, is_i16);
        i16_q   <= is_i16;
        active  <= 1'b1;
        skipped <= 5'(NSLOT - 32'($countones(slot_mask(cbp, is_i16))) - (is_i16 ? 0 : 1));
      end else if (active) begin
        if (scan_start) begin
          pend[first] <= 1'b0;
          scanning    <= 1'b1;
        end
        if (scan_done) begin
          scanning        <= 1'b0;
          full[scan_bank] <= 1'b1;
          scan_bank       <= ~scan_bank;
        end
        if (code_start) coding <= 1'b1;
        if (code_done) begin
          coding          <= 1'b0;
          full[code_bank] <= 1'b0;
          code_bank       <= ~code_bank;
        end
        if (!any && !scanning && !coding && (full == 2'b00) && !scan_done && !code_done) begin
          active  <= 1'b0;
          mb_done <= 1'b1;
        end
      end
    end
  end
endmodule
