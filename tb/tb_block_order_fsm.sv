// tb_block_order_fsm: random coded block patterns, with and without Intra16x16, against
// models of the scan and coding engines with random durations. Checks: the block sequence
// (type and index) equals the list derived from the pattern in double-zigzag order with
// all-zero 8x8 blocks and chroma parts skipped; the buffer of each scan is the one coded
// next in the same order; a buffer is never scanned while full; the skipped count; and that
// scan and coding overlap when several blocks are coded.
// A watchdog counts a failure and ends the run after 200,000 clock cycles.
module tb_block_order_fsm;
  import entropy_pkg::*;
  logic       clk = 1'b0, rst_n = 1'b1, mb_go = 1'b0, is_i16 = 1'b0, code_en = 1'b1;
  logic [5:0] cbp = '0;
  logic       scan_start, scan_bank, scan_done = 1'b0, code_start, code_bank, code_done = 1'b0;
  logic       mb_done, overlap;
  blk_desc_t  scan_desc;
  logic [4:0] skipped;
  int checks = 0, failures = 0, n_overlap = 0;
  blk_desc_t  got[$];
  int         banks[$];
  bit         full_m[2];
  int scan_left = 0, code_left = 0;

  block_order_fsm dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // engine models
  always @(posedge clk) begin
    scan_done <= 1'b0; code_done <= 1'b0;
    if (scan_start) begin
      got.push_back(scan_desc);
      checks++;
      if (full_m[scan_bank]) begin failures++; $display("scan into a full buffer"); end
      banks.push_back(int'(scan_bank));
      scan_left = 2 + $urandom % 17;
    end else if (scan_left > 0) begin
      scan_left--;
      if (scan_left == 0) begin scan_done <= 1'b1; full_m[scan_bank] = 1; end
    end
    if (code_start) begin
      checks++;
      if (!full_m[code_bank] || banks.size() == 0 || banks[0] != int'(code_bank)) begin
        failures++; $display("coding an empty or wrong buffer");
      end
      if (banks.size() > 0) void'(banks.pop_front());
      code_left = 2 + $urandom % 30;
    end else if (code_left > 0) begin
      code_left--;
      if (code_left == 0) begin code_done <= 1'b1; full_m[code_bank] = 0; end
    end
    if (overlap) n_overlap++;
  end

  initial begin
    @(posedge clk); rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1;
    full_m[0] = 0; full_m[1] = 0;
    for (int it = 0; it < 300; it++) begin
      blk_desc_t e[$];
      int c;
      bit i16;
      c = $urandom % 64;
      if (c[5:4] == 3) c[5:4] = 2;
      i16 = ($urandom % 4 == 0);
      if (i16) c[3:0] = ($urandom % 2) ? 15 : 0;
      e = {};
      if (i16) e.push_back('{btype: BT_LUMA_DC, blk: 5'd0});
      for (int b = 0; b < 16; b++)
        if (i16 ? (c[3:0] == 15) : c[b / 4]) e.push_back('{btype: i16 ? BT_LUMA_AC : BT_LUMA4x4, blk: 5'(b)});
      if (c[5:4] != 0) begin
        e.push_back('{btype: BT_CHROMA_DC, blk: 5'd16});
        e.push_back('{btype: BT_CHROMA_DC, blk: 5'd20});
      end
      if (c[5:4] == 2) for (int b = 16; b < 24; b++) e.push_back('{btype: BT_CHROMA_AC, blk: 5'(b)});
      got = {};
      cbp <= 6'(c); is_i16 <= i16; mb_go <= 1'b1;
      @(posedge clk);
      mb_go <= 1'b0;
      @(posedge clk);
      while (!mb_done) @(posedge clk);
      checks++;
      if (got != e) begin failures++; $display("it %0d cbp %02h i16 %0d: %0d blocks, expected %0d", it, c, i16, got.size(), e.size()); end
      checks++;
      if (int'(skipped) != (i16 ? 27 : 26) - e.size()) begin failures++; $display("skipped %0d", skipped); end
    end
    checks++;
    if (n_overlap == 0) begin failures++; $display("no overlap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
