// tb_scan_engine: random coefficient blocks of every block type in a memory model with one
// cycle of read latency. The statistic-buffer writes of the scan engine are collected and
// compared with TC, trailing ones, total zeros, levels and runs computed from the block in
// zig-zag order; the scan must take N+1 cycles for N coefficients.
// A watchdog counts a failure and ends the run after 100,000 clock cycles.
module tb_scan_engine;
  import entropy_pkg::*;
  import tb_vlc_ref_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0, busy, done;
  blk_desc_t   desc_in = '{btype: BT_LUMA4x4, blk: '0};
  logic        mem_re;
  logic [7:0]  mem_addr;
  logic [31:0] mem_rdata;
  logic        sb_clr, sb_tc_inc, sb_run_we, sb_t1_inc, sb_tz_inc;
  blk_desc_t   sb_desc;
  logic [15:0] sb_lvl;
  logic [3:0]  sb_run;
  logic [31:0] mem [192];
  int coef [24][16];
  int checks = 0, failures = 0;
  int g_tc, g_t1, g_tz, g_lvl[$], g_run[$];

  scan_engine dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (mem_re) mem_rdata <= mem[mem_addr];

  always @(posedge clk) begin
    if (sb_clr) begin g_tc = 0; g_t1 = 0; g_tz = 0; g_lvl = {}; g_run = {}; end
    if (sb_tc_inc) begin g_tc++; g_lvl.push_back(int'($signed(sb_lvl))); end
    if (sb_run_we) g_run.push_back(int'(sb_run));
    if (sb_t1_inc) g_t1++;
    if (sb_tz_inc) g_tz++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1;
    for (int it = 0; it < 400; it++) begin
      blk_desc_t d;
      int c[16], n, t0, cyc, e_tc, e_t1, e_tz, e_lvl[$], e_run[$], dens;
      bit open, found;
      dens = $urandom % 4;
      for (int b = 0; b < 24; b++) for (int p = 0; p < 16; p++)
        coef[b][p] = (($urandom % 4) < dens) ? (($urandom % 3 == 0) ? int'($urandom % 41) - 20 : (($urandom % 2) ? 1 : -1)) : 0;
      for (int w = 0; w < 192; w++) mem[w] = {16'(coef[w/8][(w%8)*2+1]), 16'(coef[w/8][(w%8)*2])};
      case ($urandom % 5)
        0: d = '{btype: BT_LUMA4x4, blk: 5'($urandom % 16)};
        1: d = '{btype: BT_LUMA_DC, blk: 5'd0};
        2: d = '{btype: BT_LUMA_AC, blk: 5'($urandom % 16)};
        3: d = '{btype: BT_CHROMA_DC, blk: ($urandom % 2) ? 5'd20 : 5'd16};
        default: d = '{btype: BT_CHROMA_AC, blk: 5'(16 + $urandom % 8)};
      endcase
      // expected coefficients in scan order
      n = int'(max_coeff(d.btype));
      for (int k = 0; k < 16; k++) c[k] = 0;
      for (int k = 0; k < n; k++)
        case (d.btype)
          BT_LUMA4x4: c[k] = coef[d.blk][zz(k)];
          BT_LUMA_AC, BT_CHROMA_AC: c[k] = coef[d.blk][zz(k+1)];
          BT_LUMA_DC: begin
            int p;
            p = zz(k);
            c[k] = coef[((p >> 3) & 1) * 8 + ((p >> 1) & 1) * 4 + ((p >> 2) & 1) * 2 + (p & 1)][0];
          end
          default: c[k] = coef[int'(d.blk) + k][0];
        endcase
      e_tc = 0; e_t1 = 0; e_tz = 0; open = 1; found = 0;
      e_lvl = {}; e_run = {};
      for (int k = n - 1; k >= 0; k--) begin
        if (c[k] != 0) begin
          if (found) e_run.push_back(0);
          e_tc++; e_lvl.push_back(c[k]);
          if (open && (c[k] == 1 || c[k] == -1) && e_t1 < 3) e_t1++; else open = 0;
          found = 1;
        end else if (found) begin
          e_tz++;
          // the run of the previous nonzero coefficient grows while zeros follow it
          if (e_run.size() < e_tc) e_run.push_back(0);
          e_run[e_tc - 1]++;
        end
      end
      // only runs between nonzero coefficients are written
      while (e_run.size() > ((e_tc > 0) ? e_tc - 1 : 0)) void'(e_run.pop_back());
      start <= 1'b1; desc_in <= d;
      @(posedge clk);
      t0 = $time / 10;
      start <= 1'b0;
      while (!done) @(posedge clk);
      cyc = $time / 10 - t0;
      @(posedge clk);
      checks++;
      if (g_tc != e_tc || g_t1 != e_t1 || g_tz != e_tz || g_lvl != e_lvl || g_run != e_run) begin
        failures++;
        $display("it %0d type %0d: tc %0d/%0d t1 %0d/%0d tz %0d/%0d", it, d.btype, g_tc, e_tc, g_t1, e_t1, g_tz, e_tz);
      end
      checks++;
      if (cyc != n + 1) begin failures++; $display("scan of %0d coefficients took %0d cycles", n, cyc); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
