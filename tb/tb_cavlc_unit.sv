// tb_cavlc_unit: codes a 3x2 picture of random macroblocks (dense, sparse, empty,
// Intra16x16) through the CAVLC unit, with a coefficient memory model, random stalls on
// cw_ready in half of the macroblocks and a late code_en. The codeword bits are compared
// with the reference CAVLC coder, which forms nC from a picture-wide map of total
// coefficients. For macroblocks coded without stalls the cycle count must be below the
// sequential sum of scan and coding phases (the block pipeline at work), and the count of
// blocks dropped by zero skipping must match the coded block pattern.
// A watchdog counts a failure and ends the run after 200,000 clock cycles.
module tb_cavlc_unit;
  import entropy_pkg::*;
  import tb_vlc_ref_pkg::*;
  localparam int MB_W = 3, MB_H = 2;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        mb_start = 1'b0, is_i16 = 1'b0, left_avail = 1'b0, up_avail = 1'b0, code_en = 1'b0;
  logic [5:0]  cbp = '0;
  logic [6:0]  mb_x = '0;
  logic        busy, mb_done, coef_re, cw_valid, cw_ready, overlap;
  logic [7:0]  coef_addr;
  logic [31:0] coef_rdata;
  codeword_t   cw;
  logic [4:0]  skipped;
  logic [31:0] mem [192];
  int coef [MB_H][MB_W][24][16];
  int tcl [MB_H*4][MB_W*4];
  int tcc [2][MB_H*2][MB_W*2];
  int checks = 0, failures = 0, n_overlap = 0, n_ovl_mb = 0;
  bitq_t got, expq;
  bit stall_mode = 0;
  int n_coded;        // blocks the reference codes in the current macroblock
  logic rdy_q = 1'b1;

  cavlc_unit dut (.*);
  always #5 clk = ~clk;
  always_ff @(posedge clk) if (coef_re) coef_rdata <= mem[coef_addr];
  always @(posedge clk) rdy_q <= stall_mode ? ($urandom % 3 != 0) : 1'b1;
  assign cw_ready = rdy_q;

  always @(posedge clk) begin
    if (cw_valid && cw_ready) for (int k = int'(cw.len) - 1; k >= 0; k--) got.push_back(cw.code[k]);
    if (overlap) n_overlap++;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int bx(int b); return ((b >> 2) & 1) * 2 + (b & 1); endfunction
  function automatic int by(int b); return ((b >> 3) & 1) * 2 + ((b >> 1) & 1); endfunction
  function automatic int pred(int a, bit ha, int b, bit hb);
    if (ha && hb) return (a + b + 1) >> 1;
    if (ha) return a;
    if (hb) return b;
    return 0;
  endfunction

  // run_before codewords of a block: one per non-zero coefficient, from the highest
  // frequency down and except the last, while zeros are left to place
  function automatic int runs_coded(int c[16], int n);
    int last, tz, cnt, nrem, run;
    last = -1; nrem = 0;
    for (int k = 0; k < n; k++) if (c[k] != 0) begin last = k; nrem++; end
    if (last < 0) return 0;
    tz = last + 1 - nrem;
    cnt = 0; run = 0;
    // walk from high to low frequency: run of each non-zero = zeros directly below it
    for (int k = last; k >= 0 && tz > 0; k--) begin
      if (c[k] != 0) begin
        nrem--;
        if (nrem == 0) break;
        run = 0;
        for (int j = k - 1; j >= 0 && c[j] == 0; j--) run++;
        cnt++;
        tz -= run;
      end
    end
    return cnt;
  endfunction

  // reference residual of one MB; returns the sequential cycle sum (scan + code phases)
  function automatic int ref_mb(int my, int mx, bit i16, int cb);
    int c[16], n, tc, seq;
    seq = 0; n_coded = 0;
    for (int s = 0; s < 27; s++) begin
      bit coded;
      int blk, cls, kind, gx, gy, cc;
      coded = 0; blk = 0; kind = 0;
      if (s == 0) begin coded = i16; kind = 1; end
      else if (s <= 16) begin
        blk = s - 1; kind = i16 ? 2 : 0;
        coded = i16 ? ((cb & 15) == 15) : cb[(s-1)/4];
        if (!coded) tcl[my*4 + by(blk)][mx*4 + bx(blk)] = 0;
      end else if (s <= 18) begin kind = 3; blk = (s == 17) ? 16 : 20; coded = (cb >> 4) != 0; end
      else begin
        kind = 4; blk = s - 3; coded = (cb >> 4) == 2;
        if (!coded) tcc[(blk-16)/4][my*2 + ((blk-16)%4)/2][mx*2 + (blk%2)] = 0;
      end
      if (!coded) continue;
      n_coded++;
      for (int k = 0; k < 16; k++) c[k] = 0;
      case (kind)
        0: begin n = 16; for (int k = 0; k < 16; k++) c[k] = coef[my][mx][blk][zz(k)]; end
        1: begin
          n = 16;
          for (int k = 0; k < 16; k++) begin
            int p;
            p = zz(k);
            c[k] = coef[my][mx][((p >> 3) & 1) * 8 + ((p >> 1) & 1) * 4 + ((p >> 2) & 1) * 2 + (p & 1)][0];
          end
        end
        2, 4: begin n = 15; for (int k = 0; k < 15; k++) c[k] = coef[my][mx][blk][zz(k+1)]; end
        default: begin n = 4; for (int k = 0; k < 4; k++) c[k] = coef[my][mx][blk+k][0]; end
      endcase
      if (kind == 3) cls = 4;
      else if (kind == 4) begin
        cc = (blk - 16) / 4; gx = mx*2 + (blk%2); gy = my*2 + ((blk-16)%4)/2;
        cls = nc_class_of(pred((gx > 0) ? tcc[cc][gy][gx-1] : 0, gx > 0, (gy > 0) ? tcc[cc][gy-1][gx] : 0, gy > 0));
      end else begin
        int b0;
        b0 = (kind == 1) ? 0 : blk;
        gx = mx*4 + bx(b0); gy = my*4 + by(b0);
        cls = nc_class_of(pred((gx > 0) ? tcl[gy][gx-1] : 0, gx > 0, (gy > 0) ? tcl[gy-1][gx] : 0, gy > 0));
      end
      tc = put_block(expq, c, n, cls);
      if (kind == 0 || kind == 2) tcl[my*4 + by(blk)][mx*4 + bx(blk)] = tc;
      if (kind == 4) tcc[(blk-16)/4][my*2 + ((blk-16)%4)/2][mx*2 + (blk%2)] = tc;
      seq += (n + 1) + (1 + tc + ((tc > 0 && tc < n) ? 1 : 0) + runs_coded(c, n) + 1);
    end
    return seq;
  endfunction

  initial begin
    #1 rst_n = 1'b0;   // before the first clock edge
    @(posedge clk); rst_n <= 1'b1;
    for (int my = 0; my < MB_H; my++)
      for (int mx = 0; mx < MB_W; mx++) begin
        int mode, cb, t0, cyc, seq, mbn;
        bit i16;
        mbn = my * MB_W + mx;
        mode = mbn % 4;   // 0 dense, 1 sparse, 2 empty, 3 intra16x16
        i16 = (mode == 3);
        for (int b = 0; b < 24; b++)
          for (int p = 0; p < 16; p++) begin
            int unsigned r1, r2;
            r1 = $urandom; r2 = $urandom;
            if (mode == 0)
              coef[my][mx][b][p] = (r1 % 3 != 0) ? int'(r2 % 9) - 4 : 0;
            else
              coef[my][mx][b][p] = (mode != 2 && (b == 6 || b >= 20 || p == 0) && r1 % 3 == 0) ? 1 : 0;
          end
        cb = 0;
        for (int b = 0; b < 16; b++) for (int p = (i16 ? 1 : 0); p < 16; p++)
          if (coef[my][mx][b][p] != 0) cb |= i16 ? 15 : (1 << (b / 4));
        begin
          int dc, ac;
          dc = 0; ac = 0;
          for (int b = 16; b < 24; b++) begin
            if (coef[my][mx][b][0] != 0) dc = 1;
            for (int p = 1; p < 16; p++) if (coef[my][mx][b][p] != 0) ac = 1;
          end
          cb |= (ac ? 2 : dc) << 4;
        end
        for (int w = 0; w < 192; w++) mem[w] = {16'(coef[my][mx][w/8][(w%8)*2+1]), 16'(coef[my][mx][w/8][(w%8)*2])};
        got = {}; expq = {};
        seq = ref_mb(my, mx, i16, cb);
        stall_mode = (mbn % 2 == 1);
        cbp <= 6'(cb); is_i16 <= i16; mb_x <= 7'(mx); left_avail <= (mx > 0); up_avail <= (my > 0);
        mb_start <= 1'b1;
        @(posedge clk);
        t0 = $time / 10;
        mb_start <= 1'b0;
        repeat (5) @(posedge clk);
        code_en <= 1'b1;
        while (!mb_done) @(posedge clk);
        cyc = $time / 10 - t0;
        checks++;
        if (int'(skipped) != (i16 ? 27 : 26) - n_coded) begin
          failures++; $display("MB %0d: skipped %0d, expected %0d", mbn, skipped, (i16 ? 27 : 26) - n_coded);
        end
        code_en <= 1'b0;
        @(posedge clk);
        checks++;
        if (got != expq) begin failures++; $display("MB %0d: %0d bits, expected %0d", mbn, got.size(), expq.size()); end
        if (!stall_mode && seq > 40) begin
          checks++;
          if (cyc >= seq) begin failures++; $display("MB %0d: %0d cycles, sequential %0d", mbn, cyc, seq); end
        end
        $display("MB %0d mode %0d: %0d cycles, sequential phases %0d", mbn, mode, cyc, seq);
      end
    checks++;
    if (n_overlap == 0) begin failures++; $display("no overlap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
