// tb_qp_sweep: cycles per macroblock of the CAVLC unit against quantization strength, the
// comparison of the three engines: basic (scan then code, block after block), dual buffer
// (scan and coding overlapped) and dual buffer with zero skipping. Synthetic residuals
// stand in for coded video: for each setting "qp" 10..45 a coefficient at zig-zag position k
// is non-zero with probability p0*0.85^k, p0 falling geometrically from 0.9 to 0.003, and levels shrink with
// it. Each macroblock is coded twice by the RTL: with its true coded block pattern (zero
// skipping) and with every block marked coded (dual buffer without skipping: all 25 blocks
// scanned, the all-zero ones coded as TotalCoeff 0). The basic engine's count is the sum of
// scan (N+1) and coding (codewords+1) cycles of every block. The skipping run's bits are
// checked against the reference coder; the checks are skip <= no-skip < basic for every
// macroblock, no-skip below 0.75 x basic for the densest setting, and skip below half of
// no-skip for the sparsest. Averages per setting are printed as a table.
// A watchdog counts a failure and ends the run after 200,000 clock cycles.
module tb_qp_sweep;
  import entropy_pkg::*;
  import tb_vlc_ref_pkg::*;
  localparam int MB_W = 1, MB_H = 1, NQP = 8, NMB = 6;
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
    seq = 0;
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
    real avg_a[NQP], avg_b[NQP], avg_c[NQP];
    #1 rst_n = 1'b0;   // before the first clock edge
    @(posedge clk); rst_n <= 1'b1;
    for (int q = 0; q < NQP; q++) begin
      real p0;
      int sum_a, sum_b, sum_c, amp;
      p0 = 0.9 * (0.003 / 0.9) ** (real'(q) / real'(NQP - 1));
      amp = (q < 2) ? 12 : (q < 4) ? 5 : 2;
      sum_a = 0; sum_b = 0; sum_c = 0;
      for (int mbn = 0; mbn < NMB; mbn++) begin
        int cb, seq, cyc[2], full_seq;
        bit i16;
        i16 = 0;
        for (int b = 0; b < 24; b++) for (int p = 0; p < 16; p++) coef[0][0][b][p] = 0;
        for (int b = 0; b < 24; b++)
          for (int k = 0; k < 16; k++) begin
            real pk;
            int unsigned r1, r2, r3, r4;
            int v;
            r1 = $urandom; r2 = $urandom; r3 = $urandom; r4 = $urandom;
            pk = p0 * (0.85 ** k) * ((b >= 16) ? 0.5 : 1.0);
            if (real'(r1 % 10000) < pk * 10000.0) begin
              v = 1 + int'(r2 % amp) * int'(r3 % 2);
              coef[0][0][b][zz(k)] = (r4 % 2 != 0) ? v : -v;
            end
          end
        cb = 0;
        for (int b = 0; b < 16; b++) for (int p = 0; p < 16; p++)
          if (coef[0][0][b][p] != 0) cb |= (1 << (b / 4));
        begin
          int dc, ac;
          dc = 0; ac = 0;
          for (int b = 16; b < 24; b++) begin
            if (coef[0][0][b][0] != 0) dc = 1;
            for (int p = 1; p < 16; p++) if (coef[0][0][b][p] != 0) ac = 1;
          end
          cb |= (ac ? 2 : dc) << 4;
        end
        for (int w = 0; w < 192; w++) mem[w] = {16'(coef[0][0][w/8][(w%8)*2+1]), 16'(coef[0][0][w/8][(w%8)*2])};
        full_seq = 0;
        for (int r = 0; r < 2; r++) begin
          int c6, t0;
          c6 = (r == 0) ? cb : 6'h2f;
          for (int y = 0; y < 4; y++) for (int x = 0; x < 4; x++) tcl[y][x] = 0;
          for (int c = 0; c < 2; c++) for (int y = 0; y < 2; y++) for (int x = 0; x < 2; x++) tcc[c][y][x] = 0;
          got = {}; expq = {};
          seq = ref_mb(0, 0, i16, c6);
          // basic engine: with every block marked coded, the sum of the sequential scan and
          // coding phases of all 24 blocks
          if (r == 1) full_seq = seq;
          stall_mode = 0;
          cbp <= 6'(c6); is_i16 <= i16; mb_x <= '0; left_avail <= 1'b0; up_avail <= 1'b0;
          mb_start <= 1'b1;
          @(posedge clk);
          t0 = $time / 10;
          mb_start <= 1'b0;
          code_en <= 1'b1;
          while (!mb_done) @(posedge clk);
          cyc[r] = $time / 10 - t0;
          code_en <= 1'b0;
          @(posedge clk);
          checks++;
          if (got != expq) begin failures++; $display("qp %0d MB %0d run %0d: %0d bits, expected %0d", 10 + 5*q, mbn, r, got.size(), expq.size()); end
        end
        checks += 2;
        if (cyc[0] > cyc[1]) begin failures++; $display("qp %0d MB %0d: skip %0d > no-skip %0d cycles", 10 + 5*q, mbn, cyc[0], cyc[1]); end
        if (cyc[1] >= full_seq) begin failures++; $display("qp %0d MB %0d: no-skip %0d >= basic %0d cycles", 10 + 5*q, mbn, cyc[1], full_seq); end
        sum_a += cyc[0]; sum_b += cyc[1]; sum_c += full_seq;
      end
      avg_a[q] = real'(sum_a) / NMB; avg_b[q] = real'(sum_b) / NMB; avg_c[q] = real'(sum_c) / NMB;
    end
    $display(" qp   basic   dual-buffer   dual-buffer+skip   (cycles per macroblock, residual only)");
    for (int q = 0; q < NQP; q++)
      $display(" %2d  %6.1f      %6.1f          %6.1f", 10 + 5*q, avg_c[q], avg_b[q], avg_a[q]);
    checks += 2;
    if (avg_b[0] >= 0.75 * avg_c[0]) begin failures++; $display("dense: dual buffer saves too little"); end
    if (avg_a[NQP-1] >= 0.5 * avg_b[NQP-1]) begin failures++; $display("sparse: zero skipping saves too little"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
