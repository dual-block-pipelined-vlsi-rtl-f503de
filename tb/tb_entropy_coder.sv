// tb_entropy_coder: end-to-end test of the entropy coder at its default parameters.
// It codes one NAL unit: a few fixed-length slice-header bits (including a 0x000001 pattern
// that forces an emulation-prevention byte), then MB_W x MB_H macroblocks of random
// residual data (dense, sparse, empty, Intra16x16 and large levels), each preceded by random
// header symbols, then the NAL end. A reference encoder written from the H.264 rules
// (tb_vlc_ref_pkg) builds the expected RBSP, converts it to EBSP and the testbench compares
// every byte the bus interface writes, and the bus addresses. A bus model grants bursts
// after random delays and withholds the bus for a while to fill the bitstream buffer.
// Per macroblock the cycle count is checked against a bound from the block pipeline: the
// scan of a block overlaps the coding of the one before. Each mechanism (scan/code overlap,
// zero skipping, backward stall, 0x03 insertion, buffer full, Intra16x16, chroma DC, each nC
// table class) is counted and must happen at least once.
// A watchdog counts a failure and ends the run after 400,000 clock cycles.
module tb_entropy_coder;
  import tb_vlc_ref_pkg::*;

  localparam int MB_W = 4;
  localparam int MB_H = 3;

  logic        clk = 1'b0;
  logic        rst_n = 1'b1;
  logic        coef_we = 1'b0;
  logic [7:0]  coef_waddr = '0;
  logic [31:0] coef_wdata = '0;
  logic        mb_start = 1'b0;
  logic [5:0]  mb_cbp = '0;
  logic        mb_is_i16 = 1'b0;
  logic [6:0]  mb_x = '0;
  logic        mb_left_avail = 1'b0, mb_up_avail = 1'b0;
  logic        mb_busy, mb_done;
  logic        hdr_valid = 1'b0, hdr_ready, hdr_last = 1'b0;
  logic [1:0]  hdr_type = '0;
  logic [31:0] hdr_value = '0;
  logic [5:0]  hdr_flc_len = '0;
  logic        nal_end = 1'b0, nal_done;
  logic        addr_load = 1'b0;
  logic [31:0] base_addr = 32'h1000_0000;
  logic        bus_req, bus_gnt, bus_wvalid, bus_wready, bus_wlast, bus_nal_end, bus_urgent;
  logic [31:0] bus_waddr, bus_wdata;
  logic [2:0]  bus_nal_bytes;
  logic        obs_overlap, obs_stall, obs_ins;
  logic [4:0]  obs_skipped;

  entropy_coder dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  bitq_t ref_bits;
  byte unsigned got[$];
  int n_overlap = 0, n_skip = 0, n_stall = 0, n_ins = 0, n_urgent = 0, n_i16 = 0, n_cdc = 0;
  int n_cls[5] = '{0, 0, 0, 0, 0};
  int beat = 0;
  bit hold_bus = 0;
  bit started = 0;
  bitq_t rtl_bits;
  typedef struct { int pos; int len; int code; int st; int i; int sl; int lvl; } cwlog_t;
  cwlog_t cw_log[$];

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // bus model
  int gnt_wait = 0;
  always_ff @(posedge clk) begin
    if (bus_req && !hold_bus) begin
      if (gnt_wait == 0) gnt_wait <= 1 + ($urandom % 6);
      else if (gnt_wait == 1) gnt_wait <= 0;
      else gnt_wait <= gnt_wait - 1;
    end
  end
  assign bus_gnt    = bus_req && !hold_bus && (gnt_wait == 1);
  logic wr_rnd = 1'b1;
  always @(posedge clk) wr_rnd <= ($urandom % 4 != 0);
  assign bus_wready = !hold_bus && wr_rnd;

  always @(posedge clk) begin
    if (started && bus_wvalid && bus_wready) begin
      int nb;
      checks++;
      if (bus_waddr != base_addr + 32'(4 * beat)) begin
        failures++;
        $display("bus address %h, expected %h", bus_waddr, base_addr + 32'(4 * beat));
      end
      beat++;
      nb = bus_nal_end ? int'(bus_nal_bytes) : 4;
      for (int k = 0; k < nb; k++) got.push_back(bus_wdata[31 - 8 * k -: 8]);
    end
    if ($test$plusargs("dbg") && dut.pk_in_valid && dut.pk_in_ready) begin
      int st;
      st = int'(dut.u_cavlc.u_code.state);
      for (int k = int'(dut.pk_len) - 1; k >= 0; k--) rtl_bits.push_back(dut.pk_code[k]);
      cw_log.push_back('{rtl_bits.size() - int'(dut.pk_len), int'(dut.pk_len), int'(dut.pk_code), st, int'(dut.u_cavlc.u_code.i), int'(dut.u_cavlc.u_code.sl), int'(dut.u_cavlc.b_lvl[dut.u_cavlc.code_bank])});
    end
    if (obs_overlap) n_overlap++;
    if (obs_stall)   n_stall++;
    if (obs_ins)     n_ins++;
    if (bus_urgent)  n_urgent++;
    if (dut.u_cavlc.code_start) n_cls[int'(dut.u_cavlc.nc_class)]++;
    if (dut.u_cavlc.code_start && $test$plusargs("dbg")) $display("RTL blk %0d cls %0d tc %0d t1 %0d tz %0d", dut.u_cavlc.b_desc[dut.u_cavlc.code_bank].blk, dut.u_cavlc.nc_class, dut.u_cavlc.b_tc[dut.u_cavlc.code_bank], dut.u_cavlc.b_t1[dut.u_cavlc.code_bank], dut.u_cavlc.b_tz[dut.u_cavlc.code_bank]);
  end

  // residual data of the picture, raster position inside each 4x4 block
  int coef [MB_H][MB_W][24][16];
  int tcl  [MB_H*4][MB_W*4];     // luma total coefficients per 4x4 block
  int tcc  [2][MB_H*2][MB_W*2];  // chroma AC total coefficients

  function automatic int rnd_level(int big);
    int a;
    a = (big != 0) ? 1 + ($urandom % 2000) : (($urandom % 4 == 0) ? 2 + ($urandom % 12) : 1);
    return ($urandom % 2) ? a : -a;
  endfunction

  // luma block index (double zigzag) -> 4x4 column / row inside the MB
  function automatic int bx(int b); return ((b >> 2) & 1) * 2 + (b & 1); endfunction
  function automatic int by(int b); return ((b >> 3) & 1) * 2 + ((b >> 1) & 1); endfunction

  function automatic int nc_luma(int gx, int gy);
    bit ha, hb;
    int na, nb;
    ha = gx > 0; hb = gy > 0;
    na = ha ? tcl[gy][gx-1] : 0;
    nb = hb ? tcl[gy-1][gx] : 0;
    if (ha && hb) return (na + nb + 1) >> 1;
    if (ha) return na;
    if (hb) return nb;
    return 0;
  endfunction

  function automatic int nc_chroma(int cc, int gx, int gy);
    bit ha, hb;
    int na, nb;
    ha = gx > 0; hb = gy > 0;
    na = ha ? tcc[cc][gy][gx-1] : 0;
    nb = hb ? tcc[cc][gy-1][gx] : 0;
    if (ha && hb) return (na + nb + 1) >> 1;
    if (ha) return na;
    if (hb) return nb;
    return 0;
  endfunction

  // reference coding of one MB's residual; returns pipeline cycle bound
  function automatic int ref_mb(int my, int mx, bit i16, int cbp);
    int c[16], n, tc, bound, prev_code, scan, syms;
    bound = 0; prev_code = 0;
    for (int s = 0; s < 27; s++) begin
      bit coded;
      int blk, cls, kind;  // kind 0 luma4x4, 1 lumaDC, 2 lumaAC, 3 cdc, 4 cac
      coded = 0; blk = 0; kind = 0;
      if (s == 0) begin coded = i16; kind = 1; end
      else if (s <= 16) begin
        blk = s - 1;
        kind = i16 ? 2 : 0;
        coded = i16 ? ((cbp & 15) == 15) : cbp[(s-1)/4];
        if (!coded) tcl[my*4 + by(blk)][mx*4 + bx(blk)] = 0;
      end else if (s <= 18) begin
        kind = 3; blk = (s == 17) ? 16 : 20; coded = (cbp >> 4) != 0;
      end else begin
        kind = 4; blk = s - 3; coded = (cbp >> 4) == 2;
        if (!coded) tcc[(blk-16)/4][my*2 + ((blk-16)%4)/2][mx*2 + (blk%2)] = 0;
      end
      if (!coded) continue;
      for (int k = 0; k < 16; k++) c[k] = 0;
      case (kind)
        0: begin n = 16; for (int k = 0; k < 16; k++) c[k] = coef[my][mx][blk][zz(k)]; end
        1: begin
          n = 16;
          for (int k = 0; k < 16; k++) begin
            int p, b;
            p = zz(k);
            b = ((p >> 3) & 1) * 8 + ((p >> 1) & 1) * 4 + ((p >> 2) & 1) * 2 + (p & 1);
            c[k] = coef[my][mx][b][0];
          end
        end
        2, 4: begin n = 15; for (int k = 0; k < 15; k++) c[k] = coef[my][mx][blk][zz(k+1)]; end
        default: begin n = 4; for (int k = 0; k < 4; k++) c[k] = coef[my][mx][blk+k][0]; end
      endcase
      if (kind == 3) cls = 4;
      else if (kind == 4) cls = nc_class_of(nc_chroma((blk-16)/4, mx*2 + (blk%2), my*2 + ((blk-16)%4)/2));
      else begin
        int b0;
        b0 = (kind == 1) ? 0 : blk;
        cls = nc_class_of(nc_luma(mx*4 + bx(b0), my*4 + by(b0)));
      end
      tc = put_block(ref_bits, c, n, cls);
      if ($test$plusargs("dbg")) $display("REF blk %0d cls %0d tc %0d", blk, cls, tc);
      if (kind == 0 || kind == 2) tcl[my*4 + by(blk)][mx*4 + bx(blk)] = tc;
      if (kind == 4) tcc[(blk-16)/4][my*2 + ((blk-16)%4)/2][mx*2 + (blk%2)] = tc;
      // symbols of this block: token + levels + total_zeros + runs (upper bound)
      syms = 1 + tc + ((tc > 0 && tc < n) ? 1 : 0) + (tc > 0 ? tc - 1 : 0);
      scan = n + 3;
      bound += (scan > prev_code) ? scan : prev_code;
      prev_code = syms + 3;
    end
    return bound + prev_code + 12;
  endfunction

  task automatic send_hdr(int kind, int value, int flen, bit last);
    hdr_type <= 2'(kind); hdr_value <= 32'(value); hdr_flc_len <= 6'(flen); hdr_last <= last;
    hdr_valid <= 1'b1;
    @(posedge clk);
    while (!hdr_ready) @(posedge clk);
    hdr_valid <= 1'b0; hdr_last <= 1'b0;
    if (kind == 0) put_ue(ref_bits, longint'(value));
    else if (kind == 1) put_se(ref_bits, value);
    else put_val(ref_bits, longint'(value), flen);
  endtask

  initial begin
    byte unsigned exp_bytes[$];
    int mode, cbp, bound, t0, cycles, sum_cyc;
    bit i16;
    #1 rst_n = 1'b0;   // before the first clock edge, so no state is used unreset
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    started = 1;
    addr_load <= 1'b1;
    @(posedge clk);
    addr_load <= 1'b0;

    // slice-header bits from the processor
    send_hdr(2, 8'h65, 8, 0);
    send_hdr(2, 24'h000001, 24, 0);
    send_hdr(2, 16'h0000, 16, 0);
    send_hdr(2, 8'h02, 8, 0);
    send_hdr(0, 0, 0, 0);
    send_hdr(1, -3, 0, 0);

    sum_cyc = 0;
    for (int my = 0; my < MB_H; my++) begin
      for (int mx = 0; mx < MB_W; mx++) begin
        int mbn;
        mbn = my * MB_W + mx;
        mode = (mbn == 0) ? 0 : (mbn == 1) ? 1 : (mbn == 2) ? 2 : (mbn == 3) ? 3 : (mbn == 5) ? 4 : $urandom % 5;
        // 0 dense small, 1 dense large, 2 sparse, 3 empty, 4 intra16x16
        i16 = (mode == 4) || ($urandom % 6 == 0 && mode != 3);
        for (int b = 0; b < 24; b++)
          for (int p = 0; p < 16; p++) begin
            int v;
            v = 0;
            case (mode)
              0: v = ($urandom % 3 == 0) ? 0 : rnd_level(0);
              1: v = ($urandom % 5 == 0) ? 0 : rnd_level(($urandom % 3 == 0) ? 1 : 0);
              2, 4: v = (((b == 1 || b == 13) || (b >= 16 && b < 20 && p == 0)) && ($urandom % 5 == 0)) ? rnd_level(0) : 0;
              default: v = 0;
            endcase
            coef[my][mx][b][p] = v;
          end
        if (mode == 4) begin
          coef[my][mx][0][0] = 7;   // a DC level
          for (int p = 1; p < 16; p++) coef[my][mx][3][p] = 0;
        end
        // coded block pattern from the data
        cbp = 0;
        if (i16) begin
          for (int b = 0; b < 16; b++) for (int p = 1; p < 16; p++) if (coef[my][mx][b][p] != 0) cbp |= 15;
        end else begin
          for (int b = 0; b < 16; b++) for (int p = 0; p < 16; p++) if (coef[my][mx][b][p] != 0) cbp |= 1 << (b / 4);
        end
        begin
          int dc, ac;
          dc = 0; ac = 0;
          for (int b = 16; b < 24; b++) begin
            if (coef[my][mx][b][0] != 0) dc = 1;
            for (int p = 1; p < 16; p++) if (coef[my][mx][b][p] != 0) ac = 1;
          end
          cbp |= (ac ? 2 : dc) << 4;
        end
        if (i16) n_i16++;
        if ((cbp >> 4) != 0) n_cdc++;
        if (((cbp & 15) != 15 && !i16) || (cbp >> 4) != 2) n_skip++;
        // load the coefficient memory
        for (int w = 0; w < 192; w++) begin
          coef_we <= 1'b1;
          coef_waddr <= 8'(w);
          coef_wdata <= {16'(coef[my][mx][w/8][(w%8)*2+1]), 16'(coef[my][mx][w/8][(w%8)*2])};
          @(posedge clk);
        end
        coef_we <= 1'b0;
        hold_bus = (mbn == 1);
        // start and header
        mb_cbp <= 6'(cbp); mb_is_i16 <= i16; mb_x <= 7'(mx);
        mb_left_avail <= (mx > 0); mb_up_avail <= (my > 0);
        mb_start <= 1'b1;
        @(posedge clk);
        t0 = $time / 10;
        mb_start <= 1'b0;
        send_hdr(0, $urandom % 26, 0, 0);
        send_hdr(1, int'($urandom % 41) - 20, 0, 0);
        send_hdr(1, int'($urandom % 7) - 3, 0, 1);
        bound = ref_mb(my, mx, i16, cbp) + 4;
        if (mbn == 1) begin
          repeat (1500) @(posedge clk);
          hold_bus = 0;
        end
        while (!mb_done) @(posedge clk);
        cycles = $time / 10 - t0;
        checks++;
        if (mbn != 1 && cycles > bound) begin
          failures++;
          $display("MB %0d: %0d cycles, pipeline bound %0d", mbn, cycles, bound);
        end
        $display("MB %0d (ref byte %0d) mode %0d i16 %0d cbp %02h: %0d cycles (bound %0d), skipped %0d", mbn, ref_bits.size() / 8,
                 mode, i16, cbp, cycles, bound, obs_skipped);
        @(posedge clk);
      end
    end
    // end of NAL unit: stop bit and alignment
    ref_bits.push_back(1'b1);
    while (ref_bits.size() % 8 != 0) ref_bits.push_back(1'b0);
    nal_end <= 1'b1;
    @(posedge clk);
    nal_end <= 1'b0;
    while (!nal_done) @(posedge clk);
    repeat (5) @(posedge clk);
    rbsp_to_ebsp(ref_bits, exp_bytes);
    if ($test$plusargs("dbg")) begin
      for (int k = 0; k < rtl_bits.size() && k < ref_bits.size(); k++)
        if (rtl_bits[k] != ref_bits[k]) begin
          $display("first bit difference at %0d", k);
          foreach (cw_log[m]) if (cw_log[m].pos + cw_log[m].len > k - 40 && cw_log[m].pos <= k + 5)
            $display("cw pos %0d len %0d code %h st %0d i %0d sl %0d lvl %0d", cw_log[m].pos, cw_log[m].len, cw_log[m].code, cw_log[m].st, cw_log[m].i, cw_log[m].sl, cw_log[m].lvl);
          for (int q = k - 40; q < k + 10; q++) $write("%0d", ref_bits[q]);
          $display("");
          break;
        end
    end
    checks++;
    if (got.size() != exp_bytes.size()) begin
      failures++;
      $display("byte count %0d, expected %0d", got.size(), exp_bytes.size());
    end
    for (int k = 0; k < exp_bytes.size() && k < got.size(); k++) begin
      checks++;
      if (got[k] != exp_bytes[k]) begin
        failures++;
        if (failures < 10) $display("byte %0d: %02h, expected %02h", k, got[k], exp_bytes[k]);
      end
    end
    $display("bytes %0d, overlap %0d, skip MBs %0d, stall %0d, 0x03 %0d, full %0d, i16 %0d, cdc %0d, cls %0d/%0d/%0d/%0d/%0d",
             got.size(), n_overlap, n_skip, n_stall, n_ins, n_urgent, n_i16, n_cdc,
             n_cls[0], n_cls[1], n_cls[2], n_cls[3], n_cls[4]);
    checks++; if (n_overlap == 0) begin failures++; $display("no scan/code overlap"); end
    checks++; if (n_skip == 0)    begin failures++; $display("no zero skipping"); end
    checks++; if (n_stall == 0)   begin failures++; $display("no backward stall"); end
    checks++; if (n_ins == 0)     begin failures++; $display("no 0x03 insertion"); end
    checks++; if (n_urgent == 0)  begin failures++; $display("buffer never full"); end
    checks++; if (n_i16 == 0)     begin failures++; $display("no Intra16x16"); end
    checks++; if (n_cdc == 0)     begin failures++; $display("no chroma DC"); end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (n_cls[k] == 0) begin failures++; $display("nC table class %0d never used", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
