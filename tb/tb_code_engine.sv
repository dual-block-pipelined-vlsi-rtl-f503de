// tb_code_engine: the testbench plays the statistic buffer: random blocks of every kind are
// reduced to TC, trailing ones, total zeros, levels and runs, served by index to the coding
// engine with a random nC class, and the emitted codewords (with random stalls on cw_ready)
// are compared as a bit string with the reference CAVLC block coder. Without stalls the
// coding must take one cycle per codeword plus one.
// A watchdog counts a failure and ends the run after 200,000 clock cycles.
module tb_code_engine;
  import entropy_pkg::*;
  import tb_vlc_ref_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b1, start = 1'b0, busy, done;
  blk_desc_t   desc = '{btype: BT_LUMA4x4, blk: '0};
  logic [4:0]  tc = '0;
  logic [1:0]  t1 = '0;
  logic [3:0]  tz = '0, lvl_idx, run_idx, run;
  logic [15:0] lvl;
  nc_class_e   nc_class = NC_VLC0;
  logic        cw_valid, cw_ready = 1'b1;
  codeword_t   cw;
  int lv [16], rn [16];
  int checks = 0, failures = 0;
  bitq_t got;
  int ncw;
  bit stall_mode;

  code_engine dut (.*);
  always #5 clk = ~clk;
  assign lvl = 16'(lv[lvl_idx]);
  assign run = 4'(rn[run_idx]);

  always @(posedge clk) begin
    if (cw_valid && cw_ready) begin
      for (int k = int'(cw.len) - 1; k >= 0; k--) got.push_back(cw.code[k]);
      ncw++;
    end
    cw_ready <= stall_mode ? ($urandom % 3 != 0) : 1'b1;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1;
    for (int it = 0; it < 1500; it++) begin
      int c[16], n, cls, e_tc, e_t1, e_tz, cnt, t0, cyc;
      bit open;
      bitq_t exp_q;
      blk_desc_t d;
      int kind;
      kind = $urandom % 5;
      d = '{btype: blk_type_e'(kind), blk: (kind >= 3) ? 5'd16 : 5'd0};
      n = int'(max_coeff(d.btype));
      cls = (kind == 3) ? 4 : int'($urandom % 4);
      for (int k = 0; k < 16; k++) begin
        int r;
        r = $urandom % 8;
        c[k] = 0;
        if (k < n && r < (it % 8))
          c[k] = (r < 4) ? (($urandom % 2) ? 1 : -1) : (($urandom % 2) ? 1 : -1) * int'(1 + $urandom % ((it % 3 == 0) ? 2000 : 20));
      end
      // statistics as the scan engine leaves them
      e_tc = 0; e_t1 = 0; e_tz = 0; open = 1; cnt = 0;
      for (int k = 0; k < 16; k++) rn[k] = 0;
      for (int k = n - 1; k >= 0; k--) begin
        if (c[k] != 0) begin
          lv[e_tc] = c[k];
          e_tc++;
          if (open && (c[k] == 1 || c[k] == -1) && e_t1 < 3) e_t1++; else open = 0;
        end else if (e_tc > 0) begin
          e_tz++;
          rn[e_tc - 1]++;
        end
      end
      exp_q = {};
      void'(put_block(exp_q, c, n, cls));
      got = {}; ncw = 0;
      stall_mode = (it % 2 == 1);
      desc <= d; tc <= 5'(e_tc); t1 <= 2'(e_t1); tz <= 4'(e_tz); nc_class <= nc_class_e'(cls);
      start <= 1'b1;
      @(posedge clk);
      t0 = $time / 10;
      start <= 1'b0;
      while (!done) @(posedge clk);
      cyc = $time / 10 - t0;
      @(posedge clk);
      checks++;
      if (got != exp_q) begin
        failures++;
        if (failures < 10) $display("it %0d kind %0d cls %0d tc %0d t1 %0d tz %0d: %0d bits, expected %0d", it, kind, cls, e_tc, e_t1, e_tz, got.size(), exp_q.size());
      end
      if (!stall_mode) begin
        checks++;
        if (cyc != ncw + 1) begin failures++; $display("it %0d: %0d cycles for %0d codewords", it, cyc, ncw); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
