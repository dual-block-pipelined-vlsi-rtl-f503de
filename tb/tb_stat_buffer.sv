// tb_stat_buffer: fills the buffer with random blocks of levels and runs the way the scan
// engine does (clear, then pushes and counter increments), and reads every entry back by
// index; the counters and the stored descriptor are checked after each block.
// A watchdog counts a failure and ends the run after 20,000 clock cycles.
module tb_stat_buffer;
  import entropy_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        clr = 1'b0, tc_inc = 1'b0, run_we = 1'b0, t1_inc = 1'b0, tz_inc = 1'b0;
  blk_desc_t   desc_in = '{btype: BT_LUMA4x4, blk: '0}, desc;
  logic [15:0] lvl_in = '0, lvl_out;
  logic [3:0]  run_in = '0, lvl_idx = '0, run_idx = '0, run_out, tz;
  logic [4:0]  tc;
  logic [1:0]  t1;
  int checks = 0, failures = 0;

  stat_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1;
    for (int b = 0; b < 50; b++) begin
      int n, nt1, ntz;
      logic [15:0] lv[16];
      logic [3:0]  rn[16];
      blk_desc_t d;
      d = '{btype: blk_type_e'($urandom % 5), blk: 5'($urandom % 24)};
      n = $urandom % 17; nt1 = $urandom % 4; ntz = $urandom % 16;
      clr <= 1'b1; desc_in <= d;
      @(posedge clk);
      clr <= 1'b0;
      for (int k = 0; k < 16; k++) begin
        lv[k] = 16'($urandom); rn[k] = 4'($urandom);
        tc_inc <= (k < n); lvl_in <= lv[k];
        run_we <= (k < n - 1); run_in <= rn[k];
        t1_inc <= (k < nt1); tz_inc <= (k < ntz);
        @(posedge clk);
      end
      tc_inc <= 1'b0; run_we <= 1'b0; t1_inc <= 1'b0; tz_inc <= 1'b0;
      @(posedge clk);
      checks++;
      if (int'(tc) != n || int'(t1) != nt1 || int'(tz) != ntz || desc != d) begin
        failures++;
        $display("block %0d: tc %0d/%0d t1 %0d/%0d tz %0d/%0d", b, tc, n, t1, nt1, tz, ntz);
      end
      for (int k = 0; k < n; k++) begin
        lvl_idx = 4'(k); run_idx = 4'(k);
        #1;
        checks++;
        if (lvl_out != lv[k] || (k < n - 1 && run_out != rn[k])) begin
          failures++;
          $display("block %0d entry %0d: %h/%h %0d/%0d", b, k, lvl_out, lv[k], run_out, rn[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
