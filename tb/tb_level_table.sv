// tb_level_table: levels -2000..2000 (and the extremes of the escape range) at every suffix
// length, with and without the trailing-ones adjustment, against a level coder written
// from the H.264 rules; the next suffix length is checked too.
// The block is combinational: each input is applied for one time step and the outputs are
// compared after it. A watchdog counts a failure and ends the run after a fixed simulated time.
module tb_level_table;
  import tb_vlc_ref_pkg::*;
  logic [15:0] level;
  logic [2:0]  suffix_len;
  logic        first_adj;
  logic [27:0] code;
  logic [4:0]  len;
  logic [2:0]  next_suffix_len;
  int checks = 0, failures = 0;

  level_table dut (.level, .suffix_len, .first_adj, .code, .len, .next_suffix_len);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int sl = 0; sl <= 6; sl++)
      for (int a = 0; a < 2; a++)
        for (int v = -2063; v <= 2063; v++) begin
          bitq_t e, g;
          int ns;
          if (v == 0) continue;
          if (a == 1 && (v == 1 || v == -1)) continue;
          level = 16'(v); suffix_len = 3'(sl); first_adj = a[0];
          #1;
          ns = put_level(e, v, sl, a[0]);
          for (int k = int'(len) - 1; k >= 0; k--) g.push_back(code[k]);
          checks++;
          if (g != e || int'(next_suffix_len) != ns) begin
            failures++;
            if (failures < 10) $display("level %0d sl %0d adj %0d: len %0d next %0d", v, sl, a, len, next_suffix_len);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
