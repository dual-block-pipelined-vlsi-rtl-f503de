// tb_coeff_token_table: every (table class, TotalCoeff, TrailingOnes) entry is compared with
// the reference bit strings; the codes of each class must also be distinct.
// The block is combinational: each input is applied for one time step and the outputs are
// compared after it. A watchdog counts a failure and ends the run after a fixed simulated time.
module tb_coeff_token_table;
  import entropy_pkg::*;
  import tb_vlc_ref_pkg::*;
  nc_class_e   nc_class;
  logic [4:0]  total_coeff;
  logic [1:0]  trailing_ones;
  logic [15:0] code;
  logic [4:0]  len;
  int checks = 0, failures = 0;

  coeff_token_table dut (.nc_class, .total_coeff, .trailing_ones, .code, .len);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 5; c++) begin
      string seen[string];
      seen.delete();
      for (int tc = 0; tc <= ((c == 4) ? 4 : 16); tc++)
        for (int t1 = 0; t1 <= ((tc < 3) ? tc : 3); t1++) begin
          string e, g;
          nc_class = nc_class_e'(c); total_coeff = 5'(tc); trailing_ones = 2'(t1);
          #1;
          e = ct_str(c, tc, t1);
          g = "";
          for (int k = int'(len) - 1; k >= 0; k--) g = {g, code[k] ? "1" : "0"};
          checks++;
          if (g != e || seen.exists(g)) begin
            failures++;
            $display("class %0d tc %0d t1 %0d: %s, expected %s", c, tc, t1, g, e);
          end
          seen[g] = "x";
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
