// tb_total_zeros_table: every 4x4 and chroma DC total_zeros entry against the reference
// bit strings.
// The block is combinational: each input is applied for one time step and the outputs are
// compared after it. A watchdog counts a failure and ends the run after a fixed simulated time.
module tb_total_zeros_table;
  import tb_vlc_ref_pkg::*;
  logic       chroma_dc;
  logic [4:0] total_coeff;
  logic [3:0] total_zeros;
  logic [8:0] code;
  logic [3:0] len;
  int checks = 0, failures = 0;

  total_zeros_table dut (.chroma_dc, .total_coeff, .total_zeros, .code, .len);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int d = 0; d < 2; d++)
      for (int tc = 1; tc <= (d ? 3 : 15); tc++)
        for (int tz = 0; tz <= (d ? 4 : 16) - tc; tz++) begin
          string e, g;
          chroma_dc = d[0]; total_coeff = 5'(tc); total_zeros = 4'(tz);
          #1;
          e = tz_str(d[0], tc, tz);
          g = "";
          for (int k = int'(len) - 1; k >= 0; k--) g = {g, code[k] ? "1" : "0"};
          checks++;
          if (g != e) begin
            failures++;
            $display("cdc %0d tc %0d tz %0d: %s, expected %s", d, tc, tz, g, e);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
