// tb_run_before_table: every run_before entry for zerosLeft 1..15 against the reference
// bit strings.
// The block is combinational: each input is applied for one time step and the outputs are
// compared after it. A watchdog counts a failure and ends the run after a fixed simulated time.
module tb_run_before_table;
  import tb_vlc_ref_pkg::*;
  logic [3:0]  zeros_left, run_before;
  logic [10:0] code;
  logic [3:0]  len;
  int checks = 0, failures = 0;

  run_before_table dut (.zeros_left, .run_before, .code, .len);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int zl = 1; zl <= 15; zl++)
      for (int r = 0; r <= ((zl < 15) ? zl : 14); r++) begin
        string e, g;
        zeros_left = 4'(zl); run_before = 4'(r);
        #1;
        e = rb_str(zl, r);
        g = "";
        for (int k = int'(len) - 1; k >= 0; k--) g = {g, code[k] ? "1" : "0"};
        checks++;
        if (g != e) begin
          failures++;
          $display("zl %0d run %0d: %s, expected %s", zl, r, g, e);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
