// tb_exp_golomb_unit: checks ue(v) for code numbers 0..3000 and 65534, se(v) for -1500..1500
// and fixed-length symbols against Exp-Golomb bit strings built from the H.264 definition.
// The block is combinational: each input is applied for one time step and the outputs are
// compared after it. A watchdog counts a failure and ends the run after a fixed simulated time.
module tb_exp_golomb_unit;
  import entropy_pkg::*;
  import tb_vlc_ref_pkg::*;
  sym_type_e   sym_type;
  logic [31:0] value;
  logic [5:0]  flc_len;
  codeword_t   cw;
  int checks = 0, failures = 0;

  exp_golomb_unit dut (.sym_type, .value, .flc_len, .cw);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(sym_type_e t, int v, int fl);
    bitq_t e, g;
    sym_type = t; value = 32'(v); flc_len = 6'(fl);
    #1;
    if (t == SYM_UE) put_ue(e, longint'(unsigned'(v)));
    else if (t == SYM_SE) put_se(e, v);
    else put_val(e, longint'(unsigned'(v)), fl);
    for (int k = int'(cw.len) - 1; k >= 0; k--) g.push_back(cw.code[k]);
    checks++;
    if (g != e) begin
      failures++;
      if (failures < 10) $display("type %0d value %0d: len %0d code %h", t, v, cw.len, cw.code);
    end
  endtask

  initial begin
    for (int v = 0; v <= 3000; v++) check(SYM_UE, v, 0);
    check(SYM_UE, 65534, 0);
    for (int v = -1500; v <= 1500; v++) check(SYM_SE, v, 0);
    for (int n = 1; n <= 32; n++) check(SYM_FLC, int'($urandom), n);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
