// tb_coef_mem: fills the 192x32 coefficient memory with random words through port A, then
// reads them back through port B (one cycle latency) in random order, also while port A
// writes elsewhere, and compares with a shadow copy.
// A watchdog counts a failure and ends the run after 5,000 clock cycles.
module tb_coef_mem;
  logic        clk = 1'b0;
  logic        a_we = 1'b0, b_re = 1'b0;
  logic [7:0]  a_addr = '0, b_addr = '0;
  logic [31:0] a_wdata = '0, b_rdata;
  logic [31:0] shadow [192];
  int checks = 0, failures = 0;

  coef_mem dut (.clk, .a_we, .a_addr, .a_wdata, .b_re, .b_addr, .b_rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 192; w++) begin
      shadow[w] = $urandom;
      a_we <= 1'b1; a_addr <= 8'(w); a_wdata <= shadow[w];
      @(posedge clk);
    end
    a_we <= 1'b0;
    for (int n = 0; n < 400; n++) begin
      int r, w;
      r = $urandom % 192;
      w = (r + 1 + $urandom % 190) % 192;
      b_re <= 1'b1; b_addr <= 8'(r);
      a_we <= 1'b1; a_addr <= 8'(w); a_wdata <= $urandom;
      @(posedge clk);
      b_re <= 1'b0; a_we <= 1'b0;
      shadow[w] = a_wdata;
      #1;
      checks++;
      if (b_rdata != shadow[r]) begin
        failures++;
        $display("word %0d: %h, expected %h", r, b_rdata, shadow[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
