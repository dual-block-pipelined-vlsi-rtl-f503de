// tb_upper_tc_mem: writes random 20-bit words to all 160 addresses, reads them back in
// random order with one cycle of latency, and checks that a disabled cycle holds the output.
// A watchdog counts a failure and ends the run after 5,000 clock cycles.
module tb_upper_tc_mem;
  logic        clk = 1'b0;
  logic        en = 1'b0, we = 1'b0;
  logic [7:0]  addr = '0;
  logic [19:0] wdata = '0, rdata, hold;
  logic [19:0] shadow [160];
  int checks = 0, failures = 0;

  upper_tc_mem dut (.clk, .en, .we, .addr, .wdata, .rdata);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < 160; w++) begin
      shadow[w] = 20'($urandom);
      en <= 1'b1; we <= 1'b1; addr <= 8'(w); wdata <= shadow[w];
      @(posedge clk);
    end
    for (int n = 0; n < 300; n++) begin
      int r;
      r = $urandom % 160;
      en <= 1'b1; we <= 1'b0; addr <= 8'(r);
      @(posedge clk);
      en <= 1'b0;
      #1;
      checks++;
      if (rdata != shadow[r]) begin
        failures++;
        $display("word %0d: %h, expected %h", r, rdata, shadow[r]);
      end
      hold = rdata;
      addr <= 8'($urandom % 160);
      @(posedge clk);
      #1;
      checks++;
      if (rdata != hold) begin failures++; $display("output changed while disabled"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
