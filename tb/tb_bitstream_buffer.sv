// tb_bitstream_buffer: random pushes and pops against a queue model; checks data order,
// the last/bytes sideband, the fill count, and that full and empty block writes and reads.
// A watchdog counts a failure and ends the run after 20,000 clock cycles.
module tb_bitstream_buffer;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        w_en = 1'b0, w_last = 1'b0, r_en = 1'b0;
  logic [31:0] w_data = '0, r_data;
  logic [2:0]  w_bytes = '0, r_bytes;
  logic        full, empty, r_last;
  logic [6:0]  count;
  logic [35:0] model[$];
  int checks = 0, failures = 0, n_full = 0, n_empty = 0;

  bitstream_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1;
    for (int c = 0; c < 6000; c++) begin
      int phase;
      phase = (c / 500) % 2;   // alternate filling and draining
      @(negedge clk);
      checks++;
      if (int'(count) != model.size() || full != (model.size() == 64) || empty != (model.size() == 0)) begin
        failures++;
        $display("cycle %0d: count %0d model %0d full %0d empty %0d", c, count, model.size(), full, empty);
      end
      if (!empty) begin
        checks++;
        if ({r_last, r_bytes, r_data} != model[0]) begin
          failures++;
          $display("cycle %0d: head %h, expected %h", c, {r_last, r_bytes, r_data}, model[0]);
        end
      end
      if (full) n_full++;
      if (empty) n_empty++;
      w_en = ($urandom % 4) < (phase ? 1 : 3);
      r_en = ($urandom % 4) < (phase ? 3 : 1);
      w_data = $urandom; w_last = 1'($urandom); w_bytes = 3'($urandom);
      @(posedge clk);
      if (r_en && model.size() > 0) void'(model.pop_front());
      if (w_en && model.size() < 64 + (r_en ? 1 : 0) && !full) model.push_back({w_last, w_bytes, w_data});
    end
    checks++;
    if (n_full == 0 || n_empty == 0) begin failures++; $display("full or empty never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
