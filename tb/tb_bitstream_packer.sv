// tb_bitstream_packer: random codewords of 1..32 bits, with long runs of zero bits and
// 0x000001-like patterns to provoke emulation prevention, are packed; the output is
// stalled at random. After a flush the words are compared byte by byte with the RBSP of the
// codewords run through a reference RBSP-to-EBSP conversion, including the last partial
// word. The number of 0x03 insertions and stall cycles must be above zero, and with the
// output free one codeword must be taken per cycle when no insertion is pending.
// A watchdog counts a failure and ends the run after 400,000 clock cycles.
module tb_bitstream_packer;
  import entropy_pkg::*;
  import tb_vlc_ref_pkg::*;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        in_valid = 1'b0, in_ready;
  logic [31:0] in_code = '0;
  logic [5:0]  in_len = '0;
  logic        flush = 1'b0, flush_busy, flush_done;
  logic        out_valid, out_ready, out_last, ebsp_code_ready, backward_stall, ins_pulse;
  logic [31:0] out_data;
  logic [2:0]  out_bytes;
  byte unsigned got[$];
  int checks = 0, failures = 0, n_ins = 0, n_stall = 0;
  bit out_stall = 0;
  logic ordy = 1'b1;

  bitstream_packer dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) ordy <= out_stall ? ($urandom % 3 == 0) : 1'b1;
  assign out_ready = ordy;

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      int nb;
      nb = out_last ? int'(out_bytes) : 4;
      for (int k = 0; k < nb; k++) got.push_back(out_data[31 - 8*k -: 8]);
    end
    if (ins_pulse) n_ins++;
    if (backward_stall) n_stall++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1;
    for (int nal = 0; nal < 20; nal++) begin
      bitq_t q;
      byte unsigned e[$];
      int ncw;
      got = {}; q = {}; e = {};
      out_stall = (nal % 2 == 1);
      ncw = 20 + $urandom % 300;
      for (int n = 0; n < ncw; n++) begin
        int len;
        logic [31:0] code;
        len = 1 + $urandom % 32;
        case ($urandom % 4)
          0: code = '0;
          1: code = 32'($urandom % 4);
          default: code = $urandom;
        endcase
        in_valid <= 1'b1; in_code <= code; in_len <= 6'(len);
        do @(negedge clk); while (!in_ready);
        @(posedge clk);
        put_val(q, longint'(code), len);
      end
      in_valid <= 1'b0;
      q.push_back(1'b1);
      in_valid <= 1'b1; in_code <= 32'd1; in_len <= 6'd1;
      do @(negedge clk); while (!in_ready);
      @(posedge clk);
      in_valid <= 1'b0;
      while (q.size() % 8 != 0) q.push_back(1'b0);
      flush <= 1'b1;
      @(posedge clk);
      flush <= 1'b0;
      while (!flush_done) @(posedge clk);
      @(posedge clk);
      rbsp_to_ebsp(q, e);
      checks++;
      if (got.size() != e.size()) begin failures++; $display("NAL %0d: %0d bytes, expected %0d", nal, got.size(), e.size()); end
      for (int k = 0; k < e.size() && k < got.size(); k++) begin
        checks++;
        if (got[k] != e[k]) begin failures++; if (failures < 10) $display("NAL %0d byte %0d: %02h, expected %02h", nal, k, got[k], e[k]); end
      end
    end
    // throughput: short codewords, free output, no zero patterns
    begin
      int t0, cyc;
      got = {};
      out_stall = 0;
      t0 = $time / 10;
      for (int n = 0; n < 64; n++) begin
        in_valid <= 1'b1; in_code <= 32'hffff_ffff; in_len <= 6'd8;
        do @(negedge clk); while (!in_ready);
        @(posedge clk);
      end
      in_valid <= 1'b0;
      cyc = $time / 10 - t0;
      checks++;
      if (cyc != 64) begin failures++; $display("64 codewords took %0d cycles", cyc); end
      flush <= 1'b1; @(posedge clk); flush <= 1'b0;
      while (!flush_done) @(posedge clk);
    end
    checks++;
    if (n_ins == 0 || n_stall == 0) begin failures++; $display("insertions %0d stalls %0d", n_ins, n_stall); end
    $display("insertions %0d, stall cycles %0d", n_ins, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
