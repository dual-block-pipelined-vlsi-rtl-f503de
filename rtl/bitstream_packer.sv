// bitstream_packer: 96-bit bitstream packer with RBSP-to-EBSP conversion.
// Shift-and-pack appends each variable-length codeword (1..32 bits) behind the bits left in a
// 96-bit register array (MSB first). Once 48 bits (six bytes) are held, four EBSP checkers
// look in parallel at the byte windows 0-2, 1-3, 2-4 and 3-5; a window fires on two zero
// bytes followed by a byte of 0x00..0x03. When no checker fires (EBSP code ready) the first
// 32 bits leave as one word. Otherwise one 0x03 emulation-prevention byte is inserted in
// front of the third byte of the first firing window, serially, one per cycle, while the
// codeword input is held off (backward stall). An inserted byte is marked so it is never
// taken as the third byte of a window again. Because six bytes are checked while only four
// leave, the windows that straddle two output words are covered as well.
// Flush (end of a NAL unit's payload, after the caller has sent the rbsp stop bit) pads to a
// byte boundary with zero bits and drains the array; the last word is padded with zero bytes
// and out_last/out_bytes mark it. Padding bytes are not checked.
// Interface: in_valid/in_ready with in_code (right-aligned) and in_len; out_valid/out_ready
// with out_data. in_ready is high when at most 48 bits stay after this cycle's output, so a
// codeword is taken every cycle while output flows. flush is accepted when idle (flush_busy
// low) and flush_done pulses after the last word.
// Timing: one codeword per cycle and one output word per cycle; each 0x03 insertion costs
// one cycle in which no codeword is taken. A flush takes about one cycle per remaining word.
// From the published design: the 96-bit register array, checking once 48 bits are held,
// four parallel EBSP checkers, serial dummy-byte insertion and the backward stall. This
// design's own choices: the insertion position rule, the marking of inserted bytes, the input
// acceptance rule and the flush with its byte count. A request to flush that arrives during
// an insertion cycle is held and served right after it.
module bitstream_packer
  import entropy_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [CW_W-1:0]  in_code,
  input  logic [LEN_W-1:0] in_len,
  input  logic             flush,
  output logic             flush_busy,
  output logic             flush_done,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [31:0]      out_data,
  output logic             out_last,
  output logic [2:0]       out_bytes,
  output logic             ebsp_code_ready,
  output logic             backward_stall,
  output logic             ins_pulse
);
  logic [95:0] rbuf;
  logic [6:0]  cnt;
  logic [11:0] prot;
  logic        drain;
  logic        flush_pend;   // flush seen during an insertion cycle
  logic        flush_any;
  assign flush_any = flush || flush_pend;

  logic [7:0] byte_at [12];
  always_comb begin
    for (int n = 0; n < 12; n++) byte_at[n] = rbuf[95 - 8*n -: 8];
  end

  logic [3:0] nb;
  assign nb = 4'(cnt >> 3);

  // four EBSP checkers
  logic       check_en;
  logic [3:0] fire;
  logic [3:0] ins_pos;
  assign check_en = (cnt >= 7'd48) || (drain && cnt != 7'd0);
  always_comb begin
    for (int k = 0; k < 4; k++)
      fire[k] = check_en && (byte_at[k] == 8'h00) && (byte_at[k+1] == 8'h00) &&
                (byte_at[k+2] <= 8'h03) && !prot[k+2] && (4'(k + 2) < nb);
    ins_pos = '0;
    for (int k = 3; k >= 0; k--)
      if (fire[k]) ins_pos = 4'(k + 2);
  end

  logic ins, emit;
  assign ebsp_code_ready = check_en && (fire == 4'b0000);
  assign ins       = check_en && (fire != 4'b0000);
  assign emit      = ebsp_code_ready && out_ready;
  assign out_valid = ebsp_code_ready;
  assign out_data  = rbuf[95:64];
  assign out_last  = drain && (cnt <= 7'd32);
  assign out_bytes = (nb >= 4'd4) ? 3'd4 : 3'(nb);
  assign ins_pulse = ins;

  logic [6:0] cnt_ao;     // count after this cycle's output
  assign cnt_ao   = emit ? ((cnt > 7'd32) ? cnt - 7'd32 : 7'd0) : cnt;
  assign in_ready = !drain && !flush_any && !ins && (cnt_ao <= 7'd48);
  assign backward_stall = in_valid && !in_ready;
  assign flush_busy = drain || flush_pend;

  // shift and pack
  logic [95:0] buf_ao, packed_in, ins_buf;
  logic [31:0] code_m;
  always_comb begin
    buf_ao    = emit ? (rbuf << 32) : rbuf;
    code_m    = (in_len >= 6'd32) ? in_code : (in_code & ((32'd1 << in_len) - 32'd1));
    packed_in = (({code_m, 64'd0}) << (7'd32 - 7'(in_len))) >> cnt_ao;
    // 0x03 insertion in front of byte ins_pos
    ins_buf = '0;
    for (int n = 0; n < 12; n++) begin
      if (4'(n) < ins_pos)       ins_buf[95 - 8*n -: 8] = byte_at[n];
      else if (4'(n) == ins_pos) ins_buf[95 - 8*n -: 8] = 8'h03;
      else                       ins_buf[95 - 8*n -: 8] = byte_at[n-1];
    end
  end

  logic [11:0] ins_prot;
  always_comb begin
    for (int n = 0; n < 12; n++) begin
      if (4'(n) < ins_pos)       ins_prot[n] = prot[n];
      else if (4'(n) == ins_pos) ins_prot[n] = 1'b1;
      else                       ins_prot[n] = prot[n-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rbuf <= '0; cnt <= '0; prot <= '0; drain <= 1'b0; flush_done <= 1'b0; flush_pend <= 1'b0;
    end else begin
      flush_done <= 1'b0;
      if (ins) begin
        rbuf <= ins_buf;
        cnt  <= cnt + 7'd8;
        prot <= ins_prot;
        if (flush && !drain) flush_pend <= 1'b1;
      end else begin
        if (in_valid && in_ready) begin
          rbuf <= buf_ao | packed_in;
          cnt  <= cnt_ao + 7'(in_len);
        end else begin
          rbuf <= buf_ao;
          cnt  <= cnt_ao;
        end
        prot <= emit ? {4'b0000, prot[11:4]} : prot;
        if (flush_any && !drain) begin
          drain <= 1'b1;
          flush_pend <= 1'b0;
          cnt   <= (cnt_ao + 7'd7) & 7'h78;
        end
        if (drain && emit && out_last) begin
          drain      <= 1'b0;
          flush_done <= 1'b1;
        end
      end
      if (drain && cnt == 7'd0) begin
        drain      <= 1'b0;
        flush_done <= 1'b1;
      end
    end
  end
endmodule
