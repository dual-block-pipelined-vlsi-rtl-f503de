// entropy_coder: macroblock entropy coding engine for an H.264/AVC baseline encoder.
// Symbol level: the Exp-Golomb code unit codes macroblock header symbols and the CAVLC unit
// codes the quantized residual blocks (dual statistic buffers, scan of one 4x4 block in
// parallel with coding of the previous one, zero skipping from the coded block pattern).
// Codeword level: a multiplexer passes header codewords first, then residual codewords, to
// the 96-bit bitstream packer, which also inserts emulation-prevention bytes (RBSP to EBSP).
// Bitstream level: a 2K-bit bitstream buffer feeds the bus interface, which bursts the words
// to the system buffer. The processor writes SPS, PPS and slice headers itself; it may
// push slice-header bits through the header port as fixed-length symbols (this design's
// choice) so they share the NAL unit with the slice data.
// Macroblock protocol: write the coefficients into the coefficient memory, pulse mb_start
// with the MB's cbp/type/position, then send its header symbols with hdr_last on the final
// one; coding of the residual follows and mb_done pulses at the end. Header symbols sent
// while no macroblock is active go straight to the bitstream. nal_end appends the rbsp stop
// bit, flushes the packer and drains the buffer to the bus; nal_done pulses afterwards.
// Timing: header codewords pass one per cycle; residual coding starts after hdr_last and
// overlaps the scan of the macroblock, which begins with mb_start; see cavlc_unit and
// bitstream_packer for the cycle counts. Stalls from the packer or a full buffer hold the
// coder without loss.
// From the published design: the three stages, the dual-buffer CAVLC unit with zero skipping,
// the 96-bit packer with EBSP conversion, the 64 x 32 bitstream buffer, the bus interface
// and the memory sizes. This design's own choices: every port protocol, the fixed-length
// header symbols, the NAL termination and the observation outputs obs_*.
module entropy_coder
  import entropy_pkg::*;
#(
  parameter int unsigned COEF_DEPTH  = 192,
  parameter int unsigned UPPER_DEPTH = 160,
  parameter int unsigned BUF_DEPTH   = 64,
  parameter int unsigned BURST_LEN   = 16,
  localparam int unsigned CAW = $clog2(COEF_DEPTH),
  localparam int unsigned UAW = $clog2(UPPER_DEPTH),
  localparam int unsigned BAW = $clog2(BUF_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // coefficient memory write port (prediction / reconstruction engine)
  input  logic           coef_we,
  input  logic [CAW-1:0] coef_waddr,
  input  logic [31:0]    coef_wdata,
  // macroblock control
  input  logic           mb_start,
  input  logic [5:0]     mb_cbp,
  input  logic           mb_is_i16,
  input  logic [UAW-2:0] mb_x,
  input  logic           mb_left_avail,
  input  logic           mb_up_avail,
  output logic           mb_busy,
  output logic           mb_done,
  // header symbols
  input  logic           hdr_valid,
  output logic           hdr_ready,
  input  logic [1:0]     hdr_type,     // 0 ue(v), 1 se(v), 2 u(n)
  input  logic [31:0]    hdr_value,
  input  logic [5:0]     hdr_flc_len,
  input  logic           hdr_last,
  // NAL unit end
  input  logic           nal_end,
  output logic           nal_done,
  // system bus
  input  logic           addr_load,
  input  logic [31:0]    base_addr,
  output logic           bus_req,
  input  logic           bus_gnt,
  output logic           bus_wvalid,
  input  logic           bus_wready,
  output logic [31:0]    bus_waddr,
  output logic [31:0]    bus_wdata,
  output logic           bus_wlast,
  output logic           bus_nal_end,
  output logic [2:0]     bus_nal_bytes,
  output logic           bus_urgent,
  // observation of the pipeline mechanisms
  output logic           obs_overlap,
  output logic           obs_stall,
  output logic           obs_ins,
  output logic [4:0]     obs_skipped
);
  // coefficient memory
  logic           coef_re;
  logic [7:0]     coef_raddr;
  logic [31:0]    coef_rdata;
  coef_mem #(.DEPTH(COEF_DEPTH), .WIDTH(32)) u_coef (
    .clk, .a_we(coef_we), .a_addr(coef_waddr), .a_wdata(coef_wdata),
    .b_re(coef_re), .b_addr(CAW'(coef_raddr)), .b_rdata(coef_rdata));

  // macroblock / header phase
  logic res_phase;
  logic cv_valid, cv_ready;
  codeword_t cv_cw;

  cavlc_unit #(.UPPER_DEPTH(UPPER_DEPTH)) u_cavlc (
    .clk, .rst_n, .mb_start, .cbp(mb_cbp), .is_i16(mb_is_i16), .mb_x,
    .left_avail(mb_left_avail), .up_avail(mb_up_avail), .code_en(res_phase),
    .busy(mb_busy), .mb_done,
    .coef_re, .coef_addr(coef_raddr), .coef_rdata,
    .cw_valid(cv_valid), .cw_ready(cv_ready), .cw(cv_cw),
    .overlap(obs_overlap), .skipped(obs_skipped));

  codeword_t eg_cw;
  exp_golomb_unit u_eg (
    .sym_type(sym_type_e'(hdr_type)), .value(hdr_value), .flc_len(hdr_flc_len), .cw(eg_cw));

  // NAL end sequencing: stop bit, packer flush, buffer drain
  typedef enum logic [2:0] {N_IDLE, N_STOP, N_FLUSH, N_WAIT, N_DRAIN} nstate_e;
  nstate_e nst;

  // codeword multiplexer
  logic             pk_in_valid, pk_in_ready;
  logic [CW_W-1:0]  pk_code;
  logic [LEN_W-1:0] pk_len;
  always_comb begin
    if (res_phase) begin
      pk_in_valid = cv_valid;  pk_code = cv_cw.code;  pk_len = cv_cw.len;
    end else if (nst == N_STOP) begin
      pk_in_valid = 1'b1;      pk_code = CW_W'(1);    pk_len = LEN_W'(1);
    end else begin
      pk_in_valid = hdr_valid && (nst == N_IDLE);
      pk_code = eg_cw.code;    pk_len = eg_cw.len;
    end
  end
  assign cv_ready  = res_phase && pk_in_ready;
  assign hdr_ready = !res_phase && (nst == N_IDLE) && pk_in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res_phase <= 1'b0;
    else if (mb_done) res_phase <= 1'b0;
    else if (hdr_valid && hdr_ready && hdr_last && mb_busy) res_phase <= 1'b1;
  end

  // packer
  logic        pk_flush, pk_flush_busy, pk_flush_done;
  logic        pk_out_valid, pk_out_ready, pk_out_last;
  logic [31:0] pk_out_data;
  logic [2:0]  pk_out_bytes;
  logic        pk_ready_flag;
  bitstream_packer u_pack (
    .clk, .rst_n, .in_valid(pk_in_valid), .in_ready(pk_in_ready), .in_code(pk_code),
    .in_len(pk_len), .flush(pk_flush), .flush_busy(pk_flush_busy), .flush_done(pk_flush_done),
    .out_valid(pk_out_valid), .out_ready(pk_out_ready), .out_data(pk_out_data),
    .out_last(pk_out_last), .out_bytes(pk_out_bytes), .ebsp_code_ready(pk_ready_flag),
    .backward_stall(obs_stall), .ins_pulse(obs_ins));

  // handshake rules between the codeword and bitstream levels
  assert property (@(posedge clk) !(pk_flush && pk_flush_busy))
    else $error("packer flushed while still draining");
  assert property (@(posedge clk) pk_out_valid == pk_ready_flag)
    else $error("word offered before the EBSP check passed");

  // bitstream buffer
  logic           bb_full, bb_empty, bb_pop, bb_last;
  logic [31:0]    bb_data;
  logic [2:0]     bb_bytes;
  logic [BAW:0]   bb_count;
  assign pk_out_ready = !bb_full;
  bitstream_buffer #(.DEPTH(BUF_DEPTH), .WIDTH(32)) u_buf (
    .clk, .rst_n, .w_en(pk_out_valid), .w_data(pk_out_data), .w_last(pk_out_last),
    .w_bytes(pk_out_bytes), .full(bb_full), .r_en(bb_pop), .r_data(bb_data),
    .r_last(bb_last), .r_bytes(bb_bytes), .empty(bb_empty), .count(bb_count));

  bus_interface #(.BURST_LEN(BURST_LEN), .AW(BAW)) u_bus (
    .clk, .rst_n, .addr_load, .base_addr, .drain_req(nst == N_DRAIN),
    .buf_count(bb_count), .buf_empty(bb_empty), .buf_full(bb_full), .buf_data(bb_data),
    .buf_last(bb_last), .buf_bytes(bb_bytes), .buf_pop(bb_pop),
    .bus_req, .bus_gnt, .bus_wvalid, .bus_wready, .bus_waddr, .bus_wdata, .bus_wlast,
    .bus_nal_end, .bus_nal_bytes, .bus_urgent);

  assign pk_flush = (nst == N_FLUSH);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nst <= N_IDLE; nal_done <= 1'b0;
    end else begin
      nal_done <= 1'b0;
      unique case (nst)
        N_IDLE:  if (nal_end && !mb_busy) nst <= N_STOP;
        N_STOP:  if (pk_in_ready) nst <= N_FLUSH;
        N_FLUSH: nst <= N_WAIT;
        N_WAIT:  if (pk_flush_done) nst <= N_DRAIN;
        N_DRAIN: if (bb_empty && !bus_wvalid) begin
          nst <= N_IDLE;
          nal_done <= 1'b1;
        end
        default: nst <= N_IDLE;
      endcase
    end
  end
endmodule
