// cavlc_unit: the dual-buffer, block-pipelined CAVLC unit.
// The block ordering FSM hands blocks to the scan engine, which fills one of two statistic
// buffers while the coding engine empties the other (ping-pong), so scan and coding of
// neighbouring 4x4 blocks run in parallel. The table-selection unit supplies nC from the
// total coefficients of the neighbouring blocks, kept per macroblock and, for the row above,
// in the upper total coefficient memory.
// Interface: mb_start with the macroblock's cbp, Intra16x16 flag, column and neighbour
// availability starts a macroblock; scanning begins at once, coding waits for code_en (the
// header has been sent) and the neighbour context. Codewords leave on cw_valid/cw_ready.
// mb_done pulses when the last codeword is accepted and the context is stored; a
// macroblock without coded blocks still loads and stores its (all-zero) context.
// Timing: a block of N coefficients is scanned in N+1 cycles and coded in one cycle per
// codeword plus one; the two overlap across neighbouring blocks. Context load takes 3 cycles
// at macroblock start and the store 2 cycles at the end.
// From the published design: the composition (scan engine, two statistic buffers, coding
// engine with its table classes, table selection, upper total coefficient memory) and the
// pipeline. This design's own choices: the control handshakes between these parts; the
// assertions below state the rules the pipeline keeps.
module cavlc_unit
  import entropy_pkg::*;
#(
  parameter int unsigned UPPER_DEPTH = 160,
  localparam int unsigned UAW = $clog2(UPPER_DEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           mb_start,
  input  logic [5:0]     cbp,
  input  logic           is_i16,
  input  logic [UAW-2:0] mb_x,
  input  logic           left_avail,
  input  logic           up_avail,
  input  logic           code_en,
  output logic           busy,
  output logic           mb_done,
  // coefficient memory read port
  output logic           coef_re,
  output logic [7:0]     coef_addr,
  input  logic [31:0]    coef_rdata,
  // codeword stream
  output logic           cw_valid,
  input  logic           cw_ready,
  output codeword_t      cw,
  // observation
  output logic           overlap,
  output logic [4:0]     skipped
);
  // block ordering
  logic      scan_start, scan_done, scan_bank, code_start, code_done, code_bank, order_done;
  blk_desc_t scan_desc;
  logic      ctx_busy;
  logic      mb_active, storing, store_req;

  block_order_fsm u_order (
    .clk, .rst_n, .mb_go(mb_start), .cbp, .is_i16,
    .code_en(code_en && !ctx_busy),
    .scan_start, .scan_desc, .scan_bank, .scan_done,
    .code_start, .code_bank, .code_done, .mb_done(order_done), .overlap, .skipped);

  // scan engine
  logic              sb_clr, sb_tc_inc, sb_run_we, sb_t1_inc, sb_tz_inc;
  blk_desc_t         sb_desc;
  logic [COEF_W-1:0] sb_lvl;
  logic [3:0]        sb_run;
  logic              scan_busy;

  scan_engine u_scan (
    .clk, .rst_n, .start(scan_start), .desc_in(scan_desc), .busy(scan_busy), .done(scan_done),
    .mem_re(coef_re), .mem_addr(coef_addr), .mem_rdata(coef_rdata),
    .sb_clr, .sb_desc, .sb_tc_inc, .sb_lvl, .sb_run_we, .sb_run, .sb_t1_inc, .sb_tz_inc);

  // ping-pong statistic buffers
  blk_desc_t         b_desc [2];
  logic [4:0]        b_tc   [2];
  logic [1:0]        b_t1   [2];
  logic [3:0]        b_tz   [2];
  logic [COEF_W-1:0] b_lvl  [2];
  logic [3:0]        b_run  [2];
  logic [3:0]        lvl_idx, run_idx;

  for (genvar g = 0; g < 2; g++) begin : g_buf
    logic sel;
    assign sel = (scan_bank == 1'(g));
    stat_buffer u_buf (
      .clk, .rst_n,
      .clr(sb_clr && sel), .desc_in(sb_desc),
      .tc_inc(sb_tc_inc && sel), .lvl_in(sb_lvl),
      .run_we(sb_run_we && sel), .run_in(sb_run),
      .t1_inc(sb_t1_inc && sel), .tz_inc(sb_tz_inc && sel),
      .lvl_idx, .run_idx,
      .desc(b_desc[g]), .tc(b_tc[g]), .t1(b_t1[g]), .tz(b_tz[g]),
      .lvl_out(b_lvl[g]), .run_out(b_run[g]));
  end

  // table selection
  nc_class_e       nc_class;
  logic [4:0]      nc;
  logic            um_en, um_we;
  logic [UAW-1:0]  um_addr;
  logic [19:0]     um_wdata, um_rdata;
  logic            tc_we;

  assign tc_we = code_start && (b_desc[code_bank].btype inside {BT_LUMA4x4, BT_LUMA_AC, BT_CHROMA_AC});

  nc_select #(.MEM_DEPTH(UPPER_DEPTH)) u_nc (
    .clk, .rst_n, .ctx_load(mb_start && !mb_active), .ctx_store(store_req && !ctx_busy),
    .mb_x, .left_avail, .up_avail, .ctx_busy,
    .tc_we, .tc_blk(b_desc[code_bank].blk), .tc_val(b_tc[code_bank]),
    .desc(b_desc[code_bank]), .nc_class, .nc,
    .mem_en(um_en), .mem_we(um_we), .mem_addr(um_addr), .mem_wdata(um_wdata),
    .mem_rdata(um_rdata));

  upper_tc_mem #(.DEPTH(UPPER_DEPTH), .WIDTH(20)) u_upper (
    .clk, .en(um_en), .we(um_we), .addr(um_addr), .wdata(um_wdata), .rdata(um_rdata));

  logic code_busy;
  code_engine u_code (
    .clk, .rst_n, .start(code_start), .busy(code_busy), .done(code_done),
    .desc(b_desc[code_bank]), .tc(b_tc[code_bank]), .t1(b_t1[code_bank]),
    .tz(b_tz[code_bank]), .lvl_idx, .lvl(b_lvl[code_bank]), .run_idx, .run(b_run[code_bank]),
    .nc_class, .cw_valid, .cw_ready, .cw);

  // macroblock bracket: busy from mb_start until the context is stored
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mb_active <= 1'b0; storing <= 1'b0; store_req <= 1'b0; mb_done <= 1'b0;
    end else begin
      mb_done <= 1'b0;
      if (mb_start && !mb_active) mb_active <= 1'b1;
      // the store waits for a context load still in progress (macroblock without blocks)
      if (order_done) store_req <= 1'b1;
      if (store_req && !ctx_busy) begin
        store_req <= 1'b0;
        storing   <= 1'b1;
      end
      if (storing && !ctx_busy) begin
        storing   <= 1'b0;
        mb_active <= 1'b0;
        mb_done   <= 1'b1;
      end
    end
  end
  assign busy = mb_active;
  // pipeline rules: an engine is never restarted while busy; the fixed-length class only
  // for nC >= 8
  assert property (@(posedge clk) !(scan_start && scan_busy))
    else $error("scan started while the scan engine is busy");
  assert property (@(posedge clk) !(code_start && code_busy))
    else $error("coding started while the code engine is busy");
  assert property (@(posedge clk) nc_class != NC_FLC || nc >= 5'd8)
    else $error("fixed-length coeff_token class below nC 8");
endmodule
