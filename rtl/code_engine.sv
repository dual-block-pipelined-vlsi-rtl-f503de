// code_engine: coding phase of one residual block (the Code FSM with its table classes).
// From the statistics of a filled statistic buffer it emits, one symbol per cycle, the
// CAVLC syntax of the block: coeff_token, the sign of each trailing one, each remaining
// level (adaptive suffix length), total_zeros (when fewer than the maximum number of
// coefficients are present) and run_before for each coefficient while zeros are left.
// The coeff_token table class comes from the table-selection unit (nC). A multiplexer picks
// the codeword of the active table class.
// Interface: start with a filled buffer; the buffer is read by index (lvl_idx, run_idx);
// cw_valid/cw_ready hand each codeword to the bitstream side, which may stall (cw_ready low)
// for as long as it needs. done pulses for one cycle after the last codeword.
// Timing: 1 + T1 + (TC-T1) + (total_zeros coded ? 1 : 0) + runs coded cycles plus one for
// done, with no stall; a block with TC=0 takes two cycles.
// From the published design: one symbol per cycle and the split into table classes. The
// syntax order and table contents follow the H.264 standard. The handshake is this design's.
// Only the block type of desc is used here (the index travels with it for the caller).
module code_engine
  import entropy_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  output logic              busy,
  output logic              done,
  // statistic buffer read side
  input  blk_desc_t         desc,
  input  logic [4:0]        tc,
  input  logic [1:0]        t1,
  input  logic [3:0]        tz,
  output logic [3:0]        lvl_idx,
  input  logic [COEF_W-1:0] lvl,
  output logic [3:0]        run_idx,
  input  logic [3:0]        run,
  input  nc_class_e         nc_class,
  // codeword output
  output logic              cw_valid,
  input  logic              cw_ready,
  output codeword_t         cw
);
  typedef enum logic [2:0] {S_IDLE, S_CT, S_T1, S_LVL, S_TZ, S_RUN, S_DONE} state_e;
  state_e     state;
  logic [3:0] i;          // level index
  logic [3:0] j;          // run index
  logic [3:0] zl;         // zeros left
  logic [2:0] sl;         // suffix length
  logic [4:0] maxn;

  assign maxn = max_coeff(desc.btype);

  // table classes
  logic [15:0] ct_code;  logic [4:0] ct_len;
  logic [27:0] lv_code;  logic [4:0] lv_len;  logic [2:0] lv_next_sl;
  logic [8:0]  tz_code;  logic [3:0] tz_len;
  logic [10:0] rb_code;  logic [3:0] rb_len;

  coeff_token_table u_ct (
    .nc_class(nc_class), .total_coeff(tc), .trailing_ones(t1), .code(ct_code), .len(ct_len));
  level_table u_lv (
    .level(lvl), .suffix_len(sl), .first_adj((i == {2'b0, t1}) && (t1 != 2'd3)),
    .code(lv_code), .len(lv_len), .next_suffix_len(lv_next_sl));
  total_zeros_table u_tz (
    .chroma_dc(desc.btype == BT_CHROMA_DC), .total_coeff(tc), .total_zeros(tz),
    .code(tz_code), .len(tz_len));
  run_before_table u_rb (
    .zeros_left(zl), .run_before(run), .code(rb_code), .len(rb_len));

  assign lvl_idx = i;
  assign run_idx = j;
  assign busy    = (state != S_IDLE);
  assign done    = (state == S_DONE);

  // codeword multiplexer
  always_comb begin
    cw_valid = 1'b1;
    cw       = '0;
    unique case (state)
      S_CT:  begin cw.code = CW_W'(ct_code); cw.len = LEN_W'(ct_len); end
      S_T1:  begin cw.code = CW_W'(lvl[COEF_W-1]); cw.len = LEN_W'(1); end
      S_LVL: begin cw.code = CW_W'(lv_code); cw.len = LEN_W'(lv_len); end
      S_TZ:  begin cw.code = CW_W'(tz_code); cw.len = LEN_W'(tz_len); end
      S_RUN: begin cw.code = CW_W'(rb_code); cw.len = LEN_W'(rb_len); end
      default: cw_valid = 1'b0;
    endcase
  end

  // what follows the last level
  state_e after_lvl;
  always_comb begin
    if (tc < maxn)                   after_lvl = S_TZ;
    else                             after_lvl = S_DONE;
  end

  logic [3:0] zl_next;
  assign zl_next = zl - run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; i <= '0; j <= '0; zl <= '0; sl <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state <= S_CT;
          i <= '0; j <= '0;
        end
        S_CT: if (cw_ready) begin
          zl <= tz;
          sl <= ((tc > 5'd10) && (t1 != 2'd3)) ? 3'd1 : 3'd0;
          if (tc == 5'd0)       state <= S_DONE;
          else if (t1 != 2'd0)  state <= S_T1;
          else                  state <= S_LVL;
        end
        S_T1: if (cw_ready) begin
          i <= i + 4'd1;
          if (i + 4'd1 == {2'b0, t1}) state <= ({3'b0, t1} < tc) ? S_LVL : after_lvl;
        end
        S_LVL: if (cw_ready) begin
          i  <= i + 4'd1;
          sl <= lv_next_sl;
          if ({1'b0, i} + 5'd1 == tc) state <= after_lvl;
        end
        S_TZ: if (cw_ready) begin
          state <= ((tz != 4'd0) && (tc > 5'd1)) ? S_RUN : S_DONE;
        end
        S_RUN: if (cw_ready) begin
          j  <= j + 4'd1;
          zl <= zl_next;
          if (({1'b0, j} + 5'd2 >= tc) || (zl_next == 4'd0)) state <= S_DONE;
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
