// scan_engine: scan phase of one residual block (zig-zag scan address generator, level
// detector and run accumulator).
// On start it reads the block's coefficients from the coefficient memory one per cycle in
// reverse zig-zag order (highest frequency first). The read has one cycle of latency, so the
// level detector works one cycle behind the address generator. For every nonzero
// coefficient it pushes the level into the statistic buffer and the zeros accumulated since
// the previous nonzero coefficient as that coefficient's run; it counts total coefficients,
// trailing ones (up to three +-1 before the first larger level) and total zeros (zeros below
// the highest-frequency nonzero coefficient).
// Timing: a block of N coefficients (16, 15 or 4) takes N+1 cycles from start to done.
// Address mapping follows the coef_mem layout; DC blocks gather position 0 of their blocks.
// From the published design: the zig-zag scan address generator, level detector and run
// accumulator, one coefficient per cycle in reverse zig-zag order. This design's own choices:
// the memory layout it reads and the event interface to the statistic buffer.
module scan_engine
  import entropy_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  blk_desc_t         desc_in,
  output logic              busy,
  output logic              done,
  // coefficient memory read port (1-cycle latency)
  output logic              mem_re,
  output logic [7:0]        mem_addr,
  input  logic [31:0]       mem_rdata,
  // statistic buffer write side
  output logic              sb_clr,
  output blk_desc_t         sb_desc,
  output logic              sb_tc_inc,
  output logic [COEF_W-1:0] sb_lvl,
  output logic              sb_run_we,
  output logic [3:0]        sb_run,
  output logic              sb_t1_inc,
  output logic              sb_tz_inc
);
  blk_desc_t  desc;
  logic [4:0] k;          // scan index being addressed, counts down
  logic       addr_act;   // an address is issued this cycle
  logic       d_act;      // data from last cycle's address arrives
  logic       d_half;     // which half of the word holds it
  logic       d_last;
  logic       found;      // a nonzero coefficient was seen
  logic       t1_open;    // still counting trailing ones
  logic [1:0] t1_cnt;
  logic [3:0] run_acc;

  // address generator
  logic [3:0] zz;
  logic [3:0] pos;
  logic [4:0] blk;
  always_comb begin
    zz  = zigzag4x4(k[3:0]);
    pos = zz;
    blk = desc.blk;
    unique case (desc.btype)
      BT_LUMA_AC, BT_CHROMA_AC: pos = zigzag4x4(k[3:0] + 4'd1);
      BT_LUMA_DC: begin
        pos = 4'd0;
        blk = {1'b0, luma_blk_idx(zz[1:0], zz[3:2])};
      end
      BT_CHROMA_DC: begin
        pos = 4'd0;
        blk = desc.blk + {3'b0, k[1:0]};
      end
      default: ;
    endcase
  end

  assign busy     = addr_act | d_act;
  assign mem_re   = addr_act;
  assign mem_addr = {blk, pos[3:1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      desc <= '{btype: BT_LUMA4x4, blk: '0};
      k <= '0; addr_act <= 1'b0; d_act <= 1'b0; d_half <= 1'b0; d_last <= 1'b0;
    end else begin
      d_act  <= addr_act;
      d_half <= pos[0];
      d_last <= addr_act && (k == 5'd0);
      if (start && !busy) begin
        desc     <= desc_in;
        k        <= max_coeff(desc_in.btype) - 5'd1;
        addr_act <= 1'b1;
      end else if (addr_act) begin
        if (k == 5'd0) addr_act <= 1'b0;
        else           k <= k - 5'd1;
      end
    end
  end

  // level detector
  logic [COEF_W-1:0] coef;
  logic              nz, is_one;
  assign coef   = d_half ? mem_rdata[31:16] : mem_rdata[15:0];
  assign nz     = (coef != '0);
  assign is_one = (coef == COEF_W'(1)) || (coef == {COEF_W{1'b1}});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      found <= 1'b0; t1_open <= 1'b1; t1_cnt <= '0; run_acc <= '0;
    end else if (start && !busy) begin
      found <= 1'b0; t1_open <= 1'b1; t1_cnt <= '0; run_acc <= '0;
    end else if (d_act) begin
      if (nz) begin
        found   <= 1'b1;
        run_acc <= '0;
        if (t1_open && is_one && t1_cnt != 2'd3) t1_cnt <= t1_cnt + 2'd1;
        else                                     t1_open <= 1'b0;
      end else if (found) begin
        run_acc <= run_acc + 4'd1;
      end
    end
  end

  assign sb_clr    = start && !busy;
  assign sb_desc   = desc_in;
  assign sb_tc_inc = d_act && nz;
  assign sb_lvl    = coef;
  assign sb_run_we = d_act && nz && found;
  assign sb_run    = run_acc;
  assign sb_t1_inc = d_act && nz && t1_open && is_one && (t1_cnt != 2'd3);
  assign sb_tz_inc = d_act && !nz && found;
  assign done      = d_act && d_last;
endmodule
