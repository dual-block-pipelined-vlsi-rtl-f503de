// nc_select: table selection for coeff_token. It keeps the total coefficient (TC) of every
// 4x4 block of the current macroblock, of the right column of the left macroblock and of the
// bottom row of the upper macroblock, and forms nC for the block being coded:
// nC = (nA+nB+1)>>1 when both neighbours are available, the one available count otherwise,
// 0 when neither is; chroma DC uses nC = -1. nC picks the table class (VLC0/1/2, FLC).
// The upper row comes from upper_tc_mem: on ctx_load the two words of this macroblock column
// are read (3 cycles); on ctx_store the bottom row is written back and the right column is
// kept as the next left neighbour (2 cycles). ctx_busy is high during both.
// Neighbour availability across macroblocks (slice edges, picture edges) is given by the
// caller through left_avail/up_avail; this is a choice of this design.
// From the published design: a table selection unit fed by neighbouring total coefficients
// and an upper total coefficient memory of 160 x 20. The nC rule follows the H.264 standard;
// the two-words-per-column layout and the load/store sequence are this design's own.
module nc_select
  import entropy_pkg::*;
#(
  parameter int unsigned MEM_DEPTH = 160,
  localparam int unsigned AW = $clog2(MEM_DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          ctx_load,
  input  logic          ctx_store,
  input  logic [AW-2:0] mb_x,
  input  logic          left_avail,
  input  logic          up_avail,
  output logic          ctx_busy,
  // TC of a block just coded (or skipped) in the current macroblock
  input  logic          tc_we,
  input  logic [4:0]    tc_blk,
  input  logic [4:0]    tc_val,
  // block being coded
  input  blk_desc_t     desc,
  output nc_class_e     nc_class,
  output logic [4:0]    nc,
  // upper_tc_mem port
  output logic          mem_en,
  output logic          mem_we,
  output logic [AW-1:0] mem_addr,
  output logic [19:0]   mem_wdata,
  input  logic [19:0]   mem_rdata
);
  logic [4:0] cur_tc  [24];
  logic [4:0] left_tc [8];   // 0..3 luma rows, 4..5 Cb rows, 6..7 Cr rows
  logic [4:0] up_tc   [8];   // 0..3 luma columns, 4..5 Cb columns, 6..7 Cr columns
  logic       lft_ok, up_ok;

  typedef enum logic [2:0] {C_IDLE, C_LD0, C_LD1, C_LD2, C_ST0, C_ST1} cstate_e;
  cstate_e cst;
  assign ctx_busy = (cst != C_IDLE);

  logic [4:0] blk_l [4];  // luma block index of the bottom row / right column
  always_comb begin
    for (int n = 0; n < 4; n++) blk_l[n] = {1'b0, luma_blk_idx(2'(n), 2'd3)};
  end

  always_comb begin
    mem_en = 1'b0; mem_we = 1'b0; mem_addr = '0; mem_wdata = '0;
    unique case (cst)
      C_LD0: begin mem_en = 1'b1; mem_addr = {mb_x, 1'b0}; end
      C_LD1: begin mem_en = 1'b1; mem_addr = {mb_x, 1'b1}; end
      C_ST0: begin
        mem_en = 1'b1; mem_we = 1'b1; mem_addr = {mb_x, 1'b0};
        mem_wdata = {cur_tc[blk_l[3]], cur_tc[blk_l[2]], cur_tc[blk_l[1]], cur_tc[blk_l[0]]};
      end
      C_ST1: begin
        mem_en = 1'b1; mem_we = 1'b1; mem_addr = {mb_x, 1'b1};
        mem_wdata = {cur_tc[23], cur_tc[22], cur_tc[19], cur_tc[18]};
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cst <= C_IDLE; lft_ok <= 1'b0; up_ok <= 1'b0;
      for (int n = 0; n < 24; n++) cur_tc[n] <= '0;
      for (int n = 0; n < 8; n++) begin left_tc[n] <= '0; up_tc[n] <= '0; end
    end else begin
      unique case (cst)
        C_IDLE: begin
          if (ctx_store)     cst <= C_ST0;
          else if (ctx_load) begin
            cst <= C_LD0;
            lft_ok <= left_avail;
            up_ok  <= up_avail;
            for (int n = 0; n < 24; n++) cur_tc[n] <= '0;
          end
        end
        C_LD0: cst <= C_LD1;
        C_LD1: begin
          cst <= C_LD2;
          for (int n = 0; n < 4; n++) up_tc[n] <= mem_rdata[5*n +: 5];
        end
        C_LD2: begin
          cst <= C_IDLE;
          for (int n = 0; n < 4; n++) up_tc[4+n] <= mem_rdata[5*n +: 5];
        end
        C_ST0: cst <= C_ST1;
        C_ST1: begin
          cst <= C_IDLE;
          for (int n = 0; n < 4; n++) left_tc[n] <= cur_tc[{1'b0, luma_blk_idx(2'd3, 2'(n))}];
          left_tc[4] <= cur_tc[17]; left_tc[5] <= cur_tc[19];
          left_tc[6] <= cur_tc[21]; left_tc[7] <= cur_tc[23];
        end
        default: cst <= C_IDLE;
      endcase
      if (tc_we) cur_tc[tc_blk] <= tc_val;
    end
  end

  // neighbour look-up
  logic [4:0] na, nb;
  logic       ha, hb;
  logic [3:0] lb;
  logic [1:0] x, y;
  logic       comp;
  always_comb begin
    na = '0; nb = '0; ha = 1'b0; hb = 1'b0;
    lb = (desc.btype == BT_LUMA_DC) ? 4'd0 : desc.blk[3:0];
    x = {lb[2], lb[0]};
    y = {lb[3], lb[1]};
    comp = desc.blk[2];
    if (desc.btype == BT_CHROMA_AC) begin
      x = {1'b0, desc.blk[0]};
      y = {1'b0, desc.blk[1]};
      if (x != 2'd0) begin ha = 1'b1; na = cur_tc[{2'b10, comp, y[0], 1'b0}]; end
      else if (lft_ok) begin ha = 1'b1; na = left_tc[{1'b1, comp, y[0]}]; end
      if (y != 2'd0) begin hb = 1'b1; nb = cur_tc[{2'b10, comp, 1'b0, x[0]}]; end
      else if (up_ok) begin hb = 1'b1; nb = up_tc[{1'b1, comp, x[0]}]; end
    end else begin
      if (x != 2'd0) begin ha = 1'b1; na = cur_tc[{1'b0, luma_blk_idx(x - 2'd1, y)}]; end
      else if (lft_ok) begin ha = 1'b1; na = left_tc[{1'b0, y}]; end
      if (y != 2'd0) begin hb = 1'b1; nb = cur_tc[{1'b0, luma_blk_idx(x, y - 2'd1)}]; end
      else if (up_ok) begin hb = 1'b1; nb = up_tc[{1'b0, x}]; end
    end
    if (ha && hb)  nc = 5'((6'(na) + 6'(nb) + 6'd1) >> 1);
    else if (ha)   nc = na;
    else if (hb)   nc = nb;
    else           nc = '0;
    if (desc.btype == BT_CHROMA_DC) nc_class = NC_CDC;
    else if (nc < 5'd2)             nc_class = NC_VLC0;
    else if (nc < 5'd4)             nc_class = NC_VLC1;
    else if (nc < 5'd8)             nc_class = NC_VLC2;
    else                            nc_class = NC_FLC;
  end
endmodule
