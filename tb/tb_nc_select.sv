// tb_nc_select: nC for every block of a sequence of macroblocks on a 3-wide picture. The
// testbench writes random total coefficients for the blocks of each macroblock, asks for nC
// of each block (after its left and upper neighbours are written, as in coding order), and
// compares with nC worked out from a picture-wide map of counts, using the real upper
// total coefficient memory for the row above.
// A watchdog counts a failure and ends the run after 50,000 clock cycles.
module tb_nc_select;
  import entropy_pkg::*;
  localparam int W = 3, H = 3;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        ctx_load = 1'b0, ctx_store = 1'b0, left_avail = 1'b0, up_avail = 1'b0, ctx_busy;
  logic [6:0]  mb_x = '0;
  logic        tc_we = 1'b0;
  logic [4:0]  tc_blk = '0, tc_val = '0, nc;
  blk_desc_t   desc = '{btype: BT_LUMA4x4, blk: '0};
  nc_class_e   nc_class;
  logic        mem_en, mem_we;
  logic [7:0]  mem_addr;
  logic [19:0] mem_wdata, mem_rdata;
  int tl [H*4][W*4];
  int tch [2][H*2][W*2];
  int checks = 0, failures = 0;

  nc_select dut (.*);
  upper_tc_mem u_mem (.clk, .en(mem_en), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata), .rdata(mem_rdata));
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int pred(int a, bit ha, int b, bit hb);
    if (ha && hb) return (a + b + 1) >> 1;
    if (ha) return a;
    if (hb) return b;
    return 0;
  endfunction

  function automatic int cls_of(int v);
    return (v < 2) ? 0 : (v < 4) ? 1 : (v < 8) ? 2 : 3;
  endfunction

  task automatic check_blk(blk_desc_t d, int e);
    desc = d;
    #1;
    checks++;
    if ((d.btype != BT_CHROMA_DC && int'(nc) != e) || int'(nc_class) != ((d.btype == BT_CHROMA_DC) ? 4 : cls_of(e))) begin
      failures++;
      $display("type %0d blk %0d: nC %0d class %0d, expected %0d", d.btype, d.blk, nc, nc_class, e);
    end
  endtask

  initial begin
    @(posedge clk); rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1;
    for (int my = 0; my < H; my++)
      for (int mx = 0; mx < W; mx++) begin
        mb_x <= 7'(mx); left_avail <= (mx > 0); up_avail <= (my > 0);
        ctx_load <= 1'b1;
        @(posedge clk);
        ctx_load <= 1'b0;
        @(posedge clk);
        while (ctx_busy) @(posedge clk);
        for (int b = 0; b < 24; b++) begin
          int x, y, gx, gy, v, e, cc;
          v = $urandom % 17;
          if (b < 16) begin
            x = ((b >> 2) & 1) * 2 + (b & 1); y = ((b >> 3) & 1) * 2 + ((b >> 1) & 1);
            gx = mx * 4 + x; gy = my * 4 + y;
            e = pred((gx > 0) ? tl[gy][gx-1] : 0, gx > 0, (gy > 0) ? tl[gy-1][gx] : 0, gy > 0);
            check_blk('{btype: BT_LUMA4x4, blk: 5'(b)}, e);
            if (b == 0) check_blk('{btype: BT_LUMA_DC, blk: 5'd0}, e);
            tl[gy][gx] = v;
          end else begin
            cc = (b - 16) / 4;
            x = (b - 16) % 2; y = ((b - 16) % 4) / 2;
            gx = mx * 2 + x; gy = my * 2 + y;
            v = v % 16;
            e = pred((gx > 0) ? tch[cc][gy][gx-1] : 0, gx > 0, (gy > 0) ? tch[cc][gy-1][gx] : 0, gy > 0);
            check_blk('{btype: BT_CHROMA_AC, blk: 5'(b)}, e);
            if (b == 16 || b == 20) check_blk('{btype: BT_CHROMA_DC, blk: 5'(b)}, 0);
            tch[cc][gy][gx] = v;
          end
          tc_we <= 1'b1; tc_blk <= 5'(b); tc_val <= 5'(v);
          @(posedge clk);
          tc_we <= 1'b0;
        end
        ctx_store <= 1'b1;
        @(posedge clk);
        ctx_store <= 1'b0;
        @(posedge clk);
        while (ctx_busy) @(posedge clk);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
