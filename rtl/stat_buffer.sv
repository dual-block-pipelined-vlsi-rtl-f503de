// stat_buffer: one statistic buffer of the ping-pong pair between the scan and coding phases.
// It holds what the level detector extracts from one block: the TC (total coefficient),
// T1 (trailing ones) and TR (total zeros) counters, a level FIFO and a run FIFO, plus the
// descriptor of the block. Entries are written in reverse zig-zag order (highest frequency
// first), which is the order in which CAVLC codes them; the FIFOs are read by index so the
// coding engine can step through them.
// Interface: clr (with desc_in) empties the buffer at the start of a scan; tc_inc pushes
// lvl_in into the level FIFO and counts it; run_we pushes run_in as the run of the previous
// nonzero coefficient; t1_inc and tz_inc bump their counters. Reads are combinational.
// Timing: all writes take effect at the clock edge; a clr and the first push of the next
// block may not share a cycle (clr wins). Reads have no latency.
// From the published design: the TC, T1 and TR counters with a run FIFO and a level FIFO, two
// buffers used in ping-pong. The indexed read and the 16-entry depth are this design's.
module stat_buffer
  import entropy_pkg::*;
#(
  parameter int unsigned DEPTH = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  blk_desc_t         desc_in,
  input  logic              tc_inc,
  input  logic [COEF_W-1:0] lvl_in,
  input  logic              run_we,
  input  logic [3:0]        run_in,
  input  logic              t1_inc,
  input  logic              tz_inc,
  input  logic [3:0]        lvl_idx,
  input  logic [3:0]        run_idx,
  output blk_desc_t         desc,
  output logic [4:0]        tc,
  output logic [1:0]        t1,
  output logic [3:0]        tz,
  output logic [COEF_W-1:0] lvl_out,
  output logic [3:0]        run_out
);
  logic [COEF_W-1:0] lvl_fifo [DEPTH];
  logic [3:0]        run_fifo [DEPTH];
  logic [3:0]        run_wp;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tc <= '0; t1 <= '0; tz <= '0; run_wp <= '0;
      desc <= '{btype: BT_LUMA4x4, blk: '0};
    end else if (clr) begin
      tc <= '0; t1 <= '0; tz <= '0; run_wp <= '0;
      desc <= desc_in;
    end else begin
      if (tc_inc) tc <= tc + 5'd1;
      if (t1_inc) t1 <= t1 + 2'd1;
      if (tz_inc) tz <= tz + 4'd1;
      if (run_we) run_wp <= run_wp + 4'd1;
    end
  end

  always_ff @(posedge clk) begin
    if (!clr && tc_inc) lvl_fifo[tc[3:0]] <= lvl_in;
    if (!clr && run_we) run_fifo[run_wp] <= run_in;
  end

  assign lvl_out = lvl_fifo[lvl_idx];
  assign run_out = run_fifo[run_idx];
endmodule
