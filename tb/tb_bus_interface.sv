// tb_bus_interface: a queue model of the bitstream buffer feeds the bus interface while a
// random producer adds words. Checks: a request only with a full burst buffered or a drain
// request, burst length BURST_LEN (shorter only when draining), consecutive word
// addresses from the loaded base, data order, the wlast flag, and bus_urgent when full.
// A watchdog counts a failure and ends the run after 30,000 clock cycles.
module tb_bus_interface;
  localparam int BL = 16;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic        addr_load = 1'b0, drain_req = 1'b0;
  logic [31:0] base_addr = 32'h0008_0000;
  logic [6:0]  buf_count;
  logic        buf_empty, buf_full, buf_last, buf_pop;
  logic [31:0] buf_data;
  logic [2:0]  buf_bytes;
  logic        bus_req, bus_gnt = 1'b0, bus_wvalid, bus_wready, bus_wlast, bus_nal_end, bus_urgent;
  logic [31:0] bus_waddr, bus_wdata;
  logic [2:0]  bus_nal_bytes;
  logic [31:0] q[$];
  int checks = 0, failures = 0, sent = 0, consumed = 0, in_burst = 0, n_urgent = 0, n_short = 0;

  bus_interface #(.BURST_LEN(BL), .AW(6)) dut (.*);
  always #5 clk = ~clk;

  assign buf_count = 7'(q.size());
  assign buf_empty = (q.size() == 0);
  assign buf_full  = (q.size() == 64);
  assign buf_data  = (q.size() > 0) ? q[0] : 32'd0;
  assign buf_last  = 1'b0;
  assign buf_bytes = 3'd4;
  logic wr_rnd = 1'b1;
  always @(posedge clk) wr_rnd <= ($urandom % 3 != 0);
  assign bus_wready = wr_rnd;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit started = 0;
  always @(posedge clk) begin
    if (started) begin
      if (bus_req && !bus_gnt) begin
        checks++;
        if (q.size() < BL && !drain_req) begin failures++; $display("request without a burst"); end
      end
      bus_gnt <= bus_req && !bus_gnt && ($urandom % 3 == 0);
      if (bus_urgent) n_urgent++;
      if (buf_pop) begin
        checks++;
        if (bus_wdata != 32'(consumed) || bus_waddr != base_addr + 32'(4 * consumed)) begin
          failures++;
          $display("beat %0d: data %0d addr %h", consumed, bus_wdata, bus_waddr);
        end
        consumed++;
        in_burst++;
        if (bus_wlast) begin
          checks++;
          if (in_burst != BL && !(drain_req && in_burst < BL)) begin failures++; $display("burst of %0d", in_burst); end
          if (in_burst < BL) n_short++;
          in_burst = 0;
        end
        void'(q.pop_front());
      end
    end
  end

  initial begin
    @(posedge clk); rst_n <= 1'b0; @(posedge clk); rst_n <= 1'b1;
    addr_load <= 1'b1; @(posedge clk); addr_load <= 1'b0;
    started = 1;
    for (int c = 0; c < 6000; c++) begin
      @(negedge clk);
      if (q.size() < 64 && ($urandom % ((c < 3000) ? 2 : 5) == 0)) begin q.push_back(32'(sent)); sent++; end
      if (c >= 1000 && c < 1300) force bus_gnt = 1'b0; else release bus_gnt;
    end
    drain_req <= 1'b1;
    while (q.size() != 0) @(posedge clk);
    repeat (3) @(posedge clk);
    checks++;
    if (consumed != sent) begin failures++; $display("%0d words sent, %0d written", sent, consumed); end
    checks++;
    if (n_urgent == 0) begin failures++; $display("buffer never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
