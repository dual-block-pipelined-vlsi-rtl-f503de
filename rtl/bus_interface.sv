// bus_interface: moves EBSP words from the bitstream buffer to the system buffer in bursts.
// It requests the bus when a full burst (BURST_LEN words) is buffered, or when the caller
// asks for the rest to be drained (end of a NAL unit). After the grant it writes the burst,
// one word per accepted beat, at consecutive word addresses starting from a base address
// the system sets. When the buffer is full it raises bus_urgent, the exceptional condition in
// which the coding core is halted and the bus is asked to serve the engine at once.
// The burst length and the bus handshake (req/gnt, then valid/ready beats with a last flag)
// are choices of this design; the document only names the bus interface.
// Timing: the request goes out the cycle after the condition holds; after the grant one
// word moves per cycle in which bus_wready is high. Data, last flag and byte count are the
// buffer's head word passed straight through, so those outputs follow the buffer's outputs.
module bus_interface #(
  parameter int unsigned BURST_LEN = 16,
  parameter int unsigned AW = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        addr_load,
  input  logic [31:0] base_addr,
  input  logic        drain_req,
  // bitstream buffer read side
  input  logic [AW:0] buf_count,
  input  logic        buf_empty,
  input  logic        buf_full,
  input  logic [31:0] buf_data,
  input  logic        buf_last,
  input  logic [2:0]  buf_bytes,
  output logic        buf_pop,
  // system bus
  output logic        bus_req,
  input  logic        bus_gnt,
  output logic        bus_wvalid,
  input  logic        bus_wready,
  output logic [31:0] bus_waddr,
  output logic [31:0] bus_wdata,
  output logic        bus_wlast,
  output logic        bus_nal_end,
  output logic [2:0]  bus_nal_bytes,
  output logic        bus_urgent
);
  typedef enum logic [1:0] {B_IDLE, B_REQ, B_XFER} bstate_e;
  bstate_e     st;
  logic [AW:0] beats;
  logic [31:0] addr;

  assign bus_req       = (st == B_REQ);
  assign bus_wvalid    = (st == B_XFER) && !buf_empty;
  assign bus_waddr     = addr;
  assign bus_wdata     = buf_data;
  assign bus_wlast     = (beats == (AW+1)'(1));
  assign bus_nal_end   = buf_last;
  assign bus_nal_bytes = buf_bytes;
  assign bus_urgent    = buf_full;
  assign buf_pop       = bus_wvalid && bus_wready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= B_IDLE; beats <= '0; addr <= '0;
    end else begin
      if (addr_load) addr <= base_addr;
      unique case (st)
        B_IDLE: if ((buf_count >= (AW+1)'(BURST_LEN)) || (drain_req && !buf_empty)) st <= B_REQ;
        B_REQ: if (bus_gnt) begin
          st    <= B_XFER;
          beats <= (buf_count >= (AW+1)'(BURST_LEN)) ? (AW+1)'(BURST_LEN) : buf_count;
        end
        B_XFER: if (buf_pop) begin
          addr  <= addr + 32'd4;
          beats <= beats - 1'b1;
          if (beats == (AW+1)'(1)) st <= B_IDLE;
        end
        default: st <= B_IDLE;
      endcase
    end
  end
endmodule
