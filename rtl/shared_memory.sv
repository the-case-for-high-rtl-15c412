// shared_memory: the globally shared memory that software and hardware
// threads reach over the system bus.
//
// A word-wide single-port RAM with a bus slave port. Each transaction takes
// one cycle inside the memory: the select is seen at a clock edge, the write
// is done or the read data registered at that edge, and ack is raised for the
// following cycle. Byte address bits [1:0] are ignored (word accesses only);
// addresses wrap modulo the memory size.
//
// The document shows a shared memory on the system bus and says threads
// access global data through it; its size, its latency and the word-only
// access are this design's own choices. The memory is not reset.
module shared_memory
  import hthreads_pkg::*;
#(
  parameter int unsigned WORDS = 16384
) (
  input  logic     clk,
  input  logic     rst,
  input  bus_req_t bus_req,
  output bus_rsp_t bus_rsp
);

  localparam int unsigned IW = $clog2(WORDS);

  logic [DW-1:0] mem [WORDS];
  logic [IW-1:0] widx;
  logic          ack_q;
  logic [DW-1:0] rdata_q;
  assign widx    = bus_req.addr[IW+1:2];
  assign bus_rsp = '{ack: ack_q, rdata: rdata_q};

  always_ff @(posedge clk) begin
    if (bus_req.req && !ack_q) begin
      if (bus_req.we) mem[widx] <= bus_req.wdata;
      else            rdata_q <= mem[widx];
    end
  end

  always_ff @(posedge clk) begin
    if (rst) ack_q <= 1'b0;
    else     ack_q <= bus_req.req && !ack_q;
  end

endmodule
