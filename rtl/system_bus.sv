// system_bus: the shared system bus that connects the CPU, the hardware
// thread interfaces and the hthreads service cores.
//
// One transaction is on the bus at a time. A master raises req with we,
// addr and wdata and holds them until it sees a one-cycle ack; it must drop
// req in the cycle after the ack. When the bus is free, a round-robin
// arbiter picks one requesting master (starting after the previous owner)
// and locks the grant until the addressed slave acks. The slave is chosen by
// addr[31:28] (memory, Thread Manager, Scheduler, Mutex Manager, HWTI); for
// the HWTI region addr[14:8] picks the HWTI. An address that maps to no
// slave is acked by the bus itself one cycle after the grant, with rdata 0,
// so that a stray access cannot hang the system.
//
// Timing: request seen at clock edge n -> grant at n+1 -> slave sees its
// select from cycle n+1 on. A single-cycle slave therefore completes a read
// or write in three cycles of bus occupancy.
//
// The document names the system bus (the OPB and PLB buses of its FPGA
// platform) but not its protocol; the handshake, the arbiter and the address
// map here are this design's own.
module system_bus
  import hthreads_pkg::*;
#(
  parameter int unsigned NUM_MASTERS = 4,
  parameter int unsigned NUM_HWTI    = 2
) (
  input  logic     clk,
  input  logic     rst,
  input  bus_req_t m_req [NUM_MASTERS],
  output bus_rsp_t m_rsp [NUM_MASTERS],
  // slaves
  output bus_req_t mem_req,
  input  bus_rsp_t mem_rsp,
  output bus_req_t tm_req,
  input  bus_rsp_t tm_rsp,
  output bus_req_t sched_req,
  input  bus_rsp_t sched_rsp,
  output bus_req_t mtx_req,
  input  bus_rsp_t mtx_rsp,
  output bus_req_t hwti_req [NUM_HWTI],
  input  bus_rsp_t hwti_rsp [NUM_HWTI]
);

  localparam int unsigned MI_W = (NUM_MASTERS > 1) ? $clog2(NUM_MASTERS) : 1;
  localparam int unsigned HI_W = (NUM_HWTI > 1) ? $clog2(NUM_HWTI) : 1;

  logic            busy;
  logic [MI_W-1:0] owner;
  logic [MI_W-1:0] last;
  logic            unmapped_ack;

  bus_req_t cur;
  bus_rsp_t srsp;
  logic     any_req;
  logic [MI_W-1:0] pick;

  // round-robin choice among requesting masters
  always_comb begin
    any_req = 1'b0;
    pick    = '0;
    for (int unsigned k = 1; k <= NUM_MASTERS; k++) begin
      int unsigned idx;
      idx = (int'(last) + k) % NUM_MASTERS;
      if (!any_req && m_req[idx].req) begin
        any_req = 1'b1;
        pick    = MI_W'(idx);
      end
    end
  end

  // the granted master's request, gated by the grant
  always_comb begin
    cur = m_req[owner];
    cur.req = busy && m_req[owner].req;
  end

  // address decode
  logic [3:0] region;
  logic [6:0] hidx;
  logic       mapped;
  assign region = cur.addr[31:28];
  assign hidx   = cur.addr[14:8];
  assign mapped = (region == REGION_MEM) || (region == REGION_TM) ||
                  (region == REGION_SCHED) || (region == REGION_MUTEX) ||
                  ((region == REGION_HWTI) && (int'(hidx) < NUM_HWTI));

  always_comb begin
    mem_req   = cur;  mem_req.req   = cur.req && (region == REGION_MEM);
    tm_req    = cur;  tm_req.req    = cur.req && (region == REGION_TM);
    sched_req = cur;  sched_req.req = cur.req && (region == REGION_SCHED);
    mtx_req   = cur;  mtx_req.req   = cur.req && (region == REGION_MUTEX);
    for (int unsigned h = 0; h < NUM_HWTI; h++) begin
      hwti_req[h]     = cur;
      hwti_req[h].req = cur.req && (region == REGION_HWTI) && (int'(hidx) == h);
    end
  end

  always_comb begin
    srsp = '0;
    unique case (region)
      REGION_MEM:   srsp = mem_rsp;
      REGION_TM:    srsp = tm_rsp;
      REGION_SCHED: srsp = sched_rsp;
      REGION_MUTEX: srsp = mtx_rsp;
      REGION_HWTI:  if (int'(hidx) < NUM_HWTI) srsp = hwti_rsp[hidx[HI_W-1:0]];
      default:      srsp = '0;
    endcase
    if (unmapped_ack) srsp = '{ack: 1'b1, rdata: '0};
  end

  always_comb begin
    for (int unsigned i = 0; i < NUM_MASTERS; i++) begin
      m_rsp[i].rdata = srsp.rdata;
      m_rsp[i].ack   = busy && (int'(owner) == i) && srsp.ack;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy         <= 1'b0;
      owner        <= '0;
      last         <= MI_W'(NUM_MASTERS - 1);
      unmapped_ack <= 1'b0;
    end else begin
      unmapped_ack <= 1'b0;
      if (!busy) begin
        if (any_req) begin
          busy  <= 1'b1;
          owner <= pick;
          last  <= pick;
        end
      end else begin
        if (srsp.ack) busy <= 1'b0;
        else if (cur.req && !mapped && !unmapped_ack) unmapped_ack <= 1'b1;
      end
    end
  end

  // a master must hold its request, unchanged, through the ack cycle
  property p_hold;
    @(posedge clk) disable iff (rst)
      (cur.req && !srsp.ack) |=> cur.req;
  endproperty
  a_hold: assert property (p_hold) else $error("system_bus: master dropped req before ack");

endmodule
