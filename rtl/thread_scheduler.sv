// thread_scheduler: ready-to-run queue and scheduling decisions, made in
// hardware, in parallel with the CPU.
//
// Threads arrive as add_thread messages from the Thread Manager; the input
// is always ready. A software thread is put in the ready-to-run queue, a
// bitmap with one bit and one priority per thread id. The best ready thread
// (lowest priority number, then lowest id) is found by a combinational
// search over the whole bitmap, so the decision takes the same time however
// many threads are queued. The CPU takes that thread with a NEXT read, which
// also records the priority of the thread now running on the CPU.
//
// The CPU is interrupted (cpu_irq, cleared by IRQ_ACK) only when an arriving
// software thread has a higher priority than the thread running on the CPU
// and than every thread already in the queue. A CPU with no running thread
// (after IDLE, or a NEXT that found the queue empty) counts as running the
// lowest priority.
//
// A hardware thread is not queued: the Scheduler becomes a bus master and
// writes RUN into the command register of that thread's HWTI. Pending RUN
// commands are kept as one bit per HWTI and sent one at a time, lowest HWTI
// first, so the add_thread input never has to wait for the bus.
//
// Bus slave reads (address layout in hthreads_pkg):
//   NEXT     returns {valid[31], 19'b0, prio[11:8], id[7:0]} and dequeues
//   STATUS   returns {irq[31], valid[30], 18'b0, prio[11:8], id[7:0]}
//   IDLE     CPU has no running thread
//   IRQ_ACK  clears cpu_irq
// Timing: a thread added at cycle t is in the queue, and can be returned by
// NEXT or raise cpu_irq, from cycle t+1. Slave calls are acked in the cycle
// after their select.
//
// The document gives the behaviour: decisions made ahead of time in
// hardware, constant decision time independent of the queue length, the
// interrupt rule above, and RUN sent to the HWTI instead of queueing a
// hardware thread. The bitmap search, the priority width and order, the tie
// break and the encodings are this design's own. The document reports 240
// clock cycles for its scheduler's decision; this design decides in one.
module thread_scheduler
  import hthreads_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 256,
  parameter int unsigned NUM_HWTI    = 2
) (
  input  logic        clk,
  input  logic        rst,
  // add_thread from the Thread Manager
  input  logic        add_valid,
  output logic        add_ready,
  input  add_thread_t add,
  // slave port (CPU calls)
  input  bus_req_t    s_req,
  output bus_rsp_t    s_rsp,
  // master port (RUN commands to HWTIs)
  output bus_req_t    m_req,
  input  bus_rsp_t    m_rsp,
  // preemption interrupt to the CPU
  output logic        cpu_irq
);

  localparam int unsigned TW = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1;
  localparam int unsigned HI_W = (NUM_HWTI > 1) ? $clog2(NUM_HWTI) : 1;

  logic              ready_q [NUM_THREADS];
  logic [PRIO_W-1:0] rprio   [NUM_THREADS];
  logic              cpu_busy;
  logic [PRIO_W-1:0] cpu_prio;
  logic [NUM_HWTI-1:0] hw_pending;

  assign add_ready = 1'b1;

  // ---------------------------------------------------- best ready thread
  logic              best_valid;
  logic [TW-1:0]     best_id;
  logic [PRIO_W-1:0] best_prio;
  always_comb begin
    best_valid = 1'b0;
    best_id    = '0;
    best_prio  = '1;
    for (int i = 0; i < NUM_THREADS; i++) begin
      if (ready_q[i] && (!best_valid || rprio[i] < best_prio)) begin
        best_valid = 1'b1;
        best_id    = TW'(i);
        best_prio  = rprio[i];
      end
    end
  end

  // an arriving software thread preempts the CPU
  logic add_sw, add_hw, preempt;
  assign add_sw  = add_valid && !add.is_hw;
  assign add_hw  = add_valid && add.is_hw;
  assign preempt = add_sw && (!cpu_busy || add.prio < cpu_prio) &&
                   (!best_valid || add.prio < best_prio);

  // ---------------------------------------------------- slave port
  logic          ack_q;
  logic [DW-1:0] rdata_q;
  logic [3:0]    op;
  logic          start;
  assign s_rsp = '{ack: ack_q, rdata: rdata_q};
  assign op    = s_req.addr[27:24];
  assign start = s_req.req && !ack_q;

  logic dequeue;
  assign dequeue = start && (op == SCHED_OP_NEXT) && best_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int unsigned i = 0; i < NUM_THREADS; i++) begin
        ready_q[i] <= 1'b0;
        rprio[i]   <= '0;
      end
      cpu_busy <= 1'b0;
      cpu_prio <= '1;
      cpu_irq  <= 1'b0;
      ack_q    <= 1'b0;
      rdata_q  <= '0;
    end else begin
      ack_q <= 1'b0;
      if (dequeue) ready_q[best_id] <= 1'b0;
      if (add_sw) begin
        ready_q[add.tid[TW-1:0]] <= 1'b1;
        rprio[add.tid[TW-1:0]]   <= add.prio;
      end
      if (preempt) cpu_irq <= 1'b1;

      if (start) begin
        ack_q   <= 1'b1;
        rdata_q <= '0;
        unique case (op)
          SCHED_OP_NEXT: begin
            if (best_valid) begin
              rdata_q  <= {1'b1, 19'd0, 4'(best_prio), tid_t'(best_id)};
              cpu_busy <= 1'b1;
              cpu_prio <= best_prio;
            end else begin
              cpu_busy <= 1'b0;
            end
          end
          SCHED_OP_STATUS:
            rdata_q <= {cpu_irq, best_valid, 18'd0, 4'(best_prio), tid_t'(best_id)};
          SCHED_OP_IDLE: cpu_busy <= 1'b0;
          SCHED_OP_IRQ_ACK: if (!preempt) cpu_irq <= 1'b0;
          default: ;
        endcase
      end
    end
  end

  // ---------------------------------------------------- master port
  logic          m_active;
  logic [HI_W-1:0] m_target;
  logic          pend_any;
  logic [HI_W-1:0] pend_idx;
  always_comb begin
    pend_any = 1'b0;
    pend_idx = '0;
    for (int h = NUM_HWTI - 1; h >= 0; h--) begin
      if (hw_pending[h]) begin
        pend_any = 1'b1;
        pend_idx = HI_W'(h);
      end
    end
  end

  always_comb begin
    m_req.req   = m_active;
    m_req.we    = 1'b1;
    m_req.addr  = HWTI_BASE + HWTI_STRIDE * AW'(m_target) + AW'({HWTI_REG_COMMAND, 2'b00});
    m_req.wdata = CMD_RUN;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hw_pending <= '0;
      m_active   <= 1'b0;
      m_target   <= '0;
    end else begin
      if (m_active && m_rsp.ack) begin
        m_active <= 1'b0;
      end else if (!m_active && pend_any) begin
        m_active <= 1'b1;
        m_target <= pend_idx;
        hw_pending[pend_idx] <= 1'b0;
      end
      // a new RUN request wins over the clear of the same bit
      if (add_hw) hw_pending[add.hwti[HI_W-1:0]] <= 1'b1;
    end
  end

endmodule
