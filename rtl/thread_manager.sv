// thread_manager: the table of all threads in the system and the gate
// through which threads become ready to run.
//
// Per thread id the manager keeps a state (UNUSED, CREATED, READY, EXITED),
// a priority, and whether the thread is a hardware thread and on which HWTI
// it lives. Service calls are single bus reads whose address carries the
// operation, the thread id and an operand (see hthreads_pkg):
//   CREATE  allocates the lowest unused id, stores the attributes given in
//           the operand {is_hw[15], hwti[14:8], prio[3:0]} and returns
//           {1'b1, 23'b0, id}, or 0 when the table is full.
//   ADD     marks the thread READY and sends it, with its attributes, to the
//           Scheduler.
//   EXIT    marks the thread EXITED (a joining thread polls STATUS).
//   STATUS  returns the thread's state.
//   FREE    returns the id to the unused pool (after a join).
// The Mutex Manager also sends add_thread messages (a thread that was
// blocked on a mutex now owns it); these are handled like ADD and take
// precedence over a bus call in the same cycle.
//
// Timing: a call is acked in the cycle after its select, unless the message
// register towards the Scheduler is still occupied. A message reaches the
// Scheduler one cycle after it is accepted.
//
// The document gives this block's role in the unlock sequence (receiving
// add_thread from the Mutex Manager and passing the thread on to the
// Scheduler). The table layout, the operations and their encodings are this
// design's own; thread-id width 8 (256 threads) is chosen so that the
// 250-thread configuration the document measures fits.
module thread_manager
  import hthreads_pkg::*;
#(
  parameter int unsigned NUM_THREADS = 256
) (
  input  logic        clk,
  input  logic        rst,
  input  bus_req_t    bus_req,
  output bus_rsp_t    bus_rsp,
  // from the Mutex Manager
  input  logic        mtx_add_valid,
  output logic        mtx_add_ready,
  input  tid_t        mtx_add_tid,
  // to the Scheduler
  output logic        sched_add_valid,
  input  logic        sched_add_ready,
  output add_thread_t sched_add
);

  localparam int unsigned TW = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1;

  thread_state_e         state [NUM_THREADS];
  logic [PRIO_W-1:0]     prio  [NUM_THREADS];
  logic                  is_hw [NUM_THREADS];
  logic [HWTI_IDX_W-1:0] hwti  [NUM_THREADS];

  logic          ack_q;
  logic [DW-1:0] rdata_q;
  assign bus_rsp = '{ack: ack_q, rdata: rdata_q};

  logic [3:0]  op;
  tid_t        tid;
  logic [15:0] operand;
  assign op      = bus_req.addr[27:24];
  assign tid     = bus_req.addr[23:16];
  assign operand = bus_req.addr[15:0];

  logic out_free;
  assign out_free      = !sched_add_valid || sched_add_ready;
  assign mtx_add_ready = out_free;

  logic start;
  assign start = bus_req.req && !ack_q && out_free && !mtx_add_valid;

  // lowest unused id
  logic          free_found;
  logic [TW-1:0] free_id;
  always_comb begin
    free_found = 1'b0;
    free_id    = '0;
    for (int i = NUM_THREADS - 1; i >= 0; i--) begin
      if (state[i] == TS_UNUSED) begin
        free_found = 1'b1;
        free_id    = TW'(i);
      end
    end
  end

  function automatic add_thread_t make_msg(tid_t t, logic [PRIO_W-1:0] p, logic h,
                                           logic [HWTI_IDX_W-1:0] w);
    return '{tid: t, prio: p, is_hw: h, hwti: w};
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      ack_q           <= 1'b0;
      rdata_q         <= '0;
      sched_add_valid <= 1'b0;
      sched_add       <= '0;
      for (int unsigned i = 0; i < NUM_THREADS; i++) begin
        state[i] <= TS_UNUSED;
        prio[i]  <= '0;
        is_hw[i] <= 1'b0;
        hwti[i]  <= '0;
      end
    end else begin
      ack_q <= 1'b0;
      if (sched_add_valid && sched_add_ready) sched_add_valid <= 1'b0;

      if (mtx_add_valid && mtx_add_ready) begin
        state[mtx_add_tid[TW-1:0]] <= TS_READY;
        sched_add_valid <= 1'b1;
        sched_add <= make_msg(mtx_add_tid, prio[mtx_add_tid[TW-1:0]],
                              is_hw[mtx_add_tid[TW-1:0]], hwti[mtx_add_tid[TW-1:0]]);
      end else if (start) begin
        ack_q   <= 1'b1;
        rdata_q <= 32'd1;
        unique case (op)
          TM_OP_CREATE: begin
            if (free_found) begin
              state[free_id] <= TS_CREATED;
              prio[free_id]  <= operand[PRIO_W-1:0];
              is_hw[free_id] <= operand[15];
              hwti[free_id]  <= operand[14:8];
              rdata_q        <= {1'b1, 23'd0, tid_t'(free_id)};
            end else begin
              rdata_q <= '0;
            end
          end
          TM_OP_ADD: begin
            state[tid[TW-1:0]] <= TS_READY;
            sched_add_valid <= 1'b1;
            sched_add <= make_msg(tid, prio[tid[TW-1:0]], is_hw[tid[TW-1:0]],
                                  hwti[tid[TW-1:0]]);
          end
          TM_OP_EXIT:   state[tid[TW-1:0]] <= TS_EXITED;
          TM_OP_STATUS: rdata_q <= DW'(state[tid[TW-1:0]]);
          TM_OP_FREE:   state[tid[TW-1:0]] <= TS_UNUSED;
          default:      rdata_q <= '0;
        endcase
      end
    end
  end

endmodule
