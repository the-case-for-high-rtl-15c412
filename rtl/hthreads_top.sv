// hthreads_top: the hthreads run-time system with its hardware threads.
//
// All parts meet on one shared system bus (system_bus). Bus masters, in
// arbitration order: 0 the CPU (outside this module; its bus port and its
// interrupt line are the ports of the top), 1 the Scheduler (it sends RUN
// commands to HWTIs), 2.. one HWTI per hardware thread. Bus slaves: the
// shared memory, the Thread Manager, the Scheduler, the Mutex Manager and
// the system-side registers of every HWTI. Besides the bus, two
// point-to-point channels carry add_thread messages: Mutex Manager ->
// Thread Manager (a blocked thread now owns a mutex) and Thread Manager ->
// Scheduler (a thread becomes ready). Each HWTI has one dwt_thread as its
// user logic.
//
// A mutex hand-over runs entirely in hardware: a thread unlocks a mutex
// that has waiters; the Mutex Manager makes the first waiter the owner and
// tells the Thread Manager, which passes the thread with its attributes to
// the Scheduler. A software thread enters the ready-to-run queue (and the
// CPU is interrupted only if it must preempt); a hardware thread is not
// queued, the Scheduler writes RUN to its HWTI and the thread resumes as the
// new owner.
//
// Address map: 0x0xxx_xxxx shared memory, 0x1xxx_xxxx Thread Manager,
// 0x2xxx_xxxx Scheduler, 0x3xxx_xxxx Mutex Manager, 0x4000_0000 + 0x100*i
// HWTI i. Service-call address layout: see hthreads_pkg.
//
// The block structure (CPU, mutexes, thread manager, thread scheduler,
// shared memory and hardware threads on a common bus) follows the
// document's system diagram; the document's CBIS and condition-variable
// cores are not part of this design. The number of hardware threads (two,
// as in the document's example) is a parameter.
module hthreads_top
  import hthreads_pkg::*;
#(
  parameter int unsigned NUM_HWTI    = 2,
  parameter int unsigned NUM_THREADS = 256,
  parameter int unsigned NUM_MUTEXES = 64,
  parameter int unsigned MEM_WORDS   = 16384,
  parameter int unsigned DWT_MAX_LEN = 256,
  parameter logic [31:0] DWT_LOCK_ID    = 32'd0,
  parameter logic [31:0] DWT_COUNT_ADDR = 32'h0000_0000
) (
  input  logic     clk,
  input  logic     rst,
  input  bus_req_t cpu_req,
  output bus_rsp_t cpu_rsp,
  output logic     cpu_irq
);

  localparam int unsigned NUM_MASTERS = 2 + NUM_HWTI;

  bus_req_t m_req [NUM_MASTERS];
  bus_rsp_t m_rsp [NUM_MASTERS];

  bus_req_t mem_req, tm_req, sched_req, mtx_req;
  bus_rsp_t mem_rsp, tm_rsp, sched_rsp, mtx_rsp;
  bus_req_t hwti_req [NUM_HWTI];
  bus_rsp_t hwti_rsp [NUM_HWTI];

  assign m_req[0] = cpu_req;
  assign cpu_rsp  = m_rsp[0];

  system_bus #(.NUM_MASTERS(NUM_MASTERS), .NUM_HWTI(NUM_HWTI)) u_bus (
    .clk, .rst,
    .m_req, .m_rsp,
    .mem_req, .mem_rsp,
    .tm_req, .tm_rsp,
    .sched_req, .sched_rsp,
    .mtx_req, .mtx_rsp,
    .hwti_req, .hwti_rsp
  );

  shared_memory #(.WORDS(MEM_WORDS)) u_mem (
    .clk, .rst, .bus_req(mem_req), .bus_rsp(mem_rsp)
  );

  logic        mtx_add_valid, mtx_add_ready;
  tid_t        mtx_add_tid;
  logic        sched_add_valid, sched_add_ready;
  add_thread_t sched_add;

  mutex_manager #(.NUM_MUTEXES(NUM_MUTEXES), .NUM_THREADS(NUM_THREADS)) u_mutex (
    .clk, .rst, .bus_req(mtx_req), .bus_rsp(mtx_rsp),
    .add_valid(mtx_add_valid), .add_ready(mtx_add_ready), .add_tid(mtx_add_tid)
  );

  thread_manager #(.NUM_THREADS(NUM_THREADS)) u_tm (
    .clk, .rst, .bus_req(tm_req), .bus_rsp(tm_rsp),
    .mtx_add_valid, .mtx_add_ready, .mtx_add_tid,
    .sched_add_valid, .sched_add_ready, .sched_add
  );

  thread_scheduler #(.NUM_THREADS(NUM_THREADS), .NUM_HWTI(NUM_HWTI)) u_sched (
    .clk, .rst,
    .add_valid(sched_add_valid), .add_ready(sched_add_ready), .add(sched_add),
    .s_req(sched_req), .s_rsp(sched_rsp),
    .m_req(m_req[1]), .m_rsp(m_rsp[1]),
    .cpu_irq
  );

  for (genvar h = 0; h < NUM_HWTI; h++) begin : g_hw
    user_status_e status;
    logic [31:0]  result;
    logic [7:0]   opcode;
    logic [31:0]  arg1, arg2;

    hwti u_hwti (
      .clk, .rst,
      .s_req(hwti_req[h]), .s_rsp(hwti_rsp[h]),
      .m_req(m_req[2+h]), .m_rsp(m_rsp[2+h]),
      .intrfc2thrd_status(status),
      .intrfc2thrd_result(result),
      .thrd2intrfc_opcode(opcode),
      .thrd2intrfc_argument_one(arg1),
      .thrd2intrfc_argument_two(arg2)
    );

    dwt_thread #(.MAX_LEN(DWT_MAX_LEN), .LOCK_ID(DWT_LOCK_ID), .COUNT_ADDR(DWT_COUNT_ADDR)) u_thread (
      .clk,
      .intrfc2thrd_status(status),
      .intrfc2thrd_result(result),
      .thrd2intrfc_opcode(opcode),
      .thrd2intrfc_argument_one(arg1),
      .thrd2intrfc_argument_two(arg2)
    );
  end

endmodule
