// hthreads_pkg: types and constants shared by the hthreads run-time system.
//
// The system is a set of service cores (Thread Manager, Scheduler, Mutex
// Manager, shared memory) and hardware thread interfaces (HWTI) hanging off
// one shared system bus. This package holds:
//   * the bus request/response structs that every master and slave uses,
//   * the address map of the bus and the field layout of the service
//     addresses (operations are encoded in the address so that a single
//     load or store performs one atomic service call),
//   * the HWTI syscall opcodes (the names follow the document's syscall
//     table), the HWTI command, system status and user status encodings.
// Opcode, status and address encodings are this design's own choice; the
// document gives only the names and the field widths of the user interface
// (8-bit opcode, 4-bit status, 32-bit arguments and result).
package hthreads_pkg;

  localparam int unsigned DW = 32;  // bus data width
  localparam int unsigned AW = 32;  // bus address width

  // ---------------------------------------------------------------- bus
  typedef struct packed {
    logic          req;    // held high until ack
    logic          we;     // 1 = write, 0 = read
    logic [AW-1:0] addr;
    logic [DW-1:0] wdata;
  } bus_req_t;

  typedef struct packed {
    logic          ack;    // one-cycle pulse ends the transaction
    logic [DW-1:0] rdata;  // valid with ack on a read
  } bus_rsp_t;

  // Address map: addr[31:28] selects the slave.
  localparam logic [3:0] REGION_MEM   = 4'h0;
  localparam logic [3:0] REGION_TM    = 4'h1;
  localparam logic [3:0] REGION_SCHED = 4'h2;
  localparam logic [3:0] REGION_MUTEX = 4'h3;
  localparam logic [3:0] REGION_HWTI  = 4'h4;

  // HWTI i sits at 0x4000_0000 + i*0x100; its registers at word offsets.
  localparam logic [AW-1:0] HWTI_BASE   = 32'h4000_0000;
  localparam logic [AW-1:0] HWTI_STRIDE = 32'h0000_0100;
  localparam logic [3:0] HWTI_REG_THREAD_ID = 4'h0;
  localparam logic [3:0] HWTI_REG_COMMAND   = 4'h1;
  localparam logic [3:0] HWTI_REG_ARGUMENT  = 4'h2;
  localparam logic [3:0] HWTI_REG_STATUS    = 4'h3;
  localparam logic [3:0] HWTI_REG_RESULT    = 4'h4;

  // Service address layout (Thread Manager, Scheduler, Mutex Manager):
  //   addr[27:24] operation, addr[23:16] thread id, addr[15:0] operand.
  localparam int unsigned TID_W = 8;
  typedef logic [TID_W-1:0] tid_t;

  // Thread Manager operations
  localparam logic [3:0] TM_OP_CREATE = 4'h0; // read: operand {is_hw[15], hwti[14:8], prio[3:0]}
  localparam logic [3:0] TM_OP_ADD    = 4'h1; // read: make thread ready
  localparam logic [3:0] TM_OP_EXIT   = 4'h2; // read: thread has exited
  localparam logic [3:0] TM_OP_STATUS = 4'h3; // read: state of thread
  localparam logic [3:0] TM_OP_FREE   = 4'h4; // read: release a thread id (after join)

  typedef enum logic [2:0] {
    TS_UNUSED  = 3'd0,
    TS_CREATED = 3'd1,
    TS_READY   = 3'd2,
    TS_EXITED  = 3'd3
  } thread_state_e;

  // Scheduler operations
  localparam logic [3:0] SCHED_OP_NEXT    = 4'h0; // read: dequeue the best ready thread
  localparam logic [3:0] SCHED_OP_STATUS  = 4'h1; // read: {irq, valid, best prio, best id}
  localparam logic [3:0] SCHED_OP_IDLE    = 4'h2; // read: CPU has no running thread
  localparam logic [3:0] SCHED_OP_IRQ_ACK = 4'h3; // read: clear the preemption interrupt

  // Mutex Manager operations; operand[7:0] is the mutex number
  localparam logic [3:0] MTX_OP_LOCK    = 4'h0;
  localparam logic [3:0] MTX_OP_UNLOCK  = 4'h1;
  localparam logic [3:0] MTX_OP_TRYLOCK = 4'h2;
  localparam logic [3:0] MTX_OP_OWNER   = 4'h3;

  // Mutex Manager read results
  localparam logic [DW-1:0] MTX_ACQUIRED = 32'd1; // caller owns the mutex
  localparam logic [DW-1:0] MTX_BLOCKED  = 32'd2; // caller queued behind the owner
  localparam logic [DW-1:0] MTX_RELEASED = 32'd3; // unlock done
  localparam logic [DW-1:0] MTX_ERROR    = 32'd4; // unlock by non-owner, or busy on trylock

  function automatic logic [AW-1:0] svc_addr(logic [3:0] region, logic [3:0] op,
                                             tid_t tid, logic [15:0] operand);
    return {region, op, tid, operand};
  endfunction

  // Add-thread message: Mutex Manager -> Thread Manager (tid only) and
  // Thread Manager -> Scheduler (with the thread's attributes).
  localparam int unsigned PRIO_W = 4;
  localparam int unsigned HWTI_IDX_W = 7;
  typedef struct packed {
    tid_t                  tid;
    logic [PRIO_W-1:0]     prio;      // 0 is the highest priority
    logic                  is_hw;
    logic [HWTI_IDX_W-1:0] hwti;
  } add_thread_t;

  // ---------------------------------------------------------------- HWTI
  typedef enum logic [7:0] {
    OP_NOOP                 = 8'h00,
    OP_HTHREAD_EXIT         = 8'h01,
    OP_LOAD                 = 8'h02,
    OP_STORE                = 8'h03,
    OP_HTHREAD_SELF         = 8'h04,
    OP_HTHREAD_YIELD        = 8'h05,
    OP_HTHREAD_MUTEX_LOCK   = 8'h06,
    OP_HTHREAD_MUTEX_UNLOCK = 8'h07
  } opcode_e;

  // Values written to the HWTI command register
  localparam logic [DW-1:0] CMD_RUN   = 32'd1;
  localparam logic [DW-1:0] CMD_RESET = 32'd2;

  // HWTI system status (read through the status register)
  typedef enum logic [2:0] {
    SYS_UNUSED  = 3'd0,
    SYS_USED    = 3'd1,
    SYS_RUNNING = 3'd2,
    SYS_BLOCKED = 3'd3,
    SYS_EXIT    = 3'd4
  } sys_status_e;

  // HWTI user status (intrfc2thrd_status, 4 bits)
  typedef enum logic [3:0] {
    USER_STATUS_RESET = 4'd0,
    USER_STATUS_RUN   = 4'd1,
    USER_STATUS_WAIT  = 4'd2,
    USER_STATUS_ACK   = 4'd3
  } user_status_e;

endpackage
