// hwti: hardware thread interface. It turns a block of user logic into a
// thread of the hthreads system, so that the user logic calls system
// services the way a software thread calls a library: it puts arguments in
// registers and an opcode in a command register instead of pushing
// arguments on a stack and executing a trap.
//
// System side (bus slave, registers at word offsets, see hthreads_pkg):
//   thread_id (W)  writing it gives the HWTI a thread: status -> USED
//   command   (W)  RUN starts the user logic (or resumes it when it is
//                  blocked on a mutex); RESET stops it: status -> UNUSED
//   argument  (W)  the thread's start argument, handed to the user logic
//                  on intrfc2thrd_result when it starts
//   status    (R)  system status: UNUSED, USED, RUNNING, BLOCKED, EXIT
//   result    (R)  value the thread passed to hthread_exit
// All registers can be read back. Accesses are acked the cycle after the
// select.
//
// User side: the user logic sees intrfc2thrd_status (RESET, RUN, WAIT, ACK)
// and intrfc2thrd_result, and drives an 8-bit opcode and two 32-bit
// arguments. While the status is RUN or ACK, a non-NOOP opcode is latched
// (with both arguments) at the clock edge; the user logic must drive it
// for that one cycle only. The status goes to WAIT while the call is
// served, then to ACK for one cycle with the call's value on
// intrfc2thrd_result, then back to RUN. The calls:
//   HTHREAD_SELF   returns the thread id; HTHREAD_YIELD returns at once
//                  (a hardware thread has the fabric to itself). Both are
//                  acknowledged on the next edge.
//   LOAD           bus read of argument_one; returns the word
//   STORE          bus write of argument_two to argument_one
//   HTHREAD_MUTEX_LOCK / _UNLOCK   one bus read of the Mutex Manager for
//                  mutex argument_one; return 0 on success, 1 on error.
//                  A lock that is queued leaves the HWTI BLOCKED until the
//                  Scheduler writes RUN into the command register, which it
//                  does once the Mutex Manager has made this thread the
//                  owner; the call then returns 0.
//   HTHREAD_EXIT   stores argument_one in the result register, reports the
//                  exit to the Thread Manager (one bus read), then sets the
//                  status to EXIT and the user status to RESET.
// A bus call takes four cycles from the opcode to ACK when the bus is free
// and the slave answers in one cycle.
//
// Following the document: the two register sets of the system and user
// interfaces, their names and widths, the syscall names, opcode latching,
// RUN/RESET commands, the USED/UNUSED/EXIT system states and the resume of a
// blocked hardware thread by a RUN from the Scheduler. This design's own:
// the encodings, the WAIT/ACK handshake, the return codes, the BLOCKED and
// RUNNING states, and a RESET during a bus call, which takes effect on the
// user side at once while the bus call is finished and its answer dropped.
module hwti
  import hthreads_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  // system interface
  input  bus_req_t     s_req,
  output bus_rsp_t     s_rsp,
  output bus_req_t     m_req,
  input  bus_rsp_t     m_rsp,
  // user interface
  output user_status_e intrfc2thrd_status,
  output logic [31:0]  intrfc2thrd_result,
  input  logic [7:0]   thrd2intrfc_opcode,
  input  logic [31:0]  thrd2intrfc_argument_one,
  input  logic [31:0]  thrd2intrfc_argument_two
);

  // system interface registers
  tid_t          thread_id;
  logic [DW-1:0] command;
  logic [DW-1:0] argument;
  sys_status_e   status;
  logic [DW-1:0] result;
  // user interface registers
  user_status_e  user_status;
  logic [DW-1:0] user_result;
  opcode_e       user_opcode;
  logic [DW-1:0] user_argument_one;
  logic [DW-1:0] user_argument_two;

  assign intrfc2thrd_status = user_status;
  assign intrfc2thrd_result = user_result;

  typedef enum logic [1:0] {SC_IDLE, SC_BUS, SC_BLOCKED} sc_state_e;
  sc_state_e sc_state;
  logic      abort;     // RESET arrived during a bus call

  // ------------------------------------------------------------ slave
  logic          s_ack;
  logic [DW-1:0] s_rdata;
  logic          s_start;
  logic [3:0]    s_reg;
  assign s_rsp   = '{ack: s_ack, rdata: s_rdata};
  assign s_start = s_req.req && !s_ack;
  assign s_reg   = s_req.addr[5:2];

  logic cmd_run, cmd_reset;
  assign cmd_run   = s_start && s_req.we && (s_reg == HWTI_REG_COMMAND) && (s_req.wdata == CMD_RUN);
  assign cmd_reset = s_start && s_req.we && (s_reg == HWTI_REG_COMMAND) && (s_req.wdata == CMD_RESET);

  // ------------------------------------------------------------ user call
  logic    call;
  opcode_e new_op;
  assign new_op = opcode_e'(thrd2intrfc_opcode);
  assign call   = (user_status == USER_STATUS_RUN || user_status == USER_STATUS_ACK) &&
                  (new_op != OP_NOOP) && (sc_state == SC_IDLE) && !cmd_reset;

  // master request, built from the latched call
  logic m_active;
  always_comb begin
    m_req.req   = m_active;
    m_req.we    = 1'b0;
    m_req.wdata = user_argument_two;
    m_req.addr  = user_argument_one;
    unique case (user_opcode)
      OP_STORE: m_req.we = 1'b1;
      OP_HTHREAD_MUTEX_LOCK:
        m_req.addr = svc_addr(REGION_MUTEX, MTX_OP_LOCK, thread_id, user_argument_one[15:0]);
      OP_HTHREAD_MUTEX_UNLOCK:
        m_req.addr = svc_addr(REGION_MUTEX, MTX_OP_UNLOCK, thread_id, user_argument_one[15:0]);
      OP_HTHREAD_EXIT:
        m_req.addr = svc_addr(REGION_TM, TM_OP_EXIT, thread_id, 16'd0);
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      thread_id         <= '0;
      command           <= '0;
      argument          <= '0;
      status            <= SYS_UNUSED;
      result            <= '0;
      user_status       <= USER_STATUS_RESET;
      user_result       <= '0;
      user_opcode       <= OP_NOOP;
      user_argument_one <= '0;
      user_argument_two <= '0;
      sc_state          <= SC_IDLE;
      abort             <= 1'b0;
      m_active          <= 1'b0;
      s_ack             <= 1'b0;
      s_rdata           <= '0;
    end else begin
      s_ack <= 1'b0;
      // ACK lasts one cycle
      if (user_status == USER_STATUS_ACK) user_status <= USER_STATUS_RUN;

      // ---------------- system side register accesses
      if (s_start) begin
        s_ack <= 1'b1;
        if (s_req.we) begin
          unique case (s_reg)
            HWTI_REG_THREAD_ID: begin
              thread_id <= s_req.wdata[TID_W-1:0];
              status    <= SYS_USED;
            end
            HWTI_REG_COMMAND: command  <= s_req.wdata;
            HWTI_REG_ARGUMENT: argument <= s_req.wdata;
            default: ;
          endcase
        end else begin
          unique case (s_reg)
            HWTI_REG_THREAD_ID: s_rdata <= DW'(thread_id);
            HWTI_REG_COMMAND:   s_rdata <= command;
            HWTI_REG_ARGUMENT:  s_rdata <= argument;
            HWTI_REG_STATUS:    s_rdata <= DW'(status);
            HWTI_REG_RESULT:    s_rdata <= result;
            default:            s_rdata <= '0;
          endcase
        end
      end

      // ---------------- RUN: start, or resume a thread blocked on a mutex
      if (cmd_run) begin
        if (sc_state == SC_BLOCKED) begin
          sc_state    <= SC_IDLE;
          status      <= SYS_RUNNING;
          user_result <= '0;
          user_status <= USER_STATUS_ACK;
        end else if (status == SYS_USED) begin
          status      <= SYS_RUNNING;
          user_result <= argument;
          user_status <= USER_STATUS_RUN;
        end
      end

      // ---------------- a new call from the user logic
      if (call) begin
        user_opcode       <= new_op;
        user_argument_one <= thrd2intrfc_argument_one;
        user_argument_two <= thrd2intrfc_argument_two;
        unique case (new_op)
          OP_HTHREAD_SELF: begin
            user_result <= DW'(thread_id);
            user_status <= USER_STATUS_ACK;
          end
          OP_HTHREAD_YIELD: begin
            user_result <= '0;
            user_status <= USER_STATUS_ACK;
          end
          OP_LOAD, OP_STORE, OP_HTHREAD_MUTEX_LOCK, OP_HTHREAD_MUTEX_UNLOCK,
          OP_HTHREAD_EXIT: begin
            user_status <= USER_STATUS_WAIT;
            sc_state    <= SC_BUS;
            m_active    <= 1'b1;
            if (new_op == OP_HTHREAD_EXIT) result <= thrd2intrfc_argument_one;
          end
          default: begin  // unknown opcode: answered at once with all ones
            user_result <= '1;
            user_status <= USER_STATUS_ACK;
          end
        endcase
      end

      // ---------------- end of a bus call
      if (sc_state == SC_BUS && m_rsp.ack) begin
        m_active <= 1'b0;
        sc_state <= SC_IDLE;
        if (!abort) begin
          user_status <= USER_STATUS_ACK;
          unique case (user_opcode)
            OP_LOAD:  user_result <= m_rsp.rdata;
            OP_STORE: user_result <= '0;
            OP_HTHREAD_MUTEX_LOCK: begin
              if (m_rsp.rdata == MTX_BLOCKED) begin
                sc_state    <= SC_BLOCKED;
                status      <= SYS_BLOCKED;
                user_status <= USER_STATUS_WAIT;
              end else begin
                user_result <= (m_rsp.rdata == MTX_ACQUIRED) ? '0 : 32'd1;
              end
            end
            OP_HTHREAD_MUTEX_UNLOCK:
              user_result <= (m_rsp.rdata == MTX_RELEASED) ? '0 : 32'd1;
            OP_HTHREAD_EXIT: begin
              status      <= SYS_EXIT;
              user_status <= USER_STATUS_RESET;
            end
            default: ;
          endcase
        end
        abort <= 1'b0;
      end

      // ---------------- RESET stops the user logic
      if (cmd_reset) begin
        status      <= SYS_UNUSED;
        user_status <= USER_STATUS_RESET;
        user_result <= '0;
        if (sc_state == SC_BUS && !m_rsp.ack) abort <= 1'b1;
        if (sc_state == SC_BLOCKED || (sc_state == SC_BUS && m_rsp.ack)) sc_state <= SC_IDLE;
      end
    end
  end

  a_wait_while_busy: assert property (@(posedge clk) disable iff (rst)
    (sc_state == SC_BUS && !abort) |-> (user_status == USER_STATUS_WAIT))
    else $error("hwti: user status must be WAIT during a bus call");

endmodule
