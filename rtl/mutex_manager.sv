// mutex_manager: hardware mutexes for hardware and software threads.
//
// Every service call is one bus read whose address carries the operation,
// the calling thread's id and the mutex number (see hthreads_pkg), so a lock
// or unlock is a single atomic load:
//   LOCK     free mutex -> caller becomes owner, returns MTX_ACQUIRED;
//            held mutex -> caller is appended to the mutex's wait queue and
//            MTX_BLOCKED is returned (the caller then waits to be resumed);
//            relocking by the owner returns MTX_ERROR (not recursive).
//   TRYLOCK  as LOCK but never queues: MTX_ERROR if the mutex is held.
//   UNLOCK   only the owner may unlock (else MTX_ERROR). With an empty queue
//            the mutex becomes free. Otherwise the head of the queue becomes
//            the owner at once and an add_thread message for it is sent to
//            the Thread Manager, which makes it ready to run (or resumes it
//            if it is a hardware thread). Returns MTX_RELEASED.
//   OWNER    returns {locked[31], waiters[30], owner[7:0]}.
// The wait queues are linked lists threaded through one next-pointer table
// indexed by thread id, so a thread can wait on one mutex at a time and the
// storage does not grow with the number of mutexes times threads. Queues are
// first in, first out.
//
// Timing: a call is acked in the cycle after the select; an unlock that
// hands the mutex over is acked one cycle after the Thread Manager accepts
// the add_thread message (add_valid/add_ready handshake).
//
// The document gives the behaviour of the unlock sequence (the manager
// inspects the queue, picks the next owner and asks the Thread Manager to
// add it). The numbers of mutexes and threads, the queue structure, the
// FIFO order and the encodings are this design's own choices.
module mutex_manager
  import hthreads_pkg::*;
#(
  parameter int unsigned NUM_MUTEXES = 64,
  parameter int unsigned NUM_THREADS = 256
) (
  input  logic     clk,
  input  logic     rst,
  input  bus_req_t bus_req,
  output bus_rsp_t bus_rsp,
  // add_thread message towards the Thread Manager
  output logic     add_valid,
  input  logic     add_ready,
  output tid_t     add_tid
);

  localparam int unsigned MW = (NUM_MUTEXES > 1) ? $clog2(NUM_MUTEXES) : 1;
  localparam int unsigned TW = (NUM_THREADS > 1) ? $clog2(NUM_THREADS) : 1;

  logic          locked  [NUM_MUTEXES];
  logic          waiters [NUM_MUTEXES];
  tid_t          owner   [NUM_MUTEXES];
  tid_t          head    [NUM_MUTEXES];
  tid_t          tail    [NUM_MUTEXES];
  tid_t          next_t  [NUM_THREADS];

  logic          ack_q;
  logic [DW-1:0] rdata_q;
  assign bus_rsp = '{ack: ack_q, rdata: rdata_q};

  logic [3:0]    op;
  tid_t          tid;
  logic [MW-1:0] mid;
  logic          start;
  assign op    = bus_req.addr[27:24];
  assign tid   = bus_req.addr[23:16];
  assign mid   = bus_req.addr[MW-1:0];
  assign start = bus_req.req && !ack_q && !add_valid;

  always_ff @(posedge clk) begin
    if (rst) begin
      ack_q     <= 1'b0;
      rdata_q   <= '0;
      add_valid <= 1'b0;
      add_tid   <= '0;
      for (int unsigned m = 0; m < NUM_MUTEXES; m++) begin
        locked[m]  <= 1'b0;
        waiters[m] <= 1'b0;
        owner[m]   <= '0;
        head[m]    <= '0;
        tail[m]    <= '0;
      end
    end else begin
      ack_q <= 1'b0;
      if (add_valid && add_ready) begin
        add_valid <= 1'b0;
        ack_q     <= 1'b1;
      end else if (start) begin
        ack_q <= 1'b1;
        unique case (op)
          MTX_OP_LOCK, MTX_OP_TRYLOCK: begin
            if (!locked[mid]) begin
              locked[mid] <= 1'b1;
              owner[mid]  <= tid;
              rdata_q     <= MTX_ACQUIRED;
            end else if (owner[mid] == tid || op == MTX_OP_TRYLOCK) begin
              rdata_q     <= MTX_ERROR;
            end else begin
              // append the caller to the wait queue
              if (waiters[mid]) next_t[tail[mid][TW-1:0]] <= tid;
              else              head[mid] <= tid;
              tail[mid]    <= tid;
              waiters[mid] <= 1'b1;
              rdata_q      <= MTX_BLOCKED;
            end
          end
          MTX_OP_UNLOCK: begin
            if (!locked[mid] || owner[mid] != tid) begin
              rdata_q <= MTX_ERROR;
            end else if (!waiters[mid]) begin
              locked[mid] <= 1'b0;
              rdata_q     <= MTX_RELEASED;
            end else begin
              // hand over to the head of the queue
              owner[mid] <= head[mid];
              head[mid]  <= next_t[head[mid][TW-1:0]];
              if (head[mid] == tail[mid]) waiters[mid] <= 1'b0;
              add_tid    <= head[mid];
              add_valid  <= 1'b1;
              ack_q      <= 1'b0;   // acked once the message is accepted
              rdata_q    <= MTX_RELEASED;
            end
          end
          MTX_OP_OWNER: begin
            rdata_q <= {locked[mid], waiters[mid], 22'd0, owner[mid]};
          end
          default: rdata_q <= MTX_ERROR;
        endcase
      end
    end
  end

  a_add_stable: assert property (@(posedge clk) disable iff (rst)
    (add_valid && !add_ready) |=> (add_valid && $stable(add_tid)))
    else $error("mutex_manager: add_thread message changed before it was taken");

endmodule
