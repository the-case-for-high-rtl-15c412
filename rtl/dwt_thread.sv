// dwt_thread: a hardware thread (user logic behind an HWTI) that computes a
// complete Haar discrete wavelet transform of an array in shared memory, in
// place, and then bumps a shared completion counter under a mutex.
//
// The thread's argument (given by the HWTI on intrfc2thrd_result when the
// status turns to RUN) is the byte address of an array record in shared
// memory: word 0 holds the length n, words 1..n the signed 32-bit samples.
// The thread:
//   1. LOADs n and the samples into a local buffer (n is clamped to MAX_LEN),
//      then calls HTHREAD_YIELD once, a no-op for a hardware thread;
//   2. runs the transform: while the working length m is even and at least
//      2, each pair (a, b) = (x[2i], x[2i+1]) becomes the detail d = b - a
//      and the approximation s = a + (d >>> 1) (integer lifting, so the
//      transform is exactly invertible); the m/2 approximations go to
//      x[0..m/2-1], the details to x[m/2..m-1], and m halves. One pair is
//      computed per cycle into a second buffer, which is copied back one word
//      per cycle;
//   3. STOREs the coefficients back over the samples;
//   4. takes mutex LOCK_ID, LOADs the word at COUNT_ADDR, STOREs it plus
//      one, and releases the mutex;
//   5. calls HTHREAD_SELF and exits with its own thread id as return value.
// Each call drives the opcode for one cycle while the status is RUN or ACK
// and waits for the next ACK, whose intrfc2thrd_result is the answer.
// The status RESET returns the thread to its idle state; like the
// document's generated thread it has no reset input of its own.
//
// The document says each child thread implements a complete DWT and is
// created with a pointer to a record holding a length and a data array; it
// does not give the transform's arithmetic. The lifting form of the Haar
// step, the coefficient order, MAX_LEN and the counter update are this
// design's own choices.
module dwt_thread
  import hthreads_pkg::*;
#(
  parameter int unsigned MAX_LEN    = 256,
  parameter logic [31:0] LOCK_ID    = 32'd0,
  parameter logic [31:0] COUNT_ADDR = 32'h0000_0000
) (
  input  logic         clk,
  input  user_status_e intrfc2thrd_status,
  input  logic [31:0]  intrfc2thrd_result,
  output logic [7:0]   thrd2intrfc_opcode,
  output logic [31:0]  thrd2intrfc_argument_one,
  output logic [31:0]  thrd2intrfc_argument_two
);

  localparam int unsigned LW = $clog2(MAX_LEN + 1);

  typedef enum logic [4:0] {
    T_IDLE, T_LOAD_LEN, T_LOAD_DATA, T_YIELD, T_PAIR, T_COPY,
    T_STORE_DATA, T_LOCK, T_LOAD_CNT, T_STORE_CNT, T_UNLOCK, T_SELF, T_EXIT,
    T_WAIT, T_DONE
  } tstate_e;

  tstate_e       state, after;   // after: state to go to when the ACK comes
  logic [31:0]   base;
  logic [LW-1:0] len;
  logic [LW-1:0] m;              // working length of the current level
  logic [LW-1:0] i;
  logic [31:0]   self_id;
  logic [31:0]   cnt;

  logic signed [31:0] xbuf [MAX_LEN];
  logic signed [31:0] tbuf [MAX_LEN];

  logic running, acked;
  assign running = (intrfc2thrd_status == USER_STATUS_RUN) ||
                   (intrfc2thrd_status == USER_STATUS_ACK);
  assign acked   = (intrfc2thrd_status == USER_STATUS_ACK);

  // a call is issued in every state that names one; the HWTI latches it
  always_comb begin
    thrd2intrfc_opcode       = OP_NOOP;
    thrd2intrfc_argument_one = '0;
    thrd2intrfc_argument_two = '0;
    if (running) begin
      unique case (state)
        T_LOAD_LEN:  begin thrd2intrfc_opcode = OP_LOAD; thrd2intrfc_argument_one = base; end
        T_LOAD_DATA: begin
          thrd2intrfc_opcode       = OP_LOAD;
          thrd2intrfc_argument_one = base + 32'(({{(32-LW){1'b0}}, i} + 32'd1) << 2);
        end
        T_YIELD:     thrd2intrfc_opcode = OP_HTHREAD_YIELD;
        T_STORE_DATA: begin
          thrd2intrfc_opcode       = OP_STORE;
          thrd2intrfc_argument_one = base + 32'(({{(32-LW){1'b0}}, i} + 32'd1) << 2);
          thrd2intrfc_argument_two = xbuf[i[LW-2:0]];
        end
        T_LOCK:      begin thrd2intrfc_opcode = OP_HTHREAD_MUTEX_LOCK; thrd2intrfc_argument_one = LOCK_ID; end
        T_LOAD_CNT:  begin thrd2intrfc_opcode = OP_LOAD; thrd2intrfc_argument_one = COUNT_ADDR; end
        T_STORE_CNT: begin
          thrd2intrfc_opcode       = OP_STORE;
          thrd2intrfc_argument_one = COUNT_ADDR;
          thrd2intrfc_argument_two = cnt + 32'd1;
        end
        T_UNLOCK:    begin thrd2intrfc_opcode = OP_HTHREAD_MUTEX_UNLOCK; thrd2intrfc_argument_one = LOCK_ID; end
        T_SELF:      thrd2intrfc_opcode = OP_HTHREAD_SELF;
        T_EXIT:      begin thrd2intrfc_opcode = OP_HTHREAD_EXIT; thrd2intrfc_argument_one = self_id; end
        default: ;
      endcase
    end
  end

  // one lifting step on pair i of the current level
  logic signed [31:0] pa, pb, pd, ps;
  logic [LW-1:0]      half;
  assign half = m >> 1;
  logic [LW-1:0]      ev_idx, od_idx, hi_idx;
  assign ev_idx = {i[LW-2:0], 1'b0};
  assign od_idx = {i[LW-2:0], 1'b1};
  assign hi_idx = half + i;
  always_comb begin
    pa = xbuf[ev_idx[LW-2:0]];
    pb = xbuf[od_idx[LW-2:0]];
    pd = pb - pa;
    ps = pa + (pd >>> 1);
  end

  task automatic issue(input tstate_e nxt);
    state <= T_WAIT;
    after <= nxt;
  endtask

  always_ff @(posedge clk) begin
    if (intrfc2thrd_status == USER_STATUS_RESET) begin
      state   <= T_IDLE;
      after   <= T_IDLE;
      i       <= '0;
      len     <= '0;
      m       <= '0;
      base    <= '0;
      self_id <= '0;
      cnt     <= '0;
    end else begin
      unique case (state)
        T_IDLE: if (intrfc2thrd_status == USER_STATUS_RUN) begin
          base  <= intrfc2thrd_result;
          state <= T_LOAD_LEN;
        end
        T_LOAD_LEN, T_LOAD_DATA, T_YIELD, T_STORE_DATA, T_LOCK, T_LOAD_CNT,
        T_STORE_CNT, T_UNLOCK, T_SELF, T_EXIT:
          if (running) issue(state);
        T_WAIT: if (acked) begin
          unique case (after)
            T_LOAD_LEN: begin
              len   <= (intrfc2thrd_result > 32'(MAX_LEN)) ? LW'(MAX_LEN) : LW'(intrfc2thrd_result);
              i     <= '0;
              state <= (intrfc2thrd_result == 32'd0) ? T_LOCK : T_LOAD_DATA;
            end
            T_LOAD_DATA: begin
              xbuf[i[LW-2:0]] <= intrfc2thrd_result;
              i <= i + 1'b1;
              if (i + 1'b1 == len) state <= T_YIELD;
              else                 state <= T_LOAD_DATA;
            end
            T_YIELD: begin
              m     <= len;
              i     <= '0;
              state <= (len[0] == 1'b0 && len >= 2) ? T_PAIR : T_STORE_DATA;
            end
            T_STORE_DATA: begin
              i <= i + 1'b1;
              if (i + 1'b1 == len) state <= T_LOCK;
              else                 state <= T_STORE_DATA;
            end
            T_LOCK:      state <= T_LOAD_CNT;
            T_LOAD_CNT:  begin cnt <= intrfc2thrd_result; state <= T_STORE_CNT; end
            T_STORE_CNT: state <= T_UNLOCK;
            T_UNLOCK:    state <= T_SELF;
            T_SELF:      begin self_id <= intrfc2thrd_result; state <= T_EXIT; end
            T_EXIT:      state <= T_DONE;
            default:     state <= T_DONE;
          endcase
        end
        T_PAIR: begin
          tbuf[i[LW-2:0]]          <= ps;
          tbuf[hi_idx[LW-2:0]] <= pd;
          if (i + 1'b1 == half) begin
            i     <= '0;
            state <= T_COPY;
          end else begin
            i <= i + 1'b1;
          end
        end
        T_COPY: begin
          xbuf[i[LW-2:0]] <= tbuf[i[LW-2:0]];
          if (i + 1'b1 == m) begin
            i <= '0;
            m <= half;
            state <= (half[0] == 1'b0 && half >= 2) ? T_PAIR : T_STORE_DATA;
          end else begin
            i <= i + 1'b1;
          end
        end
        default: ;  // T_DONE: wait for RESET
      endcase
    end
  end

endmodule
