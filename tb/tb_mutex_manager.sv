// tb_mutex_manager: self-checking test of the Mutex Manager.
//
// The testbench calls the manager over its bus slave port and takes its
// add_thread messages, sometimes holding add_ready low to stall them. A
// directed part checks acquire, relock error, queueing, trylock, unlock by
// a non-owner, FIFO hand-over with the add_thread message (and the ack held
// back until the message is taken), and release of a mutex with an empty
// queue. A random part runs 3000 calls by 12 threads on 4 mutexes against a
// reference model kept with SystemVerilog queues; a thread that is blocked
// makes no calls until it has been handed a mutex.
module tb_mutex_manager;
  import hthreads_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  bus_req_t bus_req;
  bus_rsp_t bus_rsp;
  logic     add_valid, add_ready;
  tid_t     add_tid;

  mutex_manager dut (.clk, .rst, .bus_req, .bus_rsp, .add_valid, .add_ready, .add_tid);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // collect add_thread messages
  tid_t adds [$];
  bit   stall_adds = 1'b0;
  always @(posedge clk) if (add_valid && add_ready) adds.push_back(add_tid);
  always @(negedge clk) add_ready = !stall_adds || ($urandom_range(0, 3) == 0);

  task automatic call(input logic [3:0] op, input int t, input int m,
                      output logic [31:0] r, output int lat);
    @(negedge clk);
    bus_req = '{req: 1'b1, we: 1'b0, addr: svc_addr(REGION_MUTEX, op, tid_t'(t), 16'(m)), wdata: '0};
    lat = 0;
    do begin @(negedge clk); lat++; end while (!bus_rsp.ack && lat < 100);
    r = bus_rsp.rdata;
    @(posedge clk);
    bus_req <= '0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int lat;
    bus_req = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;

    // ---------------- directed
    call(MTX_OP_LOCK, 1, 5, r, lat);
    check(r == MTX_ACQUIRED && lat == 1, "free mutex acquired in one cycle");
    call(MTX_OP_OWNER, 0, 5, r, lat);
    check(r[31] && !r[30] && r[7:0] == 1, "owner is thread 1");
    call(MTX_OP_LOCK, 1, 5, r, lat);
    check(r == MTX_ERROR, "relock by owner is an error");
    call(MTX_OP_LOCK, 2, 5, r, lat);
    check(r == MTX_BLOCKED, "thread 2 queued");
    call(MTX_OP_LOCK, 3, 5, r, lat);
    check(r == MTX_BLOCKED, "thread 3 queued");
    call(MTX_OP_TRYLOCK, 4, 5, r, lat);
    check(r == MTX_ERROR, "trylock on held mutex fails");
    call(MTX_OP_OWNER, 0, 5, r, lat);
    check(r[31] && r[30] && r[7:0] == 1, "held with waiters");
    call(MTX_OP_UNLOCK, 2, 5, r, lat);
    check(r == MTX_ERROR, "unlock by non-owner is an error");
    call(MTX_OP_TRYLOCK, 7, 6, r, lat);
    check(r == MTX_ACQUIRED, "trylock on another free mutex");

    stall_adds = 1'b1;
    adds.delete();
    call(MTX_OP_UNLOCK, 1, 5, r, lat);
    check(r == MTX_RELEASED && adds.size() == 1 && adds[0] == 2, "hand-over to thread 2");
    stall_adds = 1'b0;
    call(MTX_OP_OWNER, 0, 5, r, lat);
    check(r[31] && r[30] && r[7:0] == 2, "thread 2 owns, thread 3 waits");
    call(MTX_OP_UNLOCK, 2, 5, r, lat);
    check(r == MTX_RELEASED && adds.size() == 2 && adds[1] == 3, "hand-over to thread 3");
    call(MTX_OP_OWNER, 0, 5, r, lat);
    check(r[31] && !r[30] && r[7:0] == 3, "queue now empty");
    call(MTX_OP_UNLOCK, 3, 5, r, lat);
    check(r == MTX_RELEASED && adds.size() == 2, "release without waiters sends nothing");
    call(MTX_OP_OWNER, 0, 5, r, lat);
    check(!r[31], "mutex 5 free");
    call(MTX_OP_UNLOCK, 7, 6, r, lat);
    check(r == MTX_RELEASED, "mutex 6 released");

    // ---------------- random against a model
    begin
      int   q [4][$];
      int   owner [4];
      bit   locked [4];
      int   waiting_on [12];   // -1: not blocked
      automatic int   nrand = 0;
      automatic bit   ok = 1'b1;
      stall_adds = 1'b1;
      for (int m = 0; m < 4; m++) begin locked[m] = 0; owner[m] = 0; end
      for (int t = 0; t < 12; t++) waiting_on[t] = -1;
      adds.delete();
      while (nrand < 3000) begin
        int t, m, k;
        logic [3:0] op;
        logic [31:0] exp;
        int exp_add;
        t = $urandom_range(0, 11);
        if (waiting_on[t] >= 0) continue;
        m = $urandom_range(0, 3);
        k = $urandom_range(0, 9);
        // a thread that owns a mutex only calls on that one (never blocks),
        // so the random threads can never deadlock
        for (int mm = 0; mm < 4; mm++) if (locked[mm] && owner[mm] == t) m = mm;
        if (locked[m] && owner[m] == t && k < 7) op = MTX_OP_UNLOCK;
        else if (k < 6) op = MTX_OP_LOCK;
        else if (k < 8) op = MTX_OP_TRYLOCK;
        else op = MTX_OP_UNLOCK;
        exp_add = -1;
        case (op)
          MTX_OP_LOCK, MTX_OP_TRYLOCK: begin
            if (!locked[m]) begin locked[m] = 1; owner[m] = t; exp = MTX_ACQUIRED; end
            else if (owner[m] == t || op == MTX_OP_TRYLOCK) exp = MTX_ERROR;
            else begin q[m].push_back(t); waiting_on[t] = m; exp = MTX_BLOCKED; end
          end
          default: begin
            if (!locked[m] || owner[m] != t) exp = MTX_ERROR;
            else if (q[m].size() == 0) begin locked[m] = 0; exp = MTX_RELEASED; end
            else begin
              owner[m] = q[m].pop_front();
              waiting_on[owner[m]] = -1;
              exp_add = owner[m];
              exp = MTX_RELEASED;
            end
          end
        endcase
        adds.delete();
        call(op, t, m, r, lat);
        if (r != exp) ok = 1'b0;
        if (exp_add >= 0 && !(adds.size() == 1 && adds[0] == exp_add)) ok = 1'b0;
        if (exp_add < 0 && adds.size() != 0) ok = 1'b0;
        if (!ok) begin
          $display("random call %0d: op %0d t %0d m %0d got %0d exp %0d", nrand, op, t, m, r, exp);
          break;
        end
        nrand++;
      end
      check(ok, "random calls match the model");
      for (int m = 0; m < 4; m++) begin
        call(MTX_OP_OWNER, 0, m, r, lat);
        check(r[31] == locked[m] && (!locked[m] || r[7:0] == owner[m]) && r[30] == (q[m].size() != 0),
              $sformatf("final state of mutex %0d", m));
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
