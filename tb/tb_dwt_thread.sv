// tb_dwt_thread: self-checking test of the Haar DWT hardware thread.
//
// The testbench plays the HWTI's user side and the shared memory: it starts
// the thread with RUN and a record address, answers every call after a
// random 0-3 cycle wait with a one-cycle ACK, and serves LOAD/STORE from a
// memory array. Mutex calls are answered with success and checked for
// order (lock, counter load, counter store, unlock). For several lengths
// (powers of two, a length with an odd factor, 1, and one above MAX_LEN,
// which is clamped) it checks the coefficients against a reference
// lifting Haar transform, the completion counter, the exit value (the id
// returned by SELF) and the number of cycles the transform itself takes:
// m/2 + m cycles for each level of working length m, plus one.
module tb_dwt_thread;
  import hthreads_pkg::*;

  localparam int MAXL = 32;
  localparam logic [31:0] CNT = 32'h0000_0004;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  user_status_e st;
  logic [31:0]  res;
  logic [7:0]   opc;
  logic [31:0]  a1, a2;

  dwt_thread #(.MAX_LEN(MAXL), .LOCK_ID(32'd3), .COUNT_ADDR(CNT)) dut (
    .clk, .intrfc2thrd_status(st), .intrfc2thrd_result(res),
    .thrd2intrfc_opcode(opc), .thrd2intrfc_argument_one(a1), .thrd2intrfc_argument_two(a2)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  logic [31:0] mem [1024];

  // HWTI user-side model
  opcode_e      log_ops [$];
  logic [31:0]  exit_val;
  int           yield_ack_cycle, first_store_cycle, cyc = 0;
  always @(posedge clk) cyc++;

  task automatic serve();
    // runs until the thread exits
    forever begin
      opcode_e o;
      logic [31:0] x1, x2, r;
      @(posedge clk);
      if (opc == OP_NOOP) continue;
      o = opcode_e'(opc); x1 = a1; x2 = a2;
      log_ops.push_back(o);
      r = '0;
      case (o)
        OP_LOAD:  r = mem[x1[11:2]];
        OP_STORE: begin
          mem[x1[11:2]] = x2;
          if (first_store_cycle < 0) first_store_cycle = cyc;
        end
        OP_HTHREAD_SELF: r = 32'd77;
        OP_HTHREAD_MUTEX_LOCK, OP_HTHREAD_MUTEX_UNLOCK:
          if (x1 != 32'd3) failures++;
        default: ;
      endcase
      if (o == OP_HTHREAD_EXIT) begin
        exit_val = x1;
        st <= USER_STATUS_RESET;
        return;
      end
      st <= USER_STATUS_WAIT;
      repeat ($urandom_range(0, 3)) @(posedge clk);
      st <= USER_STATUS_ACK; res <= r;
      if (o == OP_HTHREAD_YIELD) yield_ack_cycle = cyc + 1;
      @(posedge clk);
      st <= USER_STATUS_RUN;
    end
  endtask

  typedef int arr_t [];
  function automatic arr_t haar(input arr_t x);
    arr_t t = new[x.size()];
    int m = x.size();
    while (m >= 2 && m % 2 == 0) begin
      for (int i = 0; i < m / 2; i++) begin
        int d = x[2*i+1] - x[2*i];
        t[i] = x[2*i] + (d >>> 1);
        t[m/2 + i] = d;
      end
      for (int i = 0; i < m; i++) x[i] = t[i];
      m = m / 2;
    end
    return x;
  endfunction

  function automatic int compute_cycles(int n);
    int m = n, c = 0;
    while (m >= 2 && m % 2 == 0) begin
      c += m / 2 + m;
      m = m / 2;
    end
    return c + 1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int lens [6] = '{32, 16, 12, 1, 40, 2};
    st = USER_STATUS_RESET; res = '0;
    for (int i = 0; i < 1024; i++) mem[i] = '0;
    repeat (3) @(posedge clk);
    for (int run = 0; run < 6; run++) begin
      int n, used, bad;
      arr_t x, y;
      logic [31:0] base;
      n = lens[run];
      used = (n > MAXL) ? MAXL : n;
      x = new[used];
      bad = 0;
      base = 32'h100 + 32'(run * 8);
      mem[base[11:2]] = n;
      for (int i = 0; i < n; i++) begin
        mem[base[11:2] + 1 + i] = $urandom_range(0, 2000) - 1000;
        if (i < used) x[i] = int'(mem[base[11:2] + 1 + i]);
      end
      y = haar(x);
      log_ops.delete();
      first_store_cycle = -1;
      // start
      @(posedge clk);
      st <= USER_STATUS_RUN; res <= base;
      serve();
      repeat (3) @(posedge clk);
      for (int i = 0; i < used; i++) if (int'(mem[base[11:2] + 1 + i]) != y[i]) bad++;
      check(bad == 0, $sformatf("len %0d: coefficients (%0d wrong)", n, bad));
      check(mem[CNT[11:2]] == 32'(run + 1), $sformatf("len %0d: counter", n));
      check(exit_val == 77, $sformatf("len %0d: exit value is own id", n));
      begin
        int nl, ns, k;
        nl = 0; ns = 0;
        foreach (log_ops[i]) begin
          if (log_ops[i] == OP_LOAD) nl++;
          if (log_ops[i] == OP_STORE) ns++;
        end
        check(nl == used + 2 && ns == used + 1, $sformatf("len %0d: %0d loads %0d stores", n, nl, ns));
        k = log_ops.size();
        check(k >= 6 && log_ops[k-6] == OP_HTHREAD_MUTEX_LOCK && log_ops[k-5] == OP_LOAD &&
              log_ops[k-4] == OP_STORE && log_ops[k-3] == OP_HTHREAD_MUTEX_UNLOCK &&
              log_ops[k-2] == OP_HTHREAD_SELF && log_ops[k-1] == OP_HTHREAD_EXIT,
              $sformatf("len %0d: lock, update, unlock, self, exit", n));
      end
      if (first_store_cycle >= 0)
        check(first_store_cycle - yield_ack_cycle == compute_cycles(used),
              $sformatf("len %0d: transform took %0d cycles, expected %0d", n,
                        first_store_cycle - yield_ack_cycle, compute_cycles(used)));
      repeat (2) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
