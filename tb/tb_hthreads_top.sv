// tb_hthreads_top: end-to-end test of the hthreads system at its default
// parameters (two hardware threads, 256 thread ids, 64 mutexes).
//
// The testbench plays the CPU: it is bus master 0 and runs the main
// program of a two-hardware-thread DWT application.
//   1. Writes two array records (length 256, samples (100+4i)%256 and
//      (101+3i)%256) into shared memory and clears the completion counter.
//   2. Creates a software thread for itself and locks mutex 0 with it.
//   3. Creates two hardware threads (Thread Manager CREATE), gives each
//      HWTI its thread id and argument, and makes them ready (ADD). The
//      Scheduler sends RUN to both HWTIs; both transform their arrays and
//      then block on mutex 0.
//   4. Unlocks mutex 0: the mutex passes to the first waiter entirely in
//      hardware (Mutex Manager -> Thread Manager -> Scheduler -> RUN), that
//      thread unlocks and hands over to the second, and both exit.
//   5. Joins both threads (polls HWTI status for EXIT, reads the result)
//      and checks the coefficients against a reference transform, the
//      counter, the return values (own thread ids) and the Thread Manager
//      states; then resets one HWTI.
//   6. Exercises the software side of the Scheduler: dequeues a thread to
//      run, adds a higher-priority thread (must interrupt) and a
//      lower-priority one (must not).
// Mechanism counters: bus contention, mutex blocked, mutex hand-over, RUN
// sent by the Scheduler, CPU interrupt, LOAD, STORE, SELF, YIELD, EXIT.
// Each must happen at least once.
module tb_hthreads_top;
  import hthreads_pkg::*;

  localparam int LEN  = 256;
  localparam logic [31:0] ARR0 = 32'h0000_1000;
  localparam logic [31:0] ARR1 = 32'h0000_2000;

  logic     clk = 1'b0;
  logic     rst = 1'b1;
  bus_req_t cpu_req;
  bus_rsp_t cpu_rsp;
  logic     cpu_irq;

  always #5 clk = ~clk;

  hthreads_top dut (.clk, .rst, .cpu_req, .cpu_rsp, .cpu_irq);

  int checks = 0, failures = 0;
  int cycles = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ------------------------------------------------------------ CPU bus
  task automatic bus(input logic we, input logic [31:0] addr, input logic [31:0] wdata,
                     output logic [31:0] rdata);
    cpu_req <= '{req: 1'b1, we: we, addr: addr, wdata: wdata};
    do @(posedge clk); while (!cpu_rsp.ack);
    rdata = cpu_rsp.rdata;
    cpu_req <= '0;
    @(posedge clk);
  endtask

  task automatic wr(input logic [31:0] addr, input logic [31:0] data);
    logic [31:0] d;
    bus(1'b1, addr, data, d);
  endtask

  task automatic rd(input logic [31:0] addr, output logic [31:0] data);
    bus(1'b0, addr, '0, data);
  endtask

  function automatic logic [31:0] hwti_reg(int h, logic [3:0] r);
    return HWTI_BASE + HWTI_STRIDE * h + {26'd0, r, 2'b00};
  endfunction

  // ------------------------------------------------------------ reference
  typedef int arr_t [LEN];
  function automatic arr_t haar(input arr_t x);
    arr_t t;
    int m = LEN;
    while (m >= 2 && m % 2 == 0) begin
      for (int i = 0; i < m / 2; i++) begin
        int d, s;
        d = x[2*i+1] - x[2*i];
        s = x[2*i] + (d >>> 1);
        t[i] = s;
        t[m/2 + i] = d;
      end
      for (int i = 0; i < m; i++) x[i] = t[i];
      m = m / 2;
    end
    return x;
  endfunction

  // ------------------------------------------------------------ mechanisms
  int n_contention = 0, n_blocked = 0, n_handover = 0, n_sched_run = 0;
  int n_irq = 0, n_load = 0, n_store = 0, n_self = 0, n_yield = 0, n_exit = 0;
  logic irq_d = 1'b0;

  always @(posedge clk) if (!rst) begin
    int nreq;
    cycles++;
    nreq = 0;
    for (int k = 0; k < 4; k++) if (dut.m_req[k].req) nreq++;
    if (nreq > 1) n_contention++;
    if (dut.u_mutex.add_valid && dut.u_mutex.add_ready) n_handover++;
    if (dut.m_req[1].req && dut.m_rsp[1].ack) n_sched_run++;
    if (cpu_irq && !irq_d) n_irq++;
    irq_d <= cpu_irq;
    if (dut.g_hw[0].u_hwti.call || dut.g_hw[1].u_hwti.call) begin
      opcode_e o;
      o = dut.g_hw[0].u_hwti.call ? dut.g_hw[0].u_hwti.new_op : dut.g_hw[1].u_hwti.new_op;
      case (o)
        OP_LOAD:          n_load++;
        OP_STORE:         n_store++;
        OP_HTHREAD_SELF:  n_self++;
        OP_HTHREAD_YIELD: n_yield++;
        OP_HTHREAD_EXIT:  n_exit++;
        default: ;
      endcase
    end
  end
  sys_status_e prev_st [2] = '{SYS_UNUSED, SYS_UNUSED};
  always @(posedge clk) if (!rst) begin
    if (dut.g_hw[0].u_hwti.status == SYS_BLOCKED && prev_st[0] != SYS_BLOCKED) n_blocked++;
    if (dut.g_hw[1].u_hwti.status == SYS_BLOCKED && prev_st[1] != SYS_BLOCKED) n_blocked++;
    prev_st[0] <= dut.g_hw[0].u_hwti.status;
    prev_st[1] <= dut.g_hw[1].u_hwti.status;
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ main
  initial begin
    arr_t in0, in1, ref0, ref1;
    logic [31:0] d, main_id, hw_id [2], st;
    int t0;

    cpu_req = '0;
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);

    // 1. array records and counter
    for (int i = 0; i < LEN; i++) begin
      in0[i] = (100 + i*4) % LEN;
      in1[i] = (101 + i*3) % LEN;
    end
    ref0 = haar(in0);
    ref1 = haar(in1);
    wr(ARR0, LEN);
    wr(ARR1, LEN);
    for (int i = 0; i < LEN; i++) begin
      wr(ARR0 + 4*(i+1), in0[i]);
      wr(ARR1 + 4*(i+1), in1[i]);
    end
    wr(32'h0, 32'd0);

    // 2. main software thread holds mutex 0
    rd(svc_addr(REGION_TM, TM_OP_CREATE, 8'd0, 16'h0002), d);
    check(d[31] == 1'b1, "create main thread");
    main_id = {24'd0, d[7:0]};
    rd(svc_addr(REGION_MUTEX, MTX_OP_LOCK, main_id[7:0], 16'd0), d);
    check(d == MTX_ACQUIRED, "main locks mutex 0");

    // 3. hardware threads
    for (int h = 0; h < 2; h++) begin
      rd(svc_addr(REGION_TM, TM_OP_CREATE, 8'd0, {1'b1, 7'(h), 4'd0, 4'd1}), d);
      check(d[31] == 1'b1, "create hardware thread");
      hw_id[h] = {24'd0, d[7:0]};
      wr(hwti_reg(h, HWTI_REG_THREAD_ID), hw_id[h]);
      wr(hwti_reg(h, HWTI_REG_ARGUMENT), (h == 0) ? ARR0 : ARR1);
      rd(hwti_reg(h, HWTI_REG_STATUS), d);
      check(d == SYS_USED, "HWTI status USED after thread id");
    end
    check(hw_id[0] != hw_id[1] && hw_id[0] != main_id, "distinct thread ids");
    for (int h = 0; h < 2; h++) rd(svc_addr(REGION_TM, TM_OP_ADD, hw_id[h][7:0], 16'd0), d);

    // both threads must end up blocked on mutex 0
    t0 = cycles;
    do begin
      logic [31:0] s0, s1;
      rd(hwti_reg(0, HWTI_REG_STATUS), s0);
      rd(hwti_reg(1, HWTI_REG_STATUS), s1);
      st = (s0 == SYS_BLOCKED && s1 == SYS_BLOCKED) ? 1 : 0;
    end while (st == 0 && cycles - t0 < 200000);
    check(st == 1, "both hardware threads blocked on mutex 0");
    rd(svc_addr(REGION_MUTEX, MTX_OP_OWNER, 8'd0, 16'd0), d);
    check(d[31] && d[30] && d[7:0] == main_id[7:0], "mutex 0 owned by main with waiters");

    // 4. release: hand-over runs in hardware
    rd(svc_addr(REGION_MUTEX, MTX_OP_UNLOCK, main_id[7:0], 16'd0), d);
    check(d == MTX_RELEASED, "main unlocks mutex 0");

    // 5. join
    for (int h = 0; h < 2; h++) begin
      t0 = cycles;
      do rd(hwti_reg(h, HWTI_REG_STATUS), d);
      while (d != SYS_EXIT && cycles - t0 < 50000);
      check(d == SYS_EXIT, $sformatf("HWTI %0d exited", h));
      rd(hwti_reg(h, HWTI_REG_RESULT), d);
      check(d == hw_id[h], $sformatf("HWTI %0d returns its thread id", h));
      rd(svc_addr(REGION_TM, TM_OP_STATUS, hw_id[h][7:0], 16'd0), d);
      check(d == TS_EXITED, "Thread Manager state EXITED");
    end
    begin
      automatic int bad0 = 0, bad1 = 0;
      for (int i = 0; i < LEN; i++) begin
        rd(ARR0 + 4*(i+1), d);
        if (int'(d) != ref0[i]) bad0++;
        rd(ARR1 + 4*(i+1), d);
        if (int'(d) != ref1[i]) bad1++;
      end
      check(bad0 == 0, $sformatf("DWT of array 0 (%0d wrong)", bad0));
      check(bad1 == 0, $sformatf("DWT of array 1 (%0d wrong)", bad1));
    end
    rd(32'h0, d);
    check(d == 2, "completion counter is 2");
    rd(svc_addr(REGION_MUTEX, MTX_OP_OWNER, 8'd0, 16'd0), d);
    check(d[31] == 1'b0, "mutex 0 free at the end");
    wr(hwti_reg(0, HWTI_REG_COMMAND), CMD_RESET);
    rd(hwti_reg(0, HWTI_REG_STATUS), d);
    check(d == SYS_UNUSED, "HWTI 0 UNUSED after RESET");
    for (int h = 0; h < 2; h++) rd(svc_addr(REGION_TM, TM_OP_FREE, hw_id[h][7:0], 16'd0), d);

    // 6. software threads and the preemption interrupt
    begin
      logic [31:0] a, b, c;
      rd(svc_addr(REGION_TM, TM_OP_CREATE, 8'd0, 16'h0005), a);
      rd(svc_addr(REGION_TM, TM_OP_CREATE, 8'd0, 16'h0003), b);
      rd(svc_addr(REGION_TM, TM_OP_CREATE, 8'd0, 16'h0007), c);
      rd(svc_addr(REGION_TM, TM_OP_ADD, a[7:0], 16'd0), d);
      rd(svc_addr(REGION_SCHED, SCHED_OP_IRQ_ACK, 8'd0, 16'd0), d);
      rd(svc_addr(REGION_SCHED, SCHED_OP_NEXT, 8'd0, 16'd0), d);
      check(d[31] && d[7:0] == a[7:0] && d[11:8] == 4'd5, $sformatf("NEXT returns the priority-5 thread (%h, id %h)", d, a));
      rd(svc_addr(REGION_TM, TM_OP_ADD, c[7:0], 16'd0), d);
      repeat (2) @(posedge clk);
      check(!cpu_irq, "lower-priority arrival does not interrupt");
      rd(svc_addr(REGION_TM, TM_OP_ADD, b[7:0], 16'd0), d);
      repeat (2) @(posedge clk);
      check(cpu_irq, "higher-priority arrival interrupts the CPU");
      rd(svc_addr(REGION_SCHED, SCHED_OP_IRQ_ACK, 8'd0, 16'd0), d);
      rd(svc_addr(REGION_SCHED, SCHED_OP_NEXT, 8'd0, 16'd0), d);
      check(d[31] && d[7:0] == b[7:0], "NEXT returns the priority-3 thread");
      rd(svc_addr(REGION_SCHED, SCHED_OP_NEXT, 8'd0, 16'd0), d);
      check(d[31] && d[7:0] == c[7:0], "NEXT returns the priority-7 thread");
      rd(svc_addr(REGION_SCHED, SCHED_OP_NEXT, 8'd0, 16'd0), d);
      check(!d[31], "queue empty");
    end

    // mechanisms
    $display("mechanisms: contention=%0d blocked=%0d handover=%0d sched_run=%0d irq=%0d",
             n_contention, n_blocked, n_handover, n_sched_run, n_irq);
    $display("            load=%0d store=%0d self=%0d yield=%0d exit=%0d",
             n_load, n_store, n_self, n_yield, n_exit);
    check(n_contention > 0, "bus contention happened");
    check(n_blocked == 2, "two threads blocked on the mutex");
    check(n_handover == 2, "two mutex hand-overs");
    check(n_sched_run == 4, "four RUN commands from the Scheduler");
    check(n_irq >= 1, "CPU interrupt happened");
    check(n_load == 2 * (LEN + 2), "LOAD count");
    check(n_store == 2 * (LEN + 1), "STORE count");
    check(n_self == 2 && n_yield == 2 && n_exit == 2, "SELF/YIELD/EXIT counts");
    $display("cycles=%0d", cycles);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
