// tb_thread_scheduler: self-checking test of the Scheduler.
//
// The testbench feeds add_thread messages, calls the Scheduler over its
// slave port as the CPU would, and answers its master port as the HWTIs'
// command registers would. It checks:
//   * a hardware thread is not queued; a RUN write goes to the command
//     register of its HWTI (two at once are both delivered);
//   * 600 random adds and NEXT calls against a reference model of the
//     ready-to-run queue (best = lowest priority number, then lowest id)
//     and of the preemption rule (interrupt only for an arrival better than
//     the running thread and every queued one);
//   * the decision time: a newly added best thread is the decision one
//     cycle after it arrives, with 1 and with 250 threads already queued.
module tb_thread_scheduler;
  import hthreads_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  logic        add_valid, add_ready;
  add_thread_t add;
  bus_req_t    s_req, m_req;
  bus_rsp_t    s_rsp, m_rsp;
  logic        cpu_irq;

  thread_scheduler dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // HWTI command registers
  logic [31:0] run_addrs [$];
  always @(posedge clk) begin
    m_rsp.ack <= 1'b0;
    if (!rst && m_req.req && !m_rsp.ack) begin
      m_rsp.ack <= 1'b1;
      if (m_req.we && m_req.wdata == CMD_RUN) run_addrs.push_back(m_req.addr);
    end
  end

  task automatic send(input int t, input int prio, input bit hw, input int hwti);
    @(negedge clk);
    add_valid = 1'b1;
    add = '{tid: tid_t'(t), prio: PRIO_W'(prio), is_hw: hw, hwti: HWTI_IDX_W'(hwti)};
    @(negedge clk);
    add_valid = 1'b0;
  endtask

  task automatic call(input logic [3:0] op, output logic [31:0] r);
    int n = 0;
    @(negedge clk);
    s_req = '{req: 1'b1, we: 1'b0, addr: svc_addr(REGION_SCHED, op, 8'd0, 16'd0), wdata: '0};
    do begin @(negedge clk); n++; end while (!s_rsp.ack && n < 100);
    r = s_rsp.rdata;
    @(posedge clk);
    s_req <= '0;
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
    add_valid = 1'b0; add = '0; s_req = '0; m_rsp = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    run_addrs.delete();

    // ---------------- hardware threads
    check(add_ready, "add input always ready");
    send(9, 3, 1'b1, 1);
    repeat (8) @(posedge clk);
    check(run_addrs.size() == 1 && run_addrs[0] == HWTI_BASE + HWTI_STRIDE + 32'h4,
          "RUN written to HWTI 1's command register");
    call(SCHED_OP_NEXT, r);
    check(!r[31], "hardware thread not queued");
    run_addrs.delete();
    @(negedge clk);
    add_valid = 1'b1; add = '{tid: 8'd4, prio: 4'd1, is_hw: 1'b1, hwti: 7'd0};
    @(negedge clk);
    add = '{tid: 8'd5, prio: 4'd1, is_hw: 1'b1, hwti: 7'd1};
    @(negedge clk);
    add_valid = 1'b0;
    repeat (12) @(posedge clk);
    check(run_addrs.size() == 2 && run_addrs[0] == HWTI_BASE + 32'h4 &&
          run_addrs[1] == HWTI_BASE + HWTI_STRIDE + 32'h4, "two RUN commands delivered");

    // ---------------- preemption rule, directed
    send(20, 8, 1'b0, 0);
    call(SCHED_OP_NEXT, r);                  // CPU now runs priority 8
    check(r[31] && r[7:0] == 20, "CPU takes thread 20");
    send(21, 2, 1'b0, 0);                    // better than the CPU: interrupt
    repeat (2) @(negedge clk);
    check(cpu_irq, "arrival better than running and queue interrupts");
    call(SCHED_OP_IRQ_ACK, r);
    send(22, 5, 1'b0, 0);                    // better than CPU, worse than thread 21
    repeat (2) @(negedge clk);
    check(!cpu_irq, "arrival worse than a queued thread does not interrupt");
    send(23, 12, 1'b0, 0);                   // worse than CPU
    repeat (2) @(negedge clk);
    check(!cpu_irq, "arrival worse than the running thread does not interrupt");
    call(SCHED_OP_NEXT, r);
    call(SCHED_OP_NEXT, r);
    call(SCHED_OP_NEXT, r);
    check(r[31] && r[7:0] == 23, "queue order 21, 22, 23");
    call(SCHED_OP_NEXT, r);                  // empty: CPU idle
    check(!r[31], "queue empty, CPU idle");
    send(24, 15, 1'b0, 0);
    repeat (2) @(negedge clk);
    check(cpu_irq, "any arrival wakes an idle CPU");
    call(SCHED_OP_NEXT, r);
    call(SCHED_OP_IRQ_ACK, r);

    // ---------------- random against a model
    begin
      bit   inq [256];
      int   pr [256];
      automatic bit   busy = 0;
      automatic int   cur = 15;
      automatic bit   irq_m = 0;
      automatic bit   ok = 1;
      automatic int   nirq = 0;
      for (int i = 0; i < 256; i++) inq[i] = 0;
      call(SCHED_OP_IRQ_ACK, r);
      for (int it = 0; it < 600 && ok; it++) begin
        automatic int k = $urandom_range(0, 9);
        automatic int bt = -1, bp = 16;
        for (int i = 0; i < 256; i++) if (inq[i] && pr[i] < bp) begin bt = i; bp = pr[i]; end
        if (k < 5) begin
          automatic int t = $urandom_range(0, 40);
          automatic int p = $urandom_range(0, 15);
          if (inq[t]) continue;
          if ((!busy || p < cur) && (bt < 0 || p < bp)) begin irq_m = 1; nirq++; end
          inq[t] = 1; pr[t] = p;
          send(t, p, 1'b0, 0);
        end else if (k < 8) begin
          call(SCHED_OP_NEXT, r);
          if (bt < 0) begin
            if (r[31]) ok = 0;
            busy = 0;
          end else begin
            if (!(r[31] && r[7:0] == 8'(bt) && r[11:8] == 4'(bp))) ok = 0;
            inq[bt] = 0; busy = 1; cur = bp;
          end
          if (!ok) $display("NEXT got %h expected id %0d prio %0d", r, bt, bp);
        end else begin
          call(SCHED_OP_IRQ_ACK, r);
          irq_m = 0;
        end
        @(negedge clk);
        if (cpu_irq != irq_m) begin
          ok = 0;
          $display("irq %0d expected %0d at step %0d", cpu_irq, irq_m, it);
        end
      end
      check(ok, "random adds and NEXT calls match the model");
      check(nirq > 0, "preemption interrupts happened");
      // drain
      for (int i = 0; i < 256; i++) if (inq[i]) call(SCHED_OP_NEXT, r);
      call(SCHED_OP_NEXT, r);
      check(!r[31], "queue drained");
    end

    // ---------------- constant decision time
    begin
      int lat1, lat250;
      send(100, 9, 1'b0, 0);
      @(negedge clk); add_valid = 1'b1; add = '{tid: 8'd200, prio: 4'd2, is_hw: 1'b0, hwti: 7'd0};
      @(negedge clk); add_valid = 1'b0;
      lat1 = 1;
      while (!(dut.best_valid && dut.best_id == 8'd200) && lat1 < 50) begin @(negedge clk); lat1++; end
      call(SCHED_OP_NEXT, r);
      call(SCHED_OP_NEXT, r);
      for (int t = 0; t < 250; t++) begin
        @(negedge clk); add_valid = 1'b1; add = '{tid: 8'(t), prio: 4'd9, is_hw: 1'b0, hwti: 7'd0};
      end
      @(negedge clk); add = '{tid: 8'd250, prio: 4'd2, is_hw: 1'b0, hwti: 7'd0};
      @(negedge clk); add_valid = 1'b0;
      lat250 = 1;
      while (!(dut.best_valid && dut.best_id == 8'd250) && lat250 < 50) begin @(negedge clk); lat250++; end
      check(lat1 == 1 && lat250 == 1, $sformatf("decision one cycle after arrival (%0d with 1 queued, %0d with 250)", lat1, lat250));
      call(SCHED_OP_NEXT, r);
      check(r[31] && r[7:0] == 250, "NEXT takes the new best of 251");
      call(SCHED_OP_NEXT, r);
      check(r[31] && r[7:0] == 0, "then the lowest id of equal priority");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
