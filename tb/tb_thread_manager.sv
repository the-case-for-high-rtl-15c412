// tb_thread_manager: self-checking test of the Thread Manager.
//
// The testbench calls the manager over its bus slave port, sends it
// add_thread messages as the Mutex Manager would, and collects the messages
// it passes to the Scheduler (sometimes stalling them with
// sched_add_ready low). It checks id allocation (lowest free id first,
// reuse after FREE, table full after 256 creates), the stored attributes
// carried in every Scheduler message, the state changes made by ADD, EXIT
// and FREE, and that a message from the Mutex Manager is turned into a
// Scheduler message with the thread's own attributes.
module tb_thread_manager;
  import hthreads_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  bus_req_t    bus_req;
  bus_rsp_t    bus_rsp;
  logic        mtx_add_valid, mtx_add_ready;
  tid_t        mtx_add_tid;
  logic        sched_add_valid, sched_add_ready;
  add_thread_t sched_add;

  thread_manager dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  add_thread_t msgs [$];
  bit stall = 1'b0;
  always @(posedge clk) if (sched_add_valid && sched_add_ready) msgs.push_back(sched_add);
  always @(negedge clk) sched_add_ready = !stall || ($urandom_range(0, 2) == 0);

  task automatic call(input logic [3:0] op, input int t, input logic [15:0] operand,
                      output logic [31:0] r);
    int n = 0;
    @(negedge clk);
    bus_req = '{req: 1'b1, we: 1'b0, addr: svc_addr(REGION_TM, op, tid_t'(t), operand), wdata: '0};
    do begin @(negedge clk); n++; end while (!bus_rsp.ack && n < 100);
    r = bus_rsp.rdata;
    @(posedge clk);
    bus_req <= '0;
  endtask

  task automatic mtx_send(input int t);
    @(negedge clk);
    mtx_add_valid = 1'b1;
    mtx_add_tid   = tid_t'(t);
    @(posedge clk);
    while (!mtx_add_ready) @(posedge clk);        // taken at this edge
    mtx_add_valid <= 1'b0;
  endtask

  function automatic logic [15:0] attr(bit hw, int hwti, int prio);
    return {hw, 7'(hwti), 4'd0, 4'(prio)};
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int ids [8];
    bus_req = '0; mtx_add_valid = 1'b0; mtx_add_tid = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;

    for (int k = 0; k < 8; k++) begin
      call(TM_OP_CREATE, 0, attr(k % 2, k / 2, 15 - k), r);
      ids[k] = int'(r[7:0]);
      check(r[31] && ids[k] == k, $sformatf("create %0d returns id %0d", k, ids[k]));
      call(TM_OP_STATUS, ids[k], '0, r);
      check(r == TS_CREATED, "state CREATED");
    end

    stall = 1'b1;
    msgs.delete();
    for (int k = 0; k < 8; k++) call(TM_OP_ADD, ids[k], '0, r);
    for (int n = 0; n < 200 && msgs.size() < 8; n++) @(posedge clk);
    repeat (5) @(posedge clk);
    check(msgs.size() == 8, "eight messages to the Scheduler");
    for (int k = 0; k < 8 && k < msgs.size(); k++)
      check(msgs[k].tid == tid_t'(k) && msgs[k].is_hw == (k % 2) && msgs[k].hwti == 7'(k / 2) &&
            msgs[k].prio == 4'(15 - k), $sformatf("attributes of thread %0d", k));
    call(TM_OP_STATUS, 3, '0, r);
    check(r == TS_READY, "state READY after ADD");

    // message from the Mutex Manager
    msgs.delete();
    mtx_send(5);
    for (int n = 0; n < 200 && msgs.size() < 1; n++) @(posedge clk);
    repeat (5) @(posedge clk);
    check(msgs.size() == 1 && msgs[0].tid == 5 && msgs[0].is_hw && msgs[0].hwti == 2 &&
          msgs[0].prio == 10, "mutex hand-over forwarded with attributes");
    // both sources at once
    msgs.delete();
    fork
      mtx_send(6);
      call(TM_OP_ADD, 7, '0, r);
    join
    for (int n = 0; n < 200 && msgs.size() < 2; n++) @(posedge clk);
    repeat (5) @(posedge clk);
    check(msgs.size() == 2, "simultaneous messages both delivered");
    stall = 1'b0;

    call(TM_OP_EXIT, 2, '0, r);
    call(TM_OP_STATUS, 2, '0, r);
    check(r == TS_EXITED, "state EXITED");
    call(TM_OP_FREE, 2, '0, r);
    call(TM_OP_STATUS, 2, '0, r);
    check(r == TS_UNUSED, "state UNUSED after FREE");
    call(TM_OP_CREATE, 0, attr(0, 0, 1), r);
    check(r[31] && r[7:0] == 2, "freed id reused first");

    // fill the table
    begin
      automatic int n = 0;
      do begin
        call(TM_OP_CREATE, 0, attr(0, 0, 1), r);
        if (r[31]) n++;
      end while (r[31] && n < 300);
      check(n == 256 - 8, $sformatf("table holds 256 threads (%0d more created)", n));
      check(r == 0, "create on a full table returns 0");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
