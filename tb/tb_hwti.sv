// tb_hwti: self-checking test of the hardware thread interface.
//
// The testbench drives the HWTI's bus slave port (as the CPU and the
// Scheduler would), plays a one-cycle bus slave behind its master port
// (memory plus a scripted Mutex Manager and Thread Manager), and drives the
// user interface directly as a hardware thread would. It checks every
// syscall's result, the bus access it makes and the system and user status
// it leaves, and checks each operation's latency against the cycle counts
// the document reports for its implementation (this design must not be
// slower): thread_id write 5, RUN 5, RESET 4, LOAD 60, STORE 32, YIELD 5,
// SELF 5, MUTEX_LOCK 20, MUTEX_UNLOCK 20, EXIT 20 cycles.
module tb_hwti;
  import hthreads_pkg::*;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  bus_req_t     s_req, m_req;
  bus_rsp_t     s_rsp, m_rsp;
  user_status_e ustat;
  logic [31:0]  uresult, arg1, arg2;
  logic [7:0]   opcode;

  hwti dut (
    .clk, .rst, .s_req, .s_rsp, .m_req, .m_rsp,
    .intrfc2thrd_status(ustat), .intrfc2thrd_result(uresult),
    .thrd2intrfc_opcode(opcode), .thrd2intrfc_argument_one(arg1),
    .thrd2intrfc_argument_two(arg2)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------------------------------------------- slave model
  logic [31:0] mem [256];
  logic [31:0] mtx_answer;       // what the "Mutex Manager" returns
  logic [31:0] last_addr, last_wdata;
  logic        last_we;
  int          n_bus = 0;
  always @(posedge clk) begin
    m_rsp.ack <= 1'b0;
    if (m_req.req && !m_rsp.ack) begin
      m_rsp.ack  <= 1'b1;
      last_addr  <= m_req.addr;
      last_we    <= m_req.we;
      last_wdata <= m_req.wdata;
      n_bus++;
      if (m_req.addr[31:28] == REGION_MEM) begin
        if (m_req.we) mem[m_req.addr[9:2]] <= m_req.wdata;
        m_rsp.rdata <= mem[m_req.addr[9:2]];
      end else if (m_req.addr[31:28] == REGION_MUTEX) begin
        m_rsp.rdata <= mtx_answer;
      end else begin
        m_rsp.rdata <= 32'd1;
      end
    end
  end

  // ---------------------------------------------------- system side
  task automatic sys(input logic we, input logic [3:0] r, input logic [31:0] wd,
                     output logic [31:0] rd);
    @(negedge clk);
    s_req = '{req: 1'b1, we: we, addr: {24'd0, 2'b00, r, 2'b00}, wdata: wd};
    do @(negedge clk); while (!s_rsp.ack);
    rd = s_rsp.rdata;
    @(posedge clk);          // hold the request through the ack cycle
    s_req <= '0;
  endtask

  // ---------------------------------------------------- user side
  // issue opcode for one cycle; return cycles until the status is RUN again
  // (or until RESET for EXIT), and the result seen with the ACK
  task automatic call(input opcode_e op, input logic [31:0] a1, input logic [31:0] a2,
                      output int lat, output logic [31:0] res);
    int n;
    @(negedge clk);
    while (!(ustat == USER_STATUS_RUN || ustat == USER_STATUS_ACK)) @(negedge clk);
    opcode = op; arg1 = a1; arg2 = a2;
    @(negedge clk);
    opcode = OP_NOOP; arg1 = '0; arg2 = '0;
    n = 1;
    res = '0;
    while (ustat != USER_STATUS_RUN && ustat != USER_STATUS_RESET && n < 1000) begin
      if (ustat == USER_STATUS_ACK) res = uresult;
      @(negedge clk);
      n++;
    end
    lat = n;
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d, res;
    int lat, t;
    s_req = '0; opcode = OP_NOOP; arg1 = '0; arg2 = '0;
    m_rsp = '0; mtx_answer = MTX_ACQUIRED;
    for (int i = 0; i < 256; i++) mem[i] = 32'hA000_0000 + i;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);

    check(ustat == USER_STATUS_RESET && dut.status == SYS_UNUSED, "reset state");

    // thread_id -> USED within 5 cycles
    fork
      sys(1'b1, HWTI_REG_THREAD_ID, 32'd42, d);
      begin
        t = 0;
        while (dut.status != SYS_USED && t < 50) begin @(negedge clk); t++; end
      end
    join
    check(dut.status == SYS_USED && t <= 5, $sformatf("thread_id -> USED in %0d cycles", t));
    sys(1'b0, HWTI_REG_THREAD_ID, '0, d);
    check(d == 42, "thread_id reads back");

    sys(1'b1, HWTI_REG_ARGUMENT, 32'h0000_0040, d);

    // RUN -> user status RUN within 5 cycles, argument on result
    fork
      sys(1'b1, HWTI_REG_COMMAND, CMD_RUN, d);
      begin
        t = 0;
        while (ustat != USER_STATUS_RUN && t < 50) begin @(negedge clk); t++; end
      end
    join
    check(ustat == USER_STATUS_RUN && t <= 5, $sformatf("RUN -> RUN in %0d cycles", t));
    check(uresult == 32'h40, "argument handed to user logic");
    sys(1'b0, HWTI_REG_STATUS, '0, d);
    check(d == SYS_RUNNING, "system status RUNNING");

    // SELF
    call(OP_HTHREAD_SELF, '0, '0, lat, res);
    check(res == 42 && lat <= 5, $sformatf("SELF returns id (%0d) in %0d cycles", res, lat));
    // YIELD
    call(OP_HTHREAD_YIELD, '0, '0, lat, res);
    check(res == 0 && lat <= 5, $sformatf("YIELD in %0d cycles", lat));
    // LOAD
    call(OP_LOAD, 32'h0000_0010, '0, lat, res);
    check(res == 32'hA000_0004 && lat <= 60, $sformatf("LOAD %h in %0d cycles", res, lat));
    check(last_addr == 32'h10 && !last_we, "LOAD bus read address");
    // STORE
    call(OP_STORE, 32'h0000_0020, 32'hDEAD_BEEF, lat, res);
    check(lat <= 32 && mem[8] == 32'hDEAD_BEEF && last_we, $sformatf("STORE in %0d cycles", lat));
    call(OP_LOAD, 32'h0000_0020, '0, lat, res);
    check(res == 32'hDEAD_BEEF, "LOAD after STORE");
    // back-to-back: a call issued during the ACK cycle
    begin
      int n0;
      n0 = n_bus;
      @(negedge clk);
      while (ustat != USER_STATUS_RUN) @(negedge clk);
      opcode = OP_HTHREAD_SELF; @(negedge clk);
      check(ustat == USER_STATUS_ACK, "SELF answered on the next edge");
      opcode = OP_LOAD; arg1 = 32'h4; @(negedge clk);   // issued during ACK
      opcode = OP_NOOP;
      while (ustat != USER_STATUS_ACK) @(negedge clk);
      check(uresult == 32'hA000_0001 && n_bus == n0 + 1, "call accepted during ACK");
    end
    // MUTEX_LOCK acquired
    mtx_answer = MTX_ACQUIRED;
    call(OP_HTHREAD_MUTEX_LOCK, 32'd5, '0, lat, res);
    check(res == 0 && lat <= 20, $sformatf("MUTEX_LOCK in %0d cycles", lat));
    check(last_addr == svc_addr(REGION_MUTEX, MTX_OP_LOCK, 8'd42, 16'd5), "lock address");
    // MUTEX_UNLOCK
    mtx_answer = MTX_RELEASED;
    call(OP_HTHREAD_MUTEX_UNLOCK, 32'd5, '0, lat, res);
    check(res == 0 && lat <= 20, $sformatf("MUTEX_UNLOCK in %0d cycles", lat));
    check(last_addr == svc_addr(REGION_MUTEX, MTX_OP_UNLOCK, 8'd42, 16'd5), "unlock address");
    // MUTEX_UNLOCK error
    mtx_answer = MTX_ERROR;
    call(OP_HTHREAD_MUTEX_UNLOCK, 32'd5, '0, lat, res);
    check(res == 1, "unlock error returns 1");
    // MUTEX_LOCK blocked, resumed by RUN
    mtx_answer = MTX_BLOCKED;
    @(negedge clk);
    opcode = OP_HTHREAD_MUTEX_LOCK; arg1 = 32'd7;
    @(negedge clk);
    opcode = OP_NOOP;
    repeat (10) @(negedge clk);
    check(dut.status == SYS_BLOCKED && ustat == USER_STATUS_WAIT, "blocked on mutex");
    sys(1'b0, HWTI_REG_STATUS, '0, d);
    check(d == SYS_BLOCKED, "status register BLOCKED");
    sys(1'b1, HWTI_REG_COMMAND, CMD_RUN, d);
    t = 0;
    while (ustat != USER_STATUS_ACK && t < 10) begin @(negedge clk); t++; end
    check(ustat == USER_STATUS_ACK && uresult == 0, "resumed by RUN as owner");
    @(negedge clk);
    check(ustat == USER_STATUS_RUN && dut.status == SYS_RUNNING, "running again");
    // EXIT
    call(OP_HTHREAD_EXIT, 32'h1234_5678, '0, lat, res);
    check(lat <= 20 && dut.status == SYS_EXIT && ustat == USER_STATUS_RESET,
          $sformatf("EXIT in %0d cycles", lat));
    check(last_addr == svc_addr(REGION_TM, TM_OP_EXIT, 8'd42, 16'd0), "exit reported to Thread Manager");
    sys(1'b0, HWTI_REG_RESULT, '0, d);
    check(d == 32'h1234_5678, "result register holds exit value");
    // RESET -> UNUSED within 4 cycles
    fork
      sys(1'b1, HWTI_REG_COMMAND, CMD_RESET, d);
      begin
        t = 0;
        while (dut.status != SYS_UNUSED && t < 50) begin @(negedge clk); t++; end
      end
    join
    check(dut.status == SYS_UNUSED && t <= 4 && ustat == USER_STATUS_RESET,
          $sformatf("RESET -> UNUSED in %0d cycles", t));
    // RUN on an unused HWTI does nothing
    sys(1'b1, HWTI_REG_COMMAND, CMD_RUN, d);
    check(ustat == USER_STATUS_RESET, "RUN ignored without a thread");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
