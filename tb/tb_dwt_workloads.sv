// tb_dwt_workloads: the DWT example run with one, two and three hardware
// threads working at the same time.
//
// The system is built with three HWTIs (NUM_HWTI = 3) and 64-sample records
// (DWT_MAX_LEN = 64) so that the configuration with three hardware threads
// fits. The testbench is the CPU. For k = 1, 2, 3 it resets the system,
// writes k records with different sample patterns into shared memory,
// creates k hardware threads, gives each HWTI its thread id and record and
// makes the threads ready; the Scheduler starts them. It then polls until
// every HWTI reports EXIT and records the cycles from the first ADD to the
// last exit (to within one round of status reads; the polling shares the
// bus with the threads). It checks every thread's coefficients against a
// reference lifting Haar transform, each exit value (the thread's id) and
// the shared completion counter (k; the threads increment it under mutex
// 0). Threads share only the bus, so k threads together must take less
// than k times one thread: the transforms overlap and only the memory
// traffic is serialised. The cycle counts are printed. The three-thread
// size and the record length are this testbench's choice; the document's
// record length is not given.
module tb_dwt_workloads;
  import hthreads_pkg::*;

  localparam int NH  = 3;
  localparam int LEN = 64;

  logic     clk = 1'b0;
  logic     rst = 1'b1;
  bus_req_t cpu_req;
  bus_rsp_t cpu_rsp;
  logic     cpu_irq;

  always #5 clk = ~clk;

  hthreads_top #(.NUM_HWTI(NH), .DWT_MAX_LEN(LEN)) dut (.clk, .rst, .cpu_req, .cpu_rsp, .cpu_irq);

  int checks = 0, failures = 0;
  int cycles = 0;
  always @(posedge clk) cycles++;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

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

  function automatic logic [31:0] rec(int h);
    return 32'h0000_1000 + 32'(h) * 32'h400;
  endfunction

  typedef int arr_t [LEN];
  function automatic arr_t haar(input arr_t x);
    arr_t t;
    int m = LEN;
    while (m >= 2 && m % 2 == 0) begin
      for (int i = 0; i < m / 2; i++) begin
        int d;
        d = x[2*i+1] - x[2*i];
        t[i] = x[2*i] + (d >>> 1);
        t[m/2 + i] = d;
      end
      for (int i = 0; i < m; i++) x[i] = t[i];
      m = m / 2;
    end
    return x;
  endfunction

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tk [4];
    cpu_req = '0;
    for (int k = 1; k <= NH; k++) begin
      arr_t in [NH];
      arr_t ref_out [NH];
      logic [31:0] id [NH];
      logic [31:0] d;
      int t0, bad, ndone;

      rst <= 1'b1;
      repeat (4) @(posedge clk);
      rst <= 1'b0;
      @(posedge clk);

      for (int h = 0; h < k; h++) begin
        for (int i = 0; i < LEN; i++) in[h][i] = (100 + h + i * (4 - h)) % LEN - 20 * h;
        ref_out[h] = haar(in[h]);
        wr(rec(h), LEN);
        for (int i = 0; i < LEN; i++) wr(rec(h) + 4 * (i + 1), in[h][i]);
      end
      wr(32'h0, 32'd0);

      for (int h = 0; h < k; h++) begin
        rd(svc_addr(REGION_TM, TM_OP_CREATE, 8'd0, {1'b1, 7'(h), 4'd0, 4'd1}), d);
        id[h] = {24'd0, d[7:0]};
        wr(hwti_reg(h, HWTI_REG_THREAD_ID), id[h]);
        wr(hwti_reg(h, HWTI_REG_ARGUMENT), rec(h));
      end
      t0 = cycles;
      for (int h = 0; h < k; h++) rd(svc_addr(REGION_TM, TM_OP_ADD, id[h][7:0], 16'd0), d);

      do begin
        ndone = 0;
        for (int h = 0; h < k; h++) begin
          rd(hwti_reg(h, HWTI_REG_STATUS), d);
          if (d == SYS_EXIT) ndone++;
        end
      end while (ndone < k && cycles - t0 < 100000);
      tk[k] = cycles - t0;
      check(ndone == k, $sformatf("%0d hardware threads all exited", k));

      for (int h = 0; h < k; h++) begin
        bad = 0;
        for (int i = 0; i < LEN; i++) begin
          rd(rec(h) + 4 * (i + 1), d);
          if (int'(d) != ref_out[h][i]) bad++;
        end
        check(bad == 0, $sformatf("k=%0d thread %0d: coefficients (%0d wrong)", k, h, bad));
        rd(hwti_reg(h, HWTI_REG_RESULT), d);
        check(d == id[h], $sformatf("k=%0d thread %0d: exit value is its id", k, h));
      end
      rd(32'h0, d);
      check(d == 32'(k), $sformatf("k=%0d: completion counter %0d", k, d));
      $display("DWT with %0d hardware thread(s), %0d samples each: %0d cycles", k, LEN, tk[k]);
    end
    check(tk[2] < 2 * tk[1], "two threads take less than twice one thread");
    check(tk[3] < 3 * tk[1], "three threads take less than three times one thread");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
