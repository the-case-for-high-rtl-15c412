// tb_system_bus: self-checking test of the shared bus (4 masters, 2 HWTIs).
//
// Every slave is modelled by the testbench: it acks one cycle after its
// select and returns a word that names the slave and echoes the address,
// so a misrouted read is visible. The test checks routing of reads and
// writes to every region, that an unmapped address is answered with 0,
// that at most one slave is selected at a time, that four simultaneous
// requests are all served, one at a time, and in round-robin order, and
// the cycle count of an uncontended access (request at a clock edge, grant
// at the next, ack in the cycle after that).
module tb_system_bus;
  import hthreads_pkg::*;

  localparam int NM = 4;
  localparam int NH = 2;

  logic clk = 1'b0;
  logic rst = 1'b1;
  always #5 clk = ~clk;

  bus_req_t m_req [NM];
  bus_rsp_t m_rsp [NM];
  bus_req_t mem_req, tm_req, sched_req, mtx_req;
  bus_rsp_t mem_rsp, tm_rsp, sched_rsp, mtx_rsp;
  bus_req_t hwti_req [NH];
  bus_rsp_t hwti_rsp [NH];

  system_bus #(.NUM_MASTERS(NM), .NUM_HWTI(NH)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // slave models: tag in [31:24], address low bits in [15:0]
  logic [31:0] last_wdata [6];
  bus_req_t sreq [6];
  bus_rsp_t srsp [6];
  assign sreq = '{mem_req, tm_req, sched_req, mtx_req, hwti_req[0], hwti_req[1]};
  assign mem_rsp = srsp[0];
  assign tm_rsp = srsp[1];
  assign sched_rsp = srsp[2];
  assign mtx_rsp = srsp[3];
  assign hwti_rsp[0] = srsp[4];
  assign hwti_rsp[1] = srsp[5];
  for (genvar g = 0; g < 6; g++) begin : g_slave
    initial srsp[g] = '0;
    always @(posedge clk) begin
      srsp[g].ack <= 1'b0;
      if (sreq[g].req && !srsp[g].ack) begin
        srsp[g].ack   <= 1'b1;
        srsp[g].rdata <= {8'(g), 8'h00, sreq[g].addr[15:0]};
        if (sreq[g].we) last_wdata[g] <= sreq[g].wdata;
      end
    end
  end

  // one-hot select check
  always @(negedge clk) if (!rst) begin
    int n;
    n = int'(mem_req.req) + int'(tm_req.req) + int'(sched_req.req) + int'(mtx_req.req) +
        int'(hwti_req[0].req) + int'(hwti_req[1].req);
    if (n > 1) begin
      failures++;
      $display("FAIL: %0d slaves selected at once", n);
    end
  end

  int order [$];
  task automatic access(input int m, input logic we, input logic [31:0] addr,
                        input logic [31:0] wd, output logic [31:0] rd, output int lat);
    @(negedge clk);
    m_req[m] = '{req: 1'b1, we: we, addr: addr, wdata: wd};
    lat = 0;
    do begin @(negedge clk); lat++; end while (!m_rsp[m].ack && lat < 100);
    rd = m_rsp[m].rdata;
    order.push_back(m);
    @(posedge clk);          // hold the request through the ack cycle
    m_req[m] <= '0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    int lat;
    logic [31:0] addrs [7];
    int tags [7];
    for (int i = 0; i < NM; i++) m_req[i] = '0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;

    addrs = '{32'h0000_0124, 32'h1300_0002, 32'h2100_0000, 32'h3005_0007,
              32'h4000_0008, 32'h4000_010C, 32'h4000_0200};
    tags  = '{0, 1, 2, 3, 4, 5, -1};
    // routing from every master
    for (int m = 0; m < NM; m++) begin
      for (int a = 0; a < 7; a++) begin
        access(m, 1'b0, addrs[a], '0, d, lat);
        if (tags[a] < 0) check(d == 0, $sformatf("unmapped address from master %0d", m));
        else check(d == {8'(tags[a]), 8'h00, addrs[a][15:0]},
                   $sformatf("read of %h from master %0d got %h", addrs[a], m, d));
      end
    end
    access(2, 1'b0, 32'h0000_0040, '0, d, lat);
    check(lat == 2, $sformatf("uncontended ack two cycles after the request (%0d)", lat));
    // writes
    access(1, 1'b1, 32'h4000_0104, 32'hCAFE_0001, d, lat);
    check(last_wdata[5] == 32'hCAFE_0001, "write reaches HWTI 1");
    access(3, 1'b1, 32'h0000_0000, 32'hCAFE_0002, d, lat);
    check(last_wdata[0] == 32'hCAFE_0002, "write reaches memory");

    // contention: all four masters at once, twice. The last grant before
    // went to master 1, so round robin serves 2, 3, 0, 1, 2, 3, 0, 1.
    access(1, 1'b0, 32'h0000_0000, '0, d, lat);
    order.delete();
    for (int round = 0; round < 2; round++) begin
      fork
        begin logic [31:0] r; int l; access(0, 1'b0, 32'h0000_0010, '0, r, l); check(r[15:0] == 16'h10, "m0 data"); end
        begin logic [31:0] r; int l; access(1, 1'b0, 32'h1000_0011, '0, r, l); check(r[15:0] == 16'h11, "m1 data"); end
        begin logic [31:0] r; int l; access(2, 1'b0, 32'h2000_0012, '0, r, l); check(r[15:0] == 16'h12, "m2 data"); end
        begin logic [31:0] r; int l; access(3, 1'b0, 32'h3000_0013, '0, r, l); check(r[15:0] == 16'h13, "m3 data"); end
      join
    end
    check(order.size() == 8, "all contending requests served");
    check(order.size() == 8 && order[0] == 2 && order[1] == 3 && order[2] == 0 && order[3] == 1,
          "round-robin order starts after the previous owner");
    // round robin: every window of four consecutive grants holds each master once
    for (int s = 0; s + 4 <= order.size(); s++) begin
      bit seen [NM];
      automatic bit ok = 1'b1;
      for (int k = 0; k < NM; k++) seen[k] = 1'b0;
      for (int k = s; k < s + 4; k++) begin
        if (seen[order[k]]) ok = 1'b0;
        seen[order[k]] = 1'b1;
      end
      check(ok, $sformatf("round-robin window at %0d", s));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
